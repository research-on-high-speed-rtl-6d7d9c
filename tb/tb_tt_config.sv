// tb_tt_config: reset defaults, every register write and read-back, and
// that a write to one register leaves the others alone.
module tb_tt_config;
  import tt_pkg::*;

  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [2:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  net_cfg_t cfg, exp_cfg;
  int checks = 0, failures = 0;

  tt_config #(.BOARD_MAC(48'h1122_3344_5566), .PC_MAC(48'hAABB_CCDD_EEFF),
              .BOARD_IP(32'h0A00_0001), .PC_IP(32'h0A00_0002),
              .BOARD_PORT(16'd5000), .PC_PORT(16'd6000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] exp_read(input logic [2:0] a);
    case (a)
      0: return exp_cfg.board_mac[47:16];
      1: return {16'd0, exp_cfg.board_mac[15:0]};
      2: return exp_cfg.pc_mac[47:16];
      3: return {16'd0, exp_cfg.pc_mac[15:0]};
      4: return exp_cfg.board_ip;
      5: return exp_cfg.pc_ip;
      6: return {exp_cfg.board_port, exp_cfg.pc_port};
      default: return 0;
    endcase
  endfunction

  task automatic check_all();
    check(cfg == exp_cfg, $sformatf("cfg %h vs %h", cfg, exp_cfg));
    for (int a = 0; a < 8; a++) begin
      cfg_addr <= 3'(a);
      #1;
      check(cfg_rdata == exp_read(3'(a)), $sformatf("read %0d: %h", a, cfg_rdata));
      @(posedge clk);
    end
  endtask

  initial begin
    logic [31:0] w;
    exp_cfg = '{board_mac:48'h1122_3344_5566, pc_mac:48'hAABB_CCDD_EEFF,
                board_ip:32'h0A00_0001, pc_ip:32'h0A00_0002,
                board_port:16'd5000, pc_port:16'd6000};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check_all();
    for (int t = 0; t < 30; t++) begin
      int a;
      a = $urandom_range(0, 7);
      w = $urandom;
      @(negedge clk);
      cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = w;
      @(negedge clk);
      cfg_we = 0;
      case (a)
        0: exp_cfg.board_mac[47:16] = w;
        1: exp_cfg.board_mac[15:0]  = w[15:0];
        2: exp_cfg.pc_mac[47:16]    = w;
        3: exp_cfg.pc_mac[15:0]     = w[15:0];
        4: exp_cfg.board_ip         = w;
        5: exp_cfg.pc_ip            = w;
        6: {exp_cfg.board_port, exp_cfg.pc_port} = w;
        default: ;
      endcase
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
