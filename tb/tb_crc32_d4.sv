// tb_crc32_d4: checks the nibble-wide CRC-32 against the known check value
// of "123456789" (0xCBF43926), against an independent byte-wise reference
// on random strings, and checks the residue after data plus FCS.
module tb_crc32_d4;
  import tt_tb_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [3:0] din = 0;
  logic [31:0] crc;
  logic residue_ok;
  int checks = 0, failures = 0;

  crc32_d4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input bq_t q);
    foreach (q[i]) begin
      for (int n = 0; n < 2; n++) begin
        en  <= 1;
        din <= n ? q[i][7:4] : q[i][3:0];
        @(posedge clk);
      end
    end
    en <= 0;
    @(posedge clk);
  endtask

  task automatic restart();
    clr <= 1;
    @(posedge clk);
    clr <= 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bq_t q;
    logic [31:0] f;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(crc == 32'hFFFF_FFFF, "reset value");
    q = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    feed(q);
    check(~crc == 32'hCBF4_3926, $sformatf("check value %h", ~crc));
    // en low holds the value
    f = crc;
    repeat (3) @(posedge clk);
    check(crc == f, "hold when en low");
    for (int t = 0; t < 40; t++) begin
      restart();
      q = rand_data(1 + $urandom_range(0, 100));
      feed(q);
      f = ref_fcs(q);
      check(~crc == f, $sformatf("random string %0d: %h vs %h", t, ~crc, f));
      for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
      restart();
      feed(q);
      check(residue_ok, "residue after FCS");
    end
    // clear wins over enable
    clr <= 1; en <= 1; din <= 4'hA;
    @(posedge clk);
    clr <= 0; en <= 0;
    @(posedge clk);
    check(crc == 32'hFFFF_FFFF, "clear wins over enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
