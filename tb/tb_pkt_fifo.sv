// tb_pkt_fifo: random writes, commits, rollbacks and reads against a queue
// model of the committed and tentative contents; checks read data and its
// one-clock latency, empty/full/ovf and the committed count every clock.
module tb_pkt_fifo;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, commit = 0, rollback = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic empty, full, ovf;
  logic [$clog2(DEPTH):0] rd_count;
  int checks = 0, failures = 0;
  int n_commit = 0, n_rollback = 0, n_ovf = 0, n_read = 0;

  pkt_fifo #(.DATA_W(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [31:0] committed[$], tentative[$];
  logic m_ovf;
  logic [31:0] exp_rd;

  initial begin
    m_ovf = 0;
    exp_rd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      bit w, c, r, rb;
      @(negedge clk);
      // compare the state left by the previous clock
      check(empty == (committed.size() == 0), "empty");
      check(rd_count == ($clog2(DEPTH)+1)'(committed.size()), "rd_count");
      check(full == (committed.size() + tentative.size() == DEPTH), "full");
      check(ovf == m_ovf, "ovf");
      check(rd_data == exp_rd, $sformatf("rd_data %h vs %h", rd_data, exp_rd));
      w  = ($urandom_range(0, 99) < 55);
      c  = ($urandom_range(0, 99) < 8);
      rb = !c && ($urandom_range(0, 99) < 4);
      r  = (committed.size() != 0) && ($urandom_range(0, 99) < 45);
      wr_en = w; wr_data = $urandom; commit = c; rollback = rb; rd_en = r;
      // model the clock edge: fullness is judged before this clock's read
      begin
        int total;
        total = committed.size() + tentative.size();
        if (r) begin exp_rd = committed.pop_front(); n_read++; end
        if (rb) begin
          tentative.delete();
          m_ovf = 0;
          n_rollback++;
        end else begin
          if (w && total < DEPTH) tentative.push_back(wr_data);
          if (c) begin
            foreach (tentative[i]) committed.push_back(tentative[i]);
            tentative.delete();
            m_ovf = 0;
            n_commit++;
          end else if (w && total >= DEPTH) begin
            m_ovf = 1;
            n_ovf++;
          end
        end
      end
    end
    @(negedge clk);
    wr_en = 0; commit = 0; rollback = 0; rd_en = 0;
    check(n_commit > 0 && n_rollback > 0 && n_ovf > 0 && n_read > 0, "all operations seen");
    $display("commits %0d rollbacks %0d overflows %0d reads %0d", n_commit, n_rollback, n_ovf, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
