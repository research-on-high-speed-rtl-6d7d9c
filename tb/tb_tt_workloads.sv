// tb_tt_workloads: the two frame sizes used to demonstrate the node.
//  1. A 124-nibble receive stream (62 bytes: preamble, Ethernet, IPv4/UDP
//     headers and 12 data bytes) with neither padding nor an FCS. The receive path
//     must still deliver the 3 data words and their byte count, flag the
//     frame as not good, and the node must send nothing back.
//  2. The same 12 data bytes, i.e. three 32-bit words, in a complete frame:
//     the node echoes them in a 72-byte frame padded to the 18-byte minimum.
// Default parameters of the node throughout.
module tb_tt_workloads;
  import tt_pkg::*;
  import tt_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] tte_rx_data = 0, tte_tx_data;
  logic tte_rxdv = 0, tte_tx_en;
  logic cfg_we = 0;
  logic [2:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic [31:0] rec_data;
  logic rec_en, rec_end, rec_ok;
  logic [LEN_W-1:0] rec_byte_num;
  logic [15:0] rx_vl_id, rx_src_port;
  logic [47:0] rx_src_mac;
  logic [31:0] rx_src_ip;
  logic [15:0] cnt_rx_ok, cnt_rx_false, cnt_rx_crc_err, cnt_rx_busy_drop, cnt_rx_ovf_drop, cnt_tx_sent;
  int checks = 0, failures = 0;
  localparam int ECHO_LAT = 7;

  tte_rgmii_top dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // addresses, read back from the configuration registers
  logic [47:0] bmac, pmac;
  logic [31:0] bip, pip;
  logic [15:0] bport, pport;

  task automatic cfg_read(input logic [2:0] a, output logic [31:0] v);
    @(negedge clk);
    cfg_addr = a;
    #1 v = cfg_rdata;
  endtask

  task automatic cfg_write(input logic [2:0] a, input logic [31:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic read_cfg();
    logic [31:0] v;
    cfg_read(0, v); bmac[47:16] = v;
    cfg_read(1, v); bmac[15:0]  = v[15:0];
    cfg_read(2, v); pmac[47:16] = v;
    cfg_read(3, v); pmac[15:0]  = v[15:0];
    cfg_read(4, bip);
    cfg_read(5, pip);
    cfg_read(6, v); {bport, pport} = v;
  endtask

  // PC side: collect transmitted frames
  bq_t tx_frames[$];
  bq_t cur;
  logic [3:0] lo;
  bit half = 0;
  logic en_d = 0;
  always @(posedge clk) begin
    en_d <= tte_tx_en && rst_n;
    if (tte_tx_en && rst_n) begin
      if (half) cur.push_back({tte_tx_data, lo});
      else lo = tte_tx_data;
      half = !half;
    end else if (en_d) begin
      tx_frames.push_back(cur);
      cur.delete();
      half = 0;
    end
  end

  task automatic drive(input bq_t f);
    foreach (f[i]) for (int k = 0; k < 2; k++) begin
      @(posedge clk);
      tte_rxdv    <= 1;
      tte_rx_data <= k ? f[i][7:4] : f[i][3:0];
    end
    @(posedge clk);
    tte_rxdv <= 0;
    tte_rx_data <= 0;
    repeat (24) @(posedge clk);   // inter-frame gap
  endtask

  function automatic bq_t to_board(input bq_t d, input bit bad_fcs);
    return build_frame(bmac, pmac, TT_ETHER_TYPE, pip, bip, pport, bport, 16'h1234, d, bad_fcs);
  endfunction

  int n_sent = 0;   // frames the node has sent so far (its IP id)
  bq_t expect_q[$];

  task automatic wait_tx_idle();
    repeat (20) @(posedge clk);
    while (dut.u_unpack.busy || dut.pkt_pending) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic expect_echo(input bq_t d);
    expect_q.push_back(build_frame(pmac, bmac, TT_ETHER_TYPE, bip, pip, bport, pport, 16'(n_sent), d, 0));
    n_sent++;
  endtask

  task automatic compare_tx();
    check(tx_frames.size() == expect_q.size(),
          $sformatf("%0d frames sent, %0d expected", tx_frames.size(), expect_q.size()));
    while (tx_frames.size() > 0 && expect_q.size() > 0) begin
      bq_t g, e;
      g = tx_frames.pop_front();
      e = expect_q.pop_front();
      check(g == e, $sformatf("echoed frame of %0d bytes matches (%0d got)", e.size(), g.size()));
    end
    tx_frames.delete();
    expect_q.delete();
  endtask

  // echo latency: clocks from the end of tte_rxdv to the start of tte_tx_en
  int cyc = 0, rx_fall = 0, tx_rise = 0;
  logic rxdv_q = 0, txen_q = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rxdv_q <= tte_rxdv;
    txen_q <= tte_tx_en && rst_n;
    if (rxdv_q && !tte_rxdv) rx_fall = cyc;
    if (!txen_q && tte_tx_en && rst_n) tx_rise = cyc;
  end

  logic [31:0] got_words[$];
  always @(posedge clk) if (rec_en && rst_n) got_words.push_back(rec_data);
  int n_end = 0;
  logic last_ok = 1;
  always @(posedge clk) if (rec_end && rst_n) begin n_end++; last_ok = rec_ok; end

  initial begin
    bq_t d, f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    read_cfg();
    d = rand_data(12);
    // 1. stream without FCS
    f = to_board(d, 0);
    for (int i = 0; i < 4 + 6; i++) void'(f.pop_back());   // FCS and padding
    check(2 * f.size() == 124, "124 nibbles");
    drive(f);
    wait_tx_idle();
    check(n_end == 1 && !last_ok, "frame end flagged not good");
    check(rec_byte_num == 12, "12 data bytes");
    check(got_words.size() == 3, "3 words");
    for (int w = 0; w < 3 && w < got_words.size(); w++)
      check(got_words[w] == word_of(d, w), $sformatf("word %0d", w));
    check(cnt_rx_crc_err == 1 && cnt_tx_sent == 0, "discarded, nothing sent");
    compare_tx();
    // 2. complete frame, 3 words echoed
    got_words.delete();
    drive(to_board(d, 0));
    expect_echo(d);
    check(expect_q[0].size() == 72, "72-byte echo");
    wait_tx_idle();
    check(got_words.size() == 3 && last_ok, "3 words, good frame");
    check(tx_rise - rx_fall == ECHO_LAT, $sformatf("echo latency %0d", tx_rise - rx_fall));
    compare_tx();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
