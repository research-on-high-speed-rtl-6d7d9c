// tb_tte_rgmii_top: end-to-end test of the TT end node with a small packet
// cache (8 words) so that an overflow can be provoked. A PC model sends TT
// frames on the receive nibble interface and collects the frames the node
// sends back on the transmit interface; every echoed frame is compared byte
// for byte with a reference frame built from the configured addresses.
// Mechanisms made to happen and counted: echo of a good frame, zero padding
// of short data, discard on CRC error, discard on a header mismatch
// (false_en), discard while the cache is busy, discard on cache overflow and
// a board-address change through the configuration port.
module tb_tte_rgmii_top;
  import tt_pkg::*;
  import tt_tb_pkg::*;

  localparam int FD = 8;

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

  tte_rgmii_top #(.FIFO_DEPTH (FD)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  int m_echo = 0, m_pad = 0, m_crc = 0, m_false = 0, m_busy = 0, m_ovf = 0, m_cfg = 0;

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

  initial begin
    bq_t d, d2;
    logic [15:0] c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    read_cfg();

    // short frame: echoed with zero padding
    d = rand_data(12);
    drive(to_board(d, 0));
    expect_echo(d);
    wait_tx_idle();
    compare_tx();
    m_echo++; m_pad++;

    // frame that exactly fills the cache
    d = rand_data(4 * FD);
    drive(to_board(d, 0));
    expect_echo(d);
    wait_tx_idle();
    compare_tx();
    m_echo++;
    check(rx_src_mac == pmac && rx_src_ip == pip && rx_src_port == pport, "captured PC fields");

    // overflow: more data than the cache holds
    c0 = cnt_rx_ovf_drop;
    drive(to_board(rand_data(4 * FD + 5), 0));
    wait_tx_idle();
    compare_tx();
    check(cnt_rx_ovf_drop == c0 + 1, "overflow counted");
    if (cnt_rx_ovf_drop == c0 + 1) m_ovf++;

    // CRC error
    c0 = cnt_rx_crc_err;
    drive(to_board(rand_data(20), 1));
    wait_tx_idle();
    compare_tx();
    check(cnt_rx_crc_err == c0 + 1, "CRC error counted");
    if (cnt_rx_crc_err == c0 + 1) m_crc++;

    // header mismatch
    c0 = cnt_rx_false;
    drive(build_frame(bmac ^ 48'h0100, pmac, TT_ETHER_TYPE, pip, bip, pport, bport, 0, rand_data(8), 0));
    drive(build_frame(bmac, pmac, 16'h0800, pip, bip, pport, bport, 0, rand_data(8), 0));
    wait_tx_idle();
    compare_tx();
    check(cnt_rx_false == c0 + 2, "header mismatches counted");
    if (cnt_rx_false == c0 + 2) m_false++;

    // back-to-back frames: the second arrives while the first is echoed
    c0 = cnt_rx_busy_drop;
    d = rand_data(24);
    d2 = rand_data(24);
    drive(to_board(d, 0));
    expect_echo(d);
    drive(to_board(d2, 0));
    wait_tx_idle();
    compare_tx();
    check(cnt_rx_busy_drop == c0 + 1, "busy drop counted");
    if (cnt_rx_busy_drop == c0 + 1) m_busy++;
    // after the cache is free again a frame is accepted
    drive(to_board(d2, 0));
    expect_echo(d2);
    wait_tx_idle();
    compare_tx();
    m_echo++;

    // new board MAC through the configuration port
    begin
      logic [47:0] old_mac;
      old_mac = bmac;
      cfg_write(0, 32'h02AA_BBCC);
      cfg_write(1, 32'h0000_DD01);
      read_cfg();
      check(bmac == 48'h02AA_BBCC_DD01, "configured board MAC");
      c0 = cnt_rx_false;
      drive(build_frame(old_mac, pmac, TT_ETHER_TYPE, pip, bip, pport, bport, 0, rand_data(8), 0));
      d = rand_data(19);
      drive(to_board(d, 0));
      expect_echo(d);
      wait_tx_idle();
      compare_tx();
      check(cnt_rx_false == c0 + 1, "old MAC refused");
      check(rx_vl_id == 16'hDD01, "virtual link of the new address");
      if (cnt_rx_false == c0 + 1) m_cfg++;
    end

    check(cnt_tx_sent == 16'(n_sent), "sent counter");
    check(cnt_rx_ok == 16'(n_sent), "receive-ok counter");
    $display("mechanisms: echo %0d pad %0d crc %0d false %0d busy %0d ovf %0d cfg %0d",
             m_echo, m_pad, m_crc, m_false, m_busy, m_ovf, m_cfg);
    check(m_echo > 0 && m_pad > 0 && m_crc > 0 && m_false > 0 && m_busy > 0 && m_ovf > 0 && m_cfg > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
