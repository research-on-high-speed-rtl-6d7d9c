// tb_tt_unpack_frame: asks the send path for frames of many data lengths,
// answers its read requests from a registered word queue, reassembles the
// nibbles on tte_tx_data and compares every byte (addresses, IPv4 and UDP
// headers with checksum, data, zero padding, FCS) with an independently
// built reference frame. Also checks the frame length in clocks, the number
// of read requests, the send_end position and the start latency.
module tb_tt_unpack_frame;
  import tt_pkg::*;
  import tt_tb_pkg::*;

  localparam logic [47:0] BMAC = 48'h00_0A_35_01_FE_C0;
  localparam logic [47:0] PMAC = 48'hE8_6A_64_C3_54_10;
  localparam logic [31:0] BIP  = 32'hC0A8_00EA;
  localparam logic [31:0] PIP  = 32'hC0A8_0066;
  localparam logic [15:0] BPORT = 16'd1234;
  localparam logic [15:0] PPORT = 16'd4321;

  logic clk = 0, rst_n = 0;
  logic send_en = 0, busy, send_end, read_data_req, tte_tx_en;
  logic [LEN_W-1:0] tx_byte_num = 0;
  logic [31:0] send_data = 0;
  logic [3:0] tte_tx_data;
  int checks = 0, failures = 0;

  tt_unpack_frame dut (
    .clk, .rst_n, .send_en, .tx_byte_num, .busy, .send_end,
    .board_mac (BMAC), .pc_mac (PMAC), .board_ip (BIP), .pc_ip (PIP),
    .board_port (BPORT), .pc_port (PPORT),
    .read_data_req, .send_data, .tte_tx_data, .tte_tx_en);

  always #5 clk = ~clk;

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

  // word source with a registered read port; garbage until first read
  logic [31:0] src_q[$];
  int n_req = 0;
  always @(posedge clk) if (read_data_req) begin
    n_req++;
    send_data <= (src_q.size() > 0) ? src_q.pop_front() : 32'hDEAD_BEEF;
  end

  // capture
  int cyc = 0;
  logic [3:0] nibs[$];
  int en_first = -1, en_last = -1, end_cyc = -1, n_end = 0, en_rises = 0;
  logic en_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_d <= tte_tx_en;
    if (tte_tx_en) begin
      nibs.push_back(tte_tx_data);
      if (!en_d) begin en_first = cyc; en_rises++; end
      en_last = cyc;
    end
    if (send_end) begin end_cyc = cyc; n_end++; end
  end

  int frame_no = 0;
  task automatic send(input int len);
    bq_t d, exp_f, got;
    int s_cyc, req0, e0, r0;
    d = rand_data(len);
    src_q.delete();
    for (int w = 0; w < (len + 3) / 4; w++) src_q.push_back(word_of(d, w));
    nibs.delete();
    req0 = n_req; e0 = n_end; r0 = en_rises;
    @(posedge clk);
    send_en <= 1; tx_byte_num <= LEN_W'(len);
    s_cyc = cyc;
    @(posedge clk);
    send_en <= 0;
    #1 check(busy, "busy after send_en");
    wait (n_end == e0 + 1);
    repeat (4) @(posedge clk);
    check(!busy, "idle after frame");
    exp_f = build_frame(PMAC, BMAC, TT_ETHER_TYPE, BIP, PIP, BPORT, PPORT, 16'(frame_no), d, 0);
    for (int i = 0; i + 1 < nibs.size(); i += 2) got.push_back({nibs[i+1], nibs[i]});
    check(nibs.size() == 2 * exp_f.size(), $sformatf("len %0d: %0d nibbles, want %0d", len, nibs.size(), 2*exp_f.size()));
    check(en_rises == r0 + 1, "one contiguous tte_tx_en burst");
    check(en_last - en_first + 1 == 2 * (8 + 14 + 28 + (len < 18 ? 18 : len) + 4), "frame clocks");
    for (int i = 0; i < exp_f.size() && i < got.size(); i++)
      if (got[i] != exp_f[i]) begin
        check(0, $sformatf("len %0d byte %0d: %h vs %h", len, i, got[i], exp_f[i]));
        break;
      end
    check(got == exp_f, $sformatf("len %0d: whole frame", len));
    check(n_req - req0 == (len + 3) / 4, $sformatf("len %0d: %0d requests", len, n_req - req0));
    check(en_first - s_cyc == 5, $sformatf("start latency %0d", en_first - s_cyc));
    check(en_last - end_cyc == 1, "send_end one clock before the last nibble leaves");
    frame_no++;
  endtask

  initial begin
    int lens[14] = '{0, 1, 2, 3, 4, 5, 12, 17, 18, 19, 20, 46, 255, 1472};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    foreach (lens[i]) send(lens[i]);
    for (int t = 0; t < 10; t++) send($urandom_range(1, 300));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
