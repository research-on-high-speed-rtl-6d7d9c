// tb_tt_pack_frame: drives TT frames nibble by nibble into the receive path
// and checks the 32-bit data words, the data length, the captured source
// fields, rec_ok, the CRC error flag and false_en for every header field the
// path checks. Also checks the byte rate (one data word per 8 clocks) and
// the latencies of the first word and of rec_end.
module tb_tt_pack_frame;
  import tt_pkg::*;
  import tt_tb_pkg::*;

  localparam logic [47:0] BMAC = 48'h00_0A_35_01_FE_C0;
  localparam logic [47:0] PMAC = 48'hE8_6A_64_C3_54_10;
  localparam logic [31:0] BIP  = 32'hC0A8_00EA;
  localparam logic [31:0] PIP  = 32'hC0A8_0066;
  localparam logic [15:0] BPORT = 16'd1234;
  localparam logic [15:0] PPORT = 16'd4321;

  logic clk = 0, rst_n = 0;
  logic [3:0] tte_rx_data = 0;
  logic tte_rxdv = 0;
  logic [31:0] rec_data;
  logic rec_en, rec_end, rec_ok, false_en, crc_err;
  logic [LEN_W-1:0] rec_byte_num;
  logic [15:0] vl_id, src_port;
  logic [47:0] src_mac;
  logic [31:0] src_ip;
  int checks = 0, failures = 0;

  tt_pack_frame dut (
    .clk, .rst_n, .tte_rx_data, .tte_rxdv,
    .board_mac (BMAC), .board_ip (BIP), .board_port (BPORT),
    .rec_data, .rec_en, .rec_end, .rec_ok, .rec_byte_num,
    .vl_id, .src_mac, .src_ip, .src_port, .false_en, .crc_err);

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

  // monitor
  int cyc = 0;
  logic [31:0] words[$];
  int word_cyc[$];
  int n_end = 0, n_false = 0, n_crc = 0, end_cyc = 0;
  logic last_ok;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rec_en) begin words.push_back(rec_data); word_cyc.push_back(cyc); end
    if (rec_end) begin n_end++; last_ok = rec_ok; end_cyc = cyc; end
    if (false_en) n_false++;
    if (crc_err) n_crc++;
  end

  int start_cyc, fall_cyc;
  task automatic drive(input bq_t f, input int nibbles);
    int n;
    n = 0;
    @(posedge clk);
    start_cyc = cyc;
    foreach (f[i]) for (int k = 0; k < 2; k++) begin
      if (n < nibbles) begin
        tte_rxdv    <= 1;
        tte_rx_data <= k ? f[i][7:4] : f[i][3:0];
        @(posedge clk);
      end
      n++;
    end
    tte_rxdv <= 0;
    tte_rx_data <= 0;
    fall_cyc = cyc;
    repeat (24) @(posedge clk);
  endtask

  task automatic good_frame(input int len);
    bq_t d, f;
    int e0, nw;
    d = rand_data(len);
    f = build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT, 16'(len), d, 0);
    words.delete(); word_cyc.delete();
    e0 = n_end;
    drive(f, 2 * f.size());
    nw = (len + 3) / 4;
    check(n_end == e0 + 1, $sformatf("len %0d: one rec_end", len));
    check(last_ok, $sformatf("len %0d: rec_ok", len));
    check(rec_byte_num == LEN_W'(len), $sformatf("len %0d: rec_byte_num %0d", len, rec_byte_num));
    check(words.size() == nw, $sformatf("len %0d: %0d words", len, words.size()));
    for (int w = 0; w < nw && w < words.size(); w++)
      check(words[w] == word_of(d, w), $sformatf("len %0d word %0d: %h vs %h", len, w, words[w], word_of(d, w)));
    check(src_mac == PMAC && src_ip == PIP && src_port == PPORT && vl_id == BMAC[15:0], "captured fields");
    // timing: first word 2 clocks after its last nibble (nibble 2*54-1 of the frame)
    if (nw > 0) check(word_cyc[0] - start_cyc == 2*54 + 2 - (len < 4 ? 2*(4-len) : 0),
                      $sformatf("len %0d: first word at %0d", len, word_cyc[0] - start_cyc));
    for (int w = 1; w < nw - 1; w++)
      check(word_cyc[w] - word_cyc[w-1] == 8, "one word per 8 clocks");
    check(end_cyc - fall_cyc == 3, $sformatf("rec_end %0d clocks after rxdv falls", end_cyc - fall_cyc));
  endtask

  task automatic bad_frame(input bq_t f, input string what, input bit expect_false);
    int e0, f0;
    e0 = n_end; f0 = n_false;
    words.delete();
    drive(f, 2 * f.size());
    if (expect_false) begin
      check(n_false == f0 + 1, {what, ": false_en"});
      check(n_end == e0, {what, ": no rec_end"});
      check(words.size() == 0, {what, ": no words"});
    end
  endtask

  initial begin
    bq_t d, f;
    int c0;
    int lens[12] = '{0, 1, 3, 4, 5, 12, 17, 18, 19, 46, 101, 1472};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    foreach (lens[i]) good_frame(lens[i]);
    for (int t = 0; t < 10; t++) good_frame($urandom_range(1, 200));

    d = rand_data(20);
    // CRC error: data words come out but rec_ok is low
    c0 = n_crc;
    words.delete();
    f = build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT, 16'd1, d, 1);
    drive(f, 2 * f.size());
    check(n_crc == c0 + 1 && !last_ok, "bad FCS: crc_err, rec_ok low");
    // corrupted data byte also fails the CRC
    f = build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT, 16'd1, d, 0);
    f[60] ^= 8'h10;
    drive(f, 2 * f.size());
    check(n_crc == c0 + 2 && !last_ok, "corrupted data: crc_err");
    // field mismatches
    bad_frame(build_frame(BMAC ^ 48'h1, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT, 0, d, 0), "wrong MAC", 1);
    bad_frame(build_frame(BMAC, PMAC, 16'h0800, PIP, BIP, PPORT, BPORT, 0, d, 0), "wrong type", 1);
    bad_frame(build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP ^ 32'h100, PPORT, BPORT, 0, d, 0), "wrong IP", 1);
    bad_frame(build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT + 16'd1, 0, d, 0), "wrong port", 1);
    f = build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT, 0, d, 0);
    f[8 + 14 + 11] ^= 8'h01;   // IP header checksum low byte
    bad_frame(refresh_fcs(f), "IP checksum", 1);
    f = build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT, 0, d, 0);
    f[8 + 14 + 9] = 8'd6;      // protocol TCP
    bad_frame(refresh_fcs(f), "protocol", 1);
    // truncated inside the Ethernet header: nothing, then a good frame works
    c0 = n_end;
    drive(f, 40);
    check(n_end == c0, "truncated header: no rec_end");
    // truncated inside the data: rec_end with rec_ok low
    f = build_frame(BMAC, PMAC, TT_ETHER_TYPE, PIP, BIP, PPORT, BPORT, 0, rand_data(40), 0);
    drive(f, 2 * (8 + 14 + 28 + 10));
    check(n_end == c0 + 1 && !last_ok, "truncated data: rec_ok low");
    good_frame(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
