// tt_pack_frame: TT frame encapsulation, the node's receive path.
//
// Takes the 4-bit PHY receive stream (tte_rx_data, qualified by tte_rxdv, one
// nibble per clock, low nibble of each byte first), recognises a
// time-triggered frame and hands its user data on as 32-bit words.
//
// The inputs are first registered once. Nibble pairs are then joined into
// bytes {second, first} and a six-state machine walks the frame:
//   IDLE       waits for tte_rxdv to rise with a preamble nibble 0x5
//   FRAME_HEAD preamble nibbles 0x5 until the delimiter nibble 0xD, which
//              aligns the byte boundary
//   ETH_HEAD   destination MAC must equal the board MAC (mac_flag), source MAC
//              is captured, EtherType must be 0x88D7
//   UDP_HEAD   20-byte IPv4 header and 8-byte UDP header: protocol UDP,
//              destination IP and port must be the board's, header checksum
//              must be valid; source IP/port and the UDP length are captured
//   REC_DATA   user data bytes, packed first byte in bits [31:24], emitted
//              with a one-cycle rec_en per word (a last partial word is
//              zero-filled); padding and FCS bytes that follow are only
//              fed to the CRC
//   REC_END    tte_rxdv has fallen: one-cycle rec_end with rec_ok
// A field mismatch raises false_en for one cycle and returns to IDLE, which
// then ignores the rest of that frame until tte_rxdv falls. A frame that ends
// before REC_DATA simply returns to IDLE; rec_end is raised only for frames
// that reached REC_DATA, because only those wrote data words.
// The CRC-32 runs over every nibble from the destination MAC to the end of
// the FCS; rec_ok requires the CRC residue, all data bytes and a whole number
// of bytes.
//
// Timing: a word leaves 2 clocks after its last nibble entered; rec_end comes
// 3 clocks after tte_rxdv falls.
//
// The state names, the 0x88D7 check, the MAC comparison, the input register
// stage and the end of frame on tte_rxdv low follow the document. The IP,
// port and checksum checks, the CRC check on receive and the exact
// output handshake are this design's choices.
module tt_pack_frame
  import tt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // PHY side
  input  logic [3:0]       tte_rx_data,
  input  logic             tte_rxdv,
  // parameters
  input  logic [47:0]      board_mac,
  input  logic [31:0]      board_ip,
  input  logic [15:0]      board_port,
  // data out
  output logic [31:0]      rec_data,
  output logic             rec_en,
  output logic             rec_end,
  output logic             rec_ok,
  output logic [LEN_W-1:0] rec_byte_num,
  // captured frame parameters
  output logic [15:0]      vl_id,
  output logic [47:0]      src_mac,
  output logic [31:0]      src_ip,
  output logic [15:0]      src_port,
  // status
  output logic             false_en,
  output logic             crc_err
);

  typedef enum logic [2:0] {
    IDLE, FRAME_HEAD, ETH_HEAD, UDP_HEAD, REC_DATA, REC_END
  } pstate_t;

  pstate_t state, state_nx;

  // input register stage
  logic [3:0] rx_d;
  logic       rxdv_d, rxdv_dd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_d    <= '0;
      rxdv_d  <= 1'b0;
      rxdv_dd <= 1'b0;
    end else begin
      rx_d    <= tte_rx_data;
      rxdv_d  <= tte_rxdv;
      rxdv_dd <= rxdv_d;
    end
  end

  // byte assembly
  logic       nib_phase;
  logic [3:0] nib_lo;
  logic [7:0] data;      // assembled byte
  logic       sj_flag;   // a whole byte is available this cycle
  logic       in_frame;
  assign in_frame = (state == ETH_HEAD) || (state == UDP_HEAD) || (state == REC_DATA);
  assign data     = {rx_d, nib_lo};
  assign sj_flag  = in_frame && rxdv_d && nib_phase;

  logic [4:0]       byte_cnt;   // byte index within ETH_HEAD / UDP_HEAD
  logic [LEN_W-1:0] data_cnt;   // data bytes received
  logic [15:0]      ip_sum;
  logic             mac_flag;
  logic [15:0]      hdr_word;   // current 16-bit big-endian word in the header
  logic [7:0]       hdr_hi;

  // CRC
  logic [31:0] crc_val;
  logic        crc_res_ok;
  crc32_d4 u_crc (
    .clk, .rst_n,
    .clr (state == FRAME_HEAD),
    .en  (in_frame && rxdv_d),
    .din (rx_d),
    .crc (crc_val),
    .residue_ok (crc_res_ok)
  );

  // header field checks, evaluated on each byte
  logic bad_byte;
  always_comb begin
    bad_byte = 1'b0;
    hdr_word = {hdr_hi, data};
    if (sj_flag && state == ETH_HEAD) begin
      if (byte_cnt < 5'd6 && data != board_mac[8*(5-byte_cnt[2:0]) +: 8]) bad_byte = 1'b1;
      if (byte_cnt == 5'd12 && data != TT_ETHER_TYPE[15:8]) bad_byte = 1'b1;
      if (byte_cnt == 5'd13 && data != TT_ETHER_TYPE[7:0])  bad_byte = 1'b1;
    end
    if (sj_flag && state == UDP_HEAD) begin
      unique case (byte_cnt)
        5'd0:  if (data != IP_VER_IHL)   bad_byte = 1'b1;
        5'd9:  if (data != IP_PROTO_UDP) bad_byte = 1'b1;
        5'd16, 5'd17, 5'd18, 5'd19:
               if (data != board_ip[8*(19-byte_cnt) +: 8]) bad_byte = 1'b1;
        5'd23: if (hdr_word != board_port) bad_byte = 1'b1;
        5'd25: if (hdr_word < 16'(UDP_HDR_LEN) || hdr_word > 16'(UDP_HDR_LEN + MAX_DATA_BYTES))
                 bad_byte = 1'b1;
        default: ;
      endcase
      // IPv4 header checksum: ones-complement sum of all ten words is 0xFFFF
      if (byte_cnt == 5'd19 && ones_add(ip_sum, hdr_word) != 16'hFFFF) bad_byte = 1'b1;
    end
  end

  assign false_en = bad_byte;

  logic data_done;
  assign data_done = (data_cnt == rec_byte_num);

  always_comb begin
    state_nx = state;
    unique case (state)
      IDLE:       if (rxdv_d && !rxdv_dd && rx_d == PREAMBLE_BYTE[3:0]) state_nx = FRAME_HEAD;
      FRAME_HEAD: if (!rxdv_d)                                state_nx = IDLE;
                  else if (rx_d == SFD_BYTE[7:4])             state_nx = ETH_HEAD;
                  else if (rx_d != PREAMBLE_BYTE[3:0])        state_nx = IDLE;
      ETH_HEAD:   if (!rxdv_d || bad_byte)                    state_nx = IDLE;
                  else if (sj_flag && byte_cnt == 5'd13 && mac_flag) state_nx = UDP_HEAD;
      UDP_HEAD:   if (!rxdv_d || bad_byte)                    state_nx = IDLE;
                  else if (sj_flag && byte_cnt == 5'd27)      state_nx = REC_DATA;
      REC_DATA:   if (!rxdv_d)                                state_nx = REC_END;
      REC_END:                                                state_nx = IDLE;
      default:                                                state_nx = IDLE;
    endcase
  end

  logic [31:0] word_buf, word_nx;
  logic [1:0]  wb_idx;
  logic [1:0]  wb_pos;   // byte lane of the current data byte
  assign wb_pos = ~wb_idx;
  always_comb begin
    word_nx = (wb_idx == 2'd0) ? 32'd0 : word_buf;
    word_nx[8*wb_pos +: 8] = data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      nib_phase    <= 1'b0;
      nib_lo       <= '0;
      byte_cnt     <= '0;
      data_cnt     <= '0;
      ip_sum       <= '0;
      hdr_hi       <= '0;
      mac_flag     <= 1'b0;
      word_buf     <= '0;
      wb_idx       <= '0;
      rec_data     <= '0;
      rec_en       <= 1'b0;
      rec_end      <= 1'b0;
      rec_ok       <= 1'b0;
      crc_err      <= 1'b0;
      rec_byte_num <= '0;
      vl_id        <= '0;
      src_mac      <= '0;
      src_ip       <= '0;
      src_port     <= '0;
    end else begin
      state   <= state_nx;
      rec_en  <= 1'b0;
      rec_end <= 1'b0;
      crc_err <= 1'b0;

      if (state != state_nx) begin
        byte_cnt  <= '0;
        nib_phase <= 1'b0;
      end else if (in_frame && rxdv_d) begin
        nib_phase <= ~nib_phase;
        if (!nib_phase) nib_lo <= rx_d;
        if (sj_flag) byte_cnt <= byte_cnt + 5'd1;
      end
      if (sj_flag) hdr_hi <= data;

      unique case (state)
        IDLE: begin
          mac_flag <= 1'b0;
        end
        FRAME_HEAD: begin
          data_cnt <= '0;
          wb_idx   <= '0;
          ip_sum   <= '0;
        end
        ETH_HEAD: if (sj_flag) begin
          if (byte_cnt == 5'd5) begin
            mac_flag <= !bad_byte;
            vl_id    <= board_mac[15:0];
          end
          if (byte_cnt >= 5'd6 && byte_cnt < 5'd12)
            src_mac <= {src_mac[39:0], data};
        end
        UDP_HEAD: if (sj_flag) begin
          if (byte_cnt[0] && byte_cnt < 5'd20) ip_sum <= ones_add(ip_sum, hdr_word);
          if (byte_cnt >= 5'd12 && byte_cnt < 5'd16) src_ip <= {src_ip[23:0], data};
          if (byte_cnt == 5'd21) src_port <= hdr_word;
          if (byte_cnt == 5'd25) begin
            rec_byte_num <= LEN_W'(hdr_word - 16'(UDP_HDR_LEN));
          end
        end
        REC_DATA: begin
          if (sj_flag && !data_done) begin
            data_cnt <= data_cnt + 1'b1;
            wb_idx   <= wb_idx + 2'd1;
            word_buf <= word_nx;
            if (wb_idx == 2'd3 || data_cnt == rec_byte_num - 1'b1) begin
              rec_data <= word_nx;
              rec_en   <= 1'b1;
            end
          end
          if (!rxdv_d) begin
            rec_end <= 1'b1;
            rec_ok  <= crc_res_ok && data_done && !nib_phase;
            crc_err <= !crc_res_ok;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
