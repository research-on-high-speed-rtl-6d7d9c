// tt_unpack_frame: TT frame decapsulation, the node's send path.
//
// Builds a complete time-triggered frame around tx_byte_num bytes of user
// data and drives it onto the 4-bit PHY transmit interface, one nibble per
// clock, low nibble of each byte first, qualified by tte_tx_en.
//
// A seven-state machine produces the frame:
//   IDLE        waits for a one-cycle send_en, latching the data length
//   CHECK_SUM   two clocks computing the IPv4 header checksum
//   PACKET_HEAD 7 bytes 0x55 and the delimiter 0xD5
//   ETH_HEAD    destination = PC MAC, source = board MAC, type 0x88D7
//   IP_UDP_HEAD 20-byte IPv4 header (PC IP destination, board IP source) and
//               8-byte UDP header (board port to PC port, checksum 0)
//   SEND_DATA   user data, then zero bytes up to the 18-byte minimum; the IP
//               and UDP lengths carry the real data length, so the padding is
//               ignored by the receiver
//   CRC         the four FCS bytes; send_end is raised when cnt_send_bit is 7
// tte_tx_en is high in every state except IDLE and CHECK_SUM.
//
// Data handshake: user data come as 32-bit words, first byte in bits [31:24].
// read_data_req is a one-cycle request; send_data must hold the requested
// word from the next clock until the request after it (a registered FIFO
// read port does this). Requests are made two clocks before the word's first
// nibble goes out, one per started word, ceil(tx_byte_num/4) in all.
//
// Timing: tte_tx_en rises 3 clocks after send_en and stays high for
// 2*(8 + 14 + 28 + max(N,18) + 4) clocks; send_end is high during the clock
// that computes the last nibble, which appears on tte_tx_data one clock later.
//
// The states, the 0x88D7 type, the address placement, the 18-byte minimum,
// the read request and the send_end rule follow the document. Zero padding,
// the IPv4 field values and an identification field counting frames are this
// design's choices.
module tt_unpack_frame
  import tt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             send_en,
  input  logic [LEN_W-1:0] tx_byte_num,
  output logic             busy,
  output logic             send_end,
  // parameters
  input  logic [47:0]      board_mac,
  input  logic [47:0]      pc_mac,
  input  logic [31:0]      board_ip,
  input  logic [31:0]      pc_ip,
  input  logic [15:0]      board_port,
  input  logic [15:0]      pc_port,
  // data in
  output logic             read_data_req,
  input  logic [31:0]      send_data,
  // PHY side
  output logic [3:0]       tte_tx_data,
  output logic             tte_tx_en
);

  typedef enum logic [2:0] {
    IDLE, CHECK_SUM, PACKET_HEAD, ETH_HEAD, IP_UDP_HEAD, SEND_DATA, CRC
  } ustate_t;

  ustate_t state;

  logic [LEN_W-1:0] len_q;       // user data bytes
  logic [LEN_W-1:0] pay_bytes;   // bytes in SEND_DATA (with padding)
  logic [LEN_W-1:0] byte_cnt;
  logic             nib_phase;
  logic [2:0]       cnt_send_bit;
  logic [15:0]      ip_id;
  logic [15:0]      ip_total_len, udp_len;
  logic [19:0]      sum_acc;
  logic [15:0]      ip_chk;
  logic [31:0]      word_reg;
  logic             chk_step;

  assign ip_total_len = 16'(len_q) + 16'(IP_HDR_LEN + UDP_HDR_LEN);
  assign udp_len      = 16'(len_q) + 16'(UDP_HDR_LEN);
  assign pay_bytes    = (len_q < LEN_W'(MIN_DATA_BYTES)) ? LEN_W'(MIN_DATA_BYTES) : len_q;
  assign busy         = (state != IDLE);

  logic [1:0] byte_lane;   // lane of the current data byte in word_reg
  assign byte_lane = ~byte_cnt[1:0];

  // byte being sent in the current state
  logic [7:0] cur_byte;
  always_comb begin
    cur_byte = 8'h00;
    unique case (state)
      PACKET_HEAD: cur_byte = (byte_cnt == LEN_W'(PREAMBLE_LEN)) ? SFD_BYTE : PREAMBLE_BYTE;
      ETH_HEAD: begin
        if (byte_cnt < 6)       cur_byte = pc_mac[8*(5 - byte_cnt) +: 8];
        else if (byte_cnt < 12) cur_byte = board_mac[8*(11 - byte_cnt) +: 8];
        else if (byte_cnt == 12) cur_byte = TT_ETHER_TYPE[15:8];
        else                    cur_byte = TT_ETHER_TYPE[7:0];
      end
      IP_UDP_HEAD: begin
        unique case (byte_cnt[4:0])
          5'd0:  cur_byte = IP_VER_IHL;
          5'd1:  cur_byte = IP_TOS;
          5'd2:  cur_byte = ip_total_len[15:8];
          5'd3:  cur_byte = ip_total_len[7:0];
          5'd4:  cur_byte = ip_id[15:8];
          5'd5:  cur_byte = ip_id[7:0];
          5'd6:  cur_byte = IP_FLAGS_FRAG[15:8];
          5'd7:  cur_byte = IP_FLAGS_FRAG[7:0];
          5'd8:  cur_byte = IP_TTL;
          5'd9:  cur_byte = IP_PROTO_UDP;
          5'd10: cur_byte = ip_chk[15:8];
          5'd11: cur_byte = ip_chk[7:0];
          5'd12, 5'd13, 5'd14, 5'd15: cur_byte = board_ip[8*(15 - byte_cnt[4:0]) +: 8];
          5'd16, 5'd17, 5'd18, 5'd19: cur_byte = pc_ip[8*(19 - byte_cnt[4:0]) +: 8];
          5'd20: cur_byte = board_port[15:8];
          5'd21: cur_byte = board_port[7:0];
          5'd22: cur_byte = pc_port[15:8];
          5'd23: cur_byte = pc_port[7:0];
          5'd24: cur_byte = udp_len[15:8];
          5'd25: cur_byte = udp_len[7:0];
          default: cur_byte = 8'h00;   // UDP checksum not used
        endcase
      end
      SEND_DATA: cur_byte = (byte_cnt < len_q) ? word_reg[8*byte_lane +: 8] : 8'h00;
      default: cur_byte = 8'h00;
    endcase
  end

  // state lengths in bytes (last byte index)
  logic [LEN_W-1:0] last_byte;
  always_comb begin
    unique case (state)
      PACKET_HEAD: last_byte = LEN_W'(PREAMBLE_LEN);
      ETH_HEAD:    last_byte = LEN_W'(ETH_HDR_LEN - 1);
      IP_UDP_HEAD: last_byte = LEN_W'(IP_HDR_LEN + UDP_HDR_LEN - 1);
      SEND_DATA:   last_byte = pay_bytes - 1'b1;
      default:     last_byte = '0;
    endcase
  end

  // CRC over destination MAC .. end of data
  logic [31:0] crc_val;
  logic        crc_res_ok;
  logic [3:0]  cur_nib;
  logic        crc_feed;
  assign cur_nib  = nib_phase ? cur_byte[7:4] : cur_byte[3:0];
  assign crc_feed = (state == ETH_HEAD) || (state == IP_UDP_HEAD) || (state == SEND_DATA);
  crc32_d4 u_crc (
    .clk, .rst_n,
    .clr (state == CHECK_SUM),
    .en  (crc_feed),
    .din (cur_nib),
    .crc (crc_val),
    .residue_ok (crc_res_ok)
  );

  // word fetch: request on the first nibble of the byte before a word, load
  // on its second nibble
  logic fetch_slot;
  always_comb begin
    fetch_slot = 1'b0;
    if (state == IP_UDP_HEAD && byte_cnt == last_byte && len_q != '0)
      fetch_slot = 1'b1;
    if (state == SEND_DATA && byte_cnt[1:0] == 2'd3 && (byte_cnt + 1'b1) < len_q)
      fetch_slot = 1'b1;
  end
  assign read_data_req = fetch_slot && !nib_phase;

  assign send_end = (state == CRC) && (cnt_send_bit == 3'd7);

  logic byte_last_nib;
  assign byte_last_nib = nib_phase && (byte_cnt == last_byte);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      len_q        <= '0;
      byte_cnt     <= '0;
      nib_phase    <= 1'b0;
      cnt_send_bit <= '0;
      ip_id        <= '0;
      sum_acc      <= '0;
      ip_chk       <= '0;
      word_reg     <= '0;
      chk_step     <= 1'b0;
      tte_tx_data  <= '0;
      tte_tx_en    <= 1'b0;
    end else begin
      tte_tx_en   <= !(state == IDLE || state == CHECK_SUM);
      tte_tx_data <= (state == CRC) ? ~crc_val[4*cnt_send_bit +: 4] : cur_nib;

      if (fetch_slot && nib_phase) word_reg <= send_data;

      if (state inside {PACKET_HEAD, ETH_HEAD, IP_UDP_HEAD, SEND_DATA}) begin
        nib_phase <= ~nib_phase;
        if (nib_phase) byte_cnt <= byte_last_nib ? '0 : byte_cnt + 1'b1;
      end

      unique case (state)
        IDLE: if (send_en) begin
          len_q    <= tx_byte_num;
          chk_step <= 1'b0;
          state    <= CHECK_SUM;
        end
        CHECK_SUM: begin
          chk_step <= 1'b1;
          if (!chk_step) begin
            sum_acc <= 20'({IP_VER_IHL, IP_TOS}) + 20'(ip_total_len) + 20'(ip_id)
                     + 20'(IP_FLAGS_FRAG) + 20'({IP_TTL, IP_PROTO_UDP})
                     + 20'(board_ip[31:16]) + 20'(board_ip[15:0])
                     + 20'(pc_ip[31:16]) + 20'(pc_ip[15:0]);
          end else begin
            ip_chk    <= ~ones_add(sum_acc[15:0], {12'd0, sum_acc[19:16]});
            byte_cnt  <= '0;
            nib_phase <= 1'b0;
            state     <= PACKET_HEAD;
          end
        end
        PACKET_HEAD: if (byte_last_nib) state <= ETH_HEAD;
        ETH_HEAD:    if (byte_last_nib) state <= IP_UDP_HEAD;
        IP_UDP_HEAD: if (byte_last_nib) state <= SEND_DATA;
        SEND_DATA:   if (byte_last_nib) begin
          state        <= CRC;
          cnt_send_bit <= '0;
        end
        CRC: begin
          cnt_send_bit <= cnt_send_bit + 3'd1;
          if (cnt_send_bit == 3'd7) begin
            ip_id    <= ip_id + 16'd1;
            state    <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // the length must fit one frame
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          (send_en && state == IDLE) |-> tx_byte_num <= LEN_W'(MAX_DATA_BYTES))
    else $error("tt_unpack_frame: tx_byte_num above one frame");

endmodule
