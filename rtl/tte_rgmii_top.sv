// tte_rgmii_top: time-triggered end-node transmission control.
//
// Connects the node's receive path, packet cache, send path and parameter
// registers around the 4-bit RGMII-side data interface:
//   tte_rx_data/tte_rxdv -> tt_pack_frame -> pkt_fifo -> tt_unpack_frame
//                                                      -> tte_tx_data/tte_tx_en
//   tt_config supplies the board and PC addresses to both paths.
// A frame addressed to the board is unpacked into 32-bit data words that are
// written to the cache as they arrive. When the frame ends, the words are
// committed if the CRC and all fields were good and the cache did not
// overflow; otherwise they are rolled back and the frame is discarded. A
// committed packet is then sent back to the PC as a new TT frame with the
// same data, which is how the node's send and receive paths are exercised
// together. The cache holds one packet: a frame that arrives while a packet
// is still waiting or being sent is discarded whole.
//
// Besides the PHY and configuration ports, the received words (rec_*) and a
// set of event counters are brought out for observation.
//
// Timing: one nibble per clock in each direction, so a 250 MHz clock (or a
// 125 MHz clock with double-data-rate pads) gives 1000 Mbit/s. The echo
// starts 7 clocks after the first clock edge that samples tte_rxdv low.
//
// The module set and the 4-bit interface follow the document; the echo
// between the two paths, the commit/rollback policy and the counters are
// this design's choices.
module tte_rgmii_top
  import tt_pkg::*;
#(
  parameter int          FIFO_DEPTH = 512,
  parameter logic [47:0] BOARD_MAC  = 48'h00_0A_35_01_FE_C0,
  parameter logic [47:0] PC_MAC     = 48'hE8_6A_64_C3_54_10,
  parameter logic [31:0] BOARD_IP   = {8'd192, 8'd168, 8'd0, 8'd234},
  parameter logic [31:0] PC_IP      = {8'd192, 8'd168, 8'd0, 8'd102},
  parameter logic [15:0] BOARD_PORT = 16'd1234,
  parameter logic [15:0] PC_PORT    = 16'd1234
) (
  input  logic             clk,
  input  logic             rst_n,
  // PHY receive / transmit (4 bits per clock)
  input  logic [3:0]       tte_rx_data,
  input  logic             tte_rxdv,
  output logic [3:0]       tte_tx_data,
  output logic             tte_tx_en,
  // parameter configuration
  input  logic             cfg_we,
  input  logic [2:0]       cfg_addr,
  input  logic [31:0]      cfg_wdata,
  output logic [31:0]      cfg_rdata,
  // received data, for observation
  output logic [31:0]      rec_data,
  output logic             rec_en,
  output logic             rec_end,
  output logic             rec_ok,
  output logic [LEN_W-1:0] rec_byte_num,
  // parameters captured from the last frame addressed to the board
  output logic [15:0]      rx_vl_id,
  output logic [47:0]      rx_src_mac,
  output logic [31:0]      rx_src_ip,
  output logic [15:0]      rx_src_port,
  // event counters
  output logic [15:0]      cnt_rx_ok,
  output logic [15:0]      cnt_rx_false,
  output logic [15:0]      cnt_rx_crc_err,
  output logic [15:0]      cnt_rx_busy_drop,
  output logic [15:0]      cnt_rx_ovf_drop,
  output logic [15:0]      cnt_tx_sent
);

  net_cfg_t cfg;

  tt_config #(
    .BOARD_MAC (BOARD_MAC), .PC_MAC (PC_MAC), .BOARD_IP (BOARD_IP),
    .PC_IP (PC_IP), .BOARD_PORT (BOARD_PORT), .PC_PORT (PC_PORT)
  ) u_config (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg
  );

  logic        false_en, crc_err;

  tt_pack_frame u_pack (
    .clk, .rst_n,
    .tte_rx_data, .tte_rxdv,
    .board_mac  (cfg.board_mac),
    .board_ip   (cfg.board_ip),
    .board_port (cfg.board_port),
    .rec_data, .rec_en, .rec_end, .rec_ok, .rec_byte_num,
    .vl_id (rx_vl_id), .src_mac (rx_src_mac), .src_ip (rx_src_ip), .src_port (rx_src_port),
    .false_en, .crc_err
  );

  // packet cache control
  logic pkt_pending;    // a committed packet waits or is being sent
  logic words_seen;     // the current frame has written words
  logic rx_take;        // the current frame is being cached
  logic take_now;
  logic fifo_ovf, fifo_empty, fifo_full;
  logic commit, rollback;
  logic read_data_req;
  logic [31:0] send_data;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  assign take_now = words_seen ? rx_take : !pkt_pending;
  assign commit   = rec_end && take_now && rec_ok && !fifo_ovf;
  assign rollback = rec_end && take_now && !(rec_ok && !fifo_ovf);

  pkt_fifo #(.DATA_W (32), .DEPTH (FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en    (rec_en && take_now),
    .wr_data  (rec_data),
    .commit, .rollback,
    .rd_en    (read_data_req),
    .rd_data  (send_data),
    .empty    (fifo_empty),
    .full     (fifo_full),
    .ovf      (fifo_ovf),
    .rd_count (fifo_count)
  );

  logic             send_en, send_busy, send_end, send_started;
  logic [LEN_W-1:0] tx_len;

  tt_unpack_frame u_unpack (
    .clk, .rst_n,
    .send_en, .tx_byte_num (tx_len), .busy (send_busy), .send_end,
    .board_mac  (cfg.board_mac),  .pc_mac  (cfg.pc_mac),
    .board_ip   (cfg.board_ip),   .pc_ip   (cfg.pc_ip),
    .board_port (cfg.board_port), .pc_port (cfg.pc_port),
    .read_data_req, .send_data,
    .tte_tx_data, .tte_tx_en
  );

  assign send_en = pkt_pending && !send_started && !send_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_pending      <= 1'b0;
      send_started     <= 1'b0;
      words_seen       <= 1'b0;
      rx_take          <= 1'b0;
      tx_len           <= '0;
      cnt_rx_ok        <= '0;
      cnt_rx_false     <= '0;
      cnt_rx_crc_err   <= '0;
      cnt_rx_busy_drop <= '0;
      cnt_rx_ovf_drop  <= '0;
      cnt_tx_sent      <= '0;
    end else begin
      if (rec_en && !words_seen) begin
        words_seen <= 1'b1;
        rx_take    <= !pkt_pending;
      end
      if (false_en) cnt_rx_false <= cnt_rx_false + 16'd1;
      if (rec_end) begin
        words_seen <= 1'b0;
        if (!take_now)          cnt_rx_busy_drop <= cnt_rx_busy_drop + 16'd1;
        else if (crc_err)       cnt_rx_crc_err   <= cnt_rx_crc_err + 16'd1;
        else if (fifo_ovf)      cnt_rx_ovf_drop  <= cnt_rx_ovf_drop + 16'd1;
        else if (rec_ok)        cnt_rx_ok        <= cnt_rx_ok + 16'd1;
        if (commit) begin
          pkt_pending <= 1'b1;
          tx_len      <= rec_byte_num;
        end
      end
      if (send_en) send_started <= 1'b1;
      if (send_end) begin
        pkt_pending  <= 1'b0;
        send_started <= 1'b0;
        cnt_tx_sent  <= cnt_tx_sent + 16'd1;
      end
    end
  end

  // the send path never asks for more words than were committed
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
                                  read_data_req |-> !fifo_empty)
    else $error("tte_rgmii_top: send path read an empty cache");

endmodule
