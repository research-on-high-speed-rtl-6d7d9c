// tt_config: network-parameter registers of the TT end node.
//
// Holds the addresses the encapsulation and decapsulation paths use: the
// board's MAC, IP and UDP port (the node itself) and the PC's MAC, IP and
// UDP port (the peer). Reset loads the parameter defaults; a host then may
// overwrite any field through a simple 32-bit register write port.
//
// Register map (cfg_addr):
//   0 board MAC [47:16]   1 board MAC [15:0] (wdata[15:0])
//   2 PC MAC [47:16]      3 PC MAC [15:0]    (wdata[15:0])
//   4 board IP            5 PC IP
//   6 {board port, PC port}
// Reads are combinational (cfg_rdata), writes take effect at the next clock.
//
// The document names a configuration module for the network parameters but
// gives neither its register map nor its write protocol: both are this
// design's choice, as are the default addresses.
module tt_config
  import tt_pkg::*;
#(
  parameter logic [47:0] BOARD_MAC  = 48'h00_0A_35_01_FE_C0,
  parameter logic [47:0] PC_MAC     = 48'hE8_6A_64_C3_54_10,
  parameter logic [31:0] BOARD_IP   = {8'd192, 8'd168, 8'd0, 8'd234},
  parameter logic [31:0] PC_IP      = {8'd192, 8'd168, 8'd0, 8'd102},
  parameter logic [15:0] BOARD_PORT = 16'd1234,
  parameter logic [15:0] PC_PORT    = 16'd1234
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [2:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output net_cfg_t    cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.board_mac  <= BOARD_MAC;
      cfg.pc_mac     <= PC_MAC;
      cfg.board_ip   <= BOARD_IP;
      cfg.pc_ip      <= PC_IP;
      cfg.board_port <= BOARD_PORT;
      cfg.pc_port    <= PC_PORT;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        3'd0: cfg.board_mac[47:16] <= cfg_wdata;
        3'd1: cfg.board_mac[15:0]  <= cfg_wdata[15:0];
        3'd2: cfg.pc_mac[47:16]    <= cfg_wdata;
        3'd3: cfg.pc_mac[15:0]     <= cfg_wdata[15:0];
        3'd4: cfg.board_ip         <= cfg_wdata;
        3'd5: cfg.pc_ip            <= cfg_wdata;
        3'd6: {cfg.board_port, cfg.pc_port} <= cfg_wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (cfg_addr)
      3'd0:    cfg_rdata = cfg.board_mac[47:16];
      3'd1:    cfg_rdata = {16'd0, cfg.board_mac[15:0]};
      3'd2:    cfg_rdata = cfg.pc_mac[47:16];
      3'd3:    cfg_rdata = {16'd0, cfg.pc_mac[15:0]};
      3'd4:    cfg_rdata = cfg.board_ip;
      3'd5:    cfg_rdata = cfg.pc_ip;
      3'd6:    cfg_rdata = {cfg.board_port, cfg.pc_port};
      default: cfg_rdata = 32'd0;
    endcase
  end

endmodule
