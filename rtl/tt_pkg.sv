// tt_pkg: constants and types shared by the time-triggered (TT) frame
// encapsulation and decapsulation paths.
//
// A TT frame is an Ethernet frame with EtherType 0x88D7:
//   7 x 0x55 preamble, 0xD5 start-of-frame delimiter, 6-byte destination MAC
//   (its low 16 bits carry the virtual-link number), 6-byte source MAC,
//   2-byte type 0x88D7, a payload of at least 46 bytes made of a 20-byte IPv4
//   header, an 8-byte UDP header and the user data (padded to at least 18
//   bytes), and a 4-byte CRC-32 frame check sequence.
// On the wire bytes travel low nibble first, one nibble per clock.
// The frame layout follows the document; the IPv4 field values marked below
// (identification, flags, TTL) are this design's own choice.
package tt_pkg;

  localparam logic [7:0]  PREAMBLE_BYTE  = 8'h55;
  localparam logic [7:0]  SFD_BYTE       = 8'hD5;
  localparam int          PREAMBLE_LEN   = 7;
  localparam logic [15:0] TT_ETHER_TYPE  = 16'h88D7;
  localparam int          ETH_HDR_LEN    = 14;   // dst + src + type
  localparam int          IP_HDR_LEN     = 20;
  localparam int          UDP_HDR_LEN    = 8;
  localparam int          MIN_PAYLOAD    = 46;
  localparam int          MIN_DATA_BYTES = MIN_PAYLOAD - IP_HDR_LEN - UDP_HDR_LEN; // 18
  localparam int          MAX_DATA_BYTES = 1500 - IP_HDR_LEN - UDP_HDR_LEN;        // 1472
  localparam int          LEN_W          = 11;   // enough for 1472

  // IPv4 header constants (this design's choice where the document is silent)
  localparam logic [7:0]  IP_VER_IHL     = 8'h45;
  localparam logic [7:0]  IP_TOS         = 8'h00;
  localparam logic [15:0] IP_FLAGS_FRAG  = 16'h4000;  // don't fragment
  localparam logic [7:0]  IP_TTL         = 8'h40;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;

  // CRC-32 of Ethernet, reflected form
  localparam logic [31:0] CRC_POLY_REFL  = 32'hEDB88320;
  localparam logic [31:0] CRC_INIT       = 32'hFFFF_FFFF;
  localparam logic [31:0] CRC_RESIDUE    = 32'hDEBB_20E3;  // register after data+FCS

  // Network parameters held by the configuration block
  typedef struct packed {
    logic [47:0] board_mac;
    logic [47:0] pc_mac;
    logic [31:0] board_ip;
    logic [31:0] pc_ip;
    logic [15:0] board_port;
    logic [15:0] pc_port;
  } net_cfg_t;

  // One's-complement 16-bit add with end-around carry
  function automatic logic [15:0] ones_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
