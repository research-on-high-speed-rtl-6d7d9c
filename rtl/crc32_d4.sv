// crc32_d4: Ethernet CRC-32 computed four bits per clock.
//
// The frame check sequence of a TT frame is the IEEE 802.3 CRC-32
// (polynomial 0x04C11DB7). Data arrives low nibble first and each nibble is
// taken least significant bit first, so the register uses the reflected
// polynomial 0xEDB88320 and shifts right. The four single-bit steps of a
// nibble are unrolled into one combinational update.
//
// Interface: `clr` loads 0xFFFFFFFF (it wins over `en`); `en` folds `din`
// into the register at the clock edge. `crc` is the raw register: the FCS to
// transmit is its bitwise inverse, sent from bit 0 upwards one nibble at a
// time, and after a whole frame including its FCS the register equals
// 0xDEBB20E3 (`residue_ok`). Latency: one clock per nibble.
//
// The document names a cyclic-redundancy-check module but not its insides;
// the nibble-wide form matches the 4-bit data path of the rest of the design.
module crc32_d4
  import tt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [3:0]  din,
  output logic [31:0] crc,
  output logic        residue_ok
);

  function automatic logic [31:0] crc_step4(input logic [31:0] c, input logic [3:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 4; i++) begin
      if (r[0] ^ d[i]) r = (r >> 1) ^ CRC_POLY_REFL;
      else             r = r >> 1;
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   crc <= CRC_INIT;
    else if (clr) crc <= CRC_INIT;
    else if (en)  crc <= crc_step4(crc, din);
  end

  assign residue_ok = (crc == CRC_RESIDUE);

endmodule
