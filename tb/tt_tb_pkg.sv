// tt_tb_pkg: reference models shared by the testbenches.
//
// Builds time-triggered frames byte by byte and computes their CRC-32 and
// IPv4 checksum with code written independently of the RTL: the CRC here
// uses the non-reflected, MSB-first form of the Ethernet polynomial with
// explicit bit reversal, where the RTL uses the reflected, nibble-wide form.
package tt_tb_pkg;

  typedef logic [7:0] bq_t[$];

  function automatic logic [7:0] rev8(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = b[7-i];
    return r;
  endfunction

  function automatic logic [31:0] rev32(input logic [31:0] v);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = v[31-i];
    return r;
  endfunction

  // Ethernet FCS value of a byte string (as transmitted, lowest byte first)
  function automatic logic [31:0] ref_fcs(input bq_t q);
    logic [31:0] c;
    logic [7:0]  b;
    c = 32'hFFFF_FFFF;
    foreach (q[i]) begin
      b = rev8(q[i]);
      for (int k = 7; k >= 0; k--) begin
        if (c[31] ^ b[k]) c = (c << 1) ^ 32'h04C1_1DB7;
        else              c = c << 1;
      end
    end
    return ~rev32(c);
  endfunction

  function automatic logic [15:0] ip_checksum(input bq_t h);
    logic [31:0] s;
    s = 0;
    for (int i = 0; i < h.size(); i += 2) s += {h[i], h[i+1]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  // Whole frame from the first preamble byte to the last FCS byte.
  // Data shorter than 18 bytes is padded with zero bytes; the IP and UDP
  // length fields carry the real data length.
  function automatic bq_t build_frame(
      input logic [47:0] dmac, input logic [47:0] smac, input logic [15:0] etype,
      input logic [31:0] sip, input logic [31:0] dip,
      input logic [15:0] sport, input logic [15:0] dport,
      input logic [15:0] ip_id, input bq_t data, input bit bad_fcs);
    bq_t f, h, body;
    logic [15:0] tl, ul, ck;
    logic [31:0] fcs;
    tl = 16'(data.size() + 28);
    ul = 16'(data.size() + 8);
    h = '{8'h45, 8'h00, tl[15:8], tl[7:0], ip_id[15:8], ip_id[7:0], 8'h40, 8'h00,
          8'h40, 8'h11, 8'h00, 8'h00,
          sip[31:24], sip[23:16], sip[15:8], sip[7:0],
          dip[31:24], dip[23:16], dip[15:8], dip[7:0]};
    ck = ip_checksum(h);
    h[10] = ck[15:8];
    h[11] = ck[7:0];
    for (int i = 5; i >= 0; i--) body.push_back(dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) body.push_back(smac[8*i +: 8]);
    body.push_back(etype[15:8]);
    body.push_back(etype[7:0]);
    foreach (h[i]) body.push_back(h[i]);
    body.push_back(sport[15:8]); body.push_back(sport[7:0]);
    body.push_back(dport[15:8]); body.push_back(dport[7:0]);
    body.push_back(ul[15:8]);    body.push_back(ul[7:0]);
    body.push_back(8'h00);       body.push_back(8'h00);
    foreach (data[i]) body.push_back(data[i]);
    for (int i = data.size(); i < 18; i++) body.push_back(8'h00);
    fcs = ref_fcs(body);
    if (bad_fcs) fcs = fcs ^ 32'h0000_0100;
    for (int i = 0; i < 4; i++) body.push_back(fcs[8*i +: 8]);
    for (int i = 0; i < 7; i++) f.push_back(8'h55);
    f.push_back(8'hD5);
    foreach (body[i]) f.push_back(body[i]);
    return f;
  endfunction

  // recompute the FCS of a frame built above after a header byte was changed
  function automatic bq_t refresh_fcs(input bq_t f);
    bq_t body;
    logic [31:0] fcs;
    for (int i = 8; i < f.size() - 4; i++) body.push_back(f[i]);
    fcs = ref_fcs(body);
    for (int i = 0; i < 4; i++) f[f.size() - 4 + i] = fcs[8*i +: 8];
    return f;
  endfunction

  function automatic bq_t rand_data(input int n);
    bq_t d;
    for (int i = 0; i < n; i++) d.push_back(8'($urandom));
    return d;
  endfunction

  // data bytes as the 32-bit words the RTL exchanges (first byte in [31:24])
  function automatic logic [31:0] word_of(input bq_t d, input int w);
    logic [31:0] r;
    r = 0;
    for (int k = 0; k < 4; k++)
      if (4*w + k < d.size()) r[8*(3-k) +: 8] = d[4*w + k];
    return r;
  endfunction

endpackage
