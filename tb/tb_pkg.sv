// tb_pkg -- reference models shared by the testbenches.
//
// Written independently of the RTL: the CRCs are computed from a 256-entry
// table built at run time from the generator polynomial, and each function
// is checked against the published check values of "123456789"
// (CRC-32/BZIP2, the AAL5 variant: 0xFC891918; CRC-32 as used by the
// 802.11 FCS: 0xCBF43926) and the HEC of the idle cell header (0x52).
// The AAL3/4 SAR-PDU builder computes its CRC-10 by polynomial long
// division, a different method from the RTL's bit-serial update.
package tb_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic logic [31:0] ref_crc32_msb(bytes_t d);
    logic [31:0] tbl [256];
    logic [31:0] c;
    for (int i = 0; i < 256; i++) begin
      c = 32'(i) << 24;
      for (int j = 0; j < 8; j++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
      tbl[i] = c;
    end
    c = 32'hFFFFFFFF;
    foreach (d[i]) c = (c << 8) ^ tbl[c[31:24] ^ d[i]];
    return ~c;
  endfunction

  function automatic logic [31:0] ref_crc32_lsb(bytes_t d);
    logic [31:0] tbl [256];
    logic [31:0] c;
    for (int i = 0; i < 256; i++) begin
      c = 32'(i);
      for (int j = 0; j < 8; j++) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
      tbl[i] = c;
    end
    c = 32'hFFFFFFFF;
    foreach (d[i]) c = (c >> 8) ^ tbl[c[7:0] ^ d[i]];
    return ~c;
  endfunction

  function automatic logic [7:0] ref_hec(logic [31:0] h);
    logic [7:0] c;
    c = 0;
    for (int i = 31; i >= 0; i--) c = (c[7] ^ h[i]) ? ((c << 1) ^ 8'h07) : (c << 1);
    return c ^ 8'h55;
  endfunction

  // AAL5 CPCS-PDU of a packet: data, zero pad, UU=0, CPI=0, length, CRC
  function automatic bytes_t ref_aal5_pdu(bytes_t pkt);
    bytes_t p;
    int n;
    logic [31:0] c;
    p = pkt;
    n = pkt.size();
    while ((p.size() + 8) % 48 != 0) p.push_back(8'h00);
    p.push_back(8'h00); p.push_back(8'h00);
    p.push_back(8'(n >> 8)); p.push_back(8'(n));
    c = ref_crc32_msb(p);
    for (int b = 3; b >= 0; b--) p.push_back(c[8*b +: 8]);
    return p;
  endfunction

  // AAL3/4 SAR-PDU: 2-byte header {ST, SN, MID}, 44 bytes, 2-byte trailer
  // {LI, CRC-10}. The CRC is the remainder of the first 374 bits times x^10
  // divided by x^10 + x^9 + x^5 + x^4 + x + 1 (long division, bit by bit).
  function automatic bytes_t ref_sar34(logic [1:0] st, logic [3:0] sn, logic [9:0] mid,
                                       bytes_t sdu);
    bytes_t p;
    logic [5:0]  li;
    logic [10:0] r;
    li = 6'(sdu.size());
    p.push_back({st, sn, mid[9:8]});
    p.push_back(mid[7:0]);
    for (int i = 0; i < 44; i++) p.push_back(i < sdu.size() ? sdu[i] : 8'h00);
    r = '0;
    for (int i = 0; i < 46 * 8 + 6 + 10; i++) begin
      bit b;
      if (i < 368)      b = p[i / 8][7 - i % 8];
      else if (i < 374) b = li[5 - (i - 368)];
      else              b = 1'b0;
      r = {r[9:0], b};
      if (r[10]) r = r ^ 11'h633;
    end
    p.push_back({li, r[9:8]});
    p.push_back(r[7:0]);
    return p;
  endfunction

  // number of failed self checks of the reference functions
  function automatic int ref_selftest();
    bytes_t s;
    int f;
    f = 0;
    s = {8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    if (ref_crc32_msb(s) != 32'hFC891918) f++;
    if (ref_crc32_lsb(s) != 32'hCBF43926) f++;
    if (ref_hec(32'h00000001) != 8'h52) f++;
    return f;
  endfunction

endpackage
