// tb_ref_pkg - reference models for the testbenches: CRC-32, IPv4 header
// checksum and the expected UDP and ARP test frames, written independently
// of the RTL (bit-serial CRC over a whole byte queue, frames assembled from
// their protocol fields).
package tb_ref_pkg;

  typedef byte unsigned bq_t[$];

  // Bit-serial CRC-32 of IEEE 802.3 using the normal (non-reflected)
  // polynomial with the bits of each byte taken LSB first; returns the FCS
  // value as sent (least significant byte first).
  function automatic logic [31:0] ref_fcs(bq_t d);
    logic [31:0] r;
    logic [31:0] out;
    r = 32'hFFFFFFFF;
    foreach (d[k]) begin
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = r[31] ^ d[k][b];
        r  = {r[30:0], 1'b0};
        if (fb) r = r ^ 32'h04C11DB7;
      end
    end
    for (int i = 0; i < 32; i++) out[i] = ~r[31 - i];
    return out;
  endfunction

  function automatic bq_t with_fcs(bq_t d);
    bq_t q;
    logic [31:0] f;
    q = d;
    f = ref_fcs(d);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    return q;
  endfunction

  function automatic void push_n(ref bq_t q, input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction

  function automatic logic [15:0] ip_csum(bq_t h);
    int unsigned s;
    s = 0;
    for (int i = 0; i < h.size(); i += 2) s += {h[i], h[i+1]};
    while (s > 16'hFFFF) s = (s & 16'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  // Expected UDP test frame (no preamble, no FCS).
  function automatic bq_t ref_udp(logic [47:0] smac, logic [47:0] dmac, logic [31:0] sip,
                                  logic [31:0] dip, logic [15:0] sport, logic [15:0] dport,
                                  int payload, logic [31:0] seq);
    bq_t f, ip;
    logic [15:0] c;
    push_n(f, dmac, 6); push_n(f, smac, 6); push_n(f, 16'h0800, 2);
    push_n(ip, 16'h4500, 2); push_n(ip, 20 + 8 + payload, 2); push_n(ip, seq[15:0], 2);
    push_n(ip, 16'h4000, 2); push_n(ip, 8'd64, 1); push_n(ip, 8'd17, 1); push_n(ip, 16'h0000, 2);
    push_n(ip, sip, 4); push_n(ip, dip, 4);
    c = ip_csum(ip);
    ip[10] = c[15:8]; ip[11] = c[7:0];
    foreach (ip[i]) f.push_back(ip[i]);
    push_n(f, sport, 2); push_n(f, dport, 2); push_n(f, 8 + payload, 2); push_n(f, 0, 2);
    push_n(f, seq, 4);
    for (int i = 4; i < payload; i++) f.push_back(byte'(i));
    return f;
  endfunction

  // Expected ARP request frame (no preamble, no padding, no FCS).
  function automatic bq_t ref_arp(logic [47:0] smac, logic [31:0] sip, logic [31:0] dip);
    bq_t f;
    push_n(f, 48'hFFFF_FFFF_FFFF, 6); push_n(f, smac, 6); push_n(f, 16'h0806, 2);
    push_n(f, 16'h0001, 2); push_n(f, 16'h0800, 2); push_n(f, 8'd6, 1); push_n(f, 8'd4, 1);
    push_n(f, 16'h0001, 2); push_n(f, smac, 6); push_n(f, sip, 4);
    push_n(f, 48'h0, 6); push_n(f, dip, 4);
    return f;
  endfunction

  function automatic bq_t pad60(bq_t d);
    bq_t q;
    q = d;
    while (q.size() < 60) q.push_back(8'h00);
    return q;
  endfunction

  // Default addresses used by the designs.
  localparam logic [47:0] D_SMAC = 48'h02_00_00_00_00_01;
  localparam logic [31:0] D_SIP  = 32'hC0A8010A;
  localparam logic [31:0] D_DIP  = 32'hC0A80101;

endpackage
