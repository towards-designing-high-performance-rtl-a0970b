// pkt_gen - builds the fixed-size UDP and ARP test frames as a byte stream.
//
// A `start` pulse with `kind` = PKT_UDP or PKT_ARP latches a 32-bit sequence
// number and streams one frame, from the destination MAC address to the
// last payload byte, on a valid/ready byte interface; `m_last` marks the
// final byte. Preamble, padding and FCS are added later by mac_tx.
//
// UDP frame: Ethernet header, IPv4 header (no options, DF set, TTL 64,
// identification = low half of the sequence number, header checksum computed
// here), UDP header with checksum 0 (allowed for IPv4), then PAYLOAD_BYTES
// payload bytes: the sequence number (big endian) followed by the byte
// index. ARP frame: broadcast ARP request asking for DST_IP, 42 bytes, which
// mac_tx pads to the minimum size. That the design sends fixed-size UDP and
// ARP frames follows the text; addresses, ports, payload size and content
// are this design's choices. `start` is ignored while `busy`.
module pkt_gen
  import eth_pkg::*;
#(
  parameter logic [47:0] SRC_MAC       = 48'h02_00_00_00_00_01,
  parameter logic [47:0] DST_MAC       = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [31:0] SRC_IP        = {8'd192, 8'd168, 8'd1, 8'd10},
  parameter logic [31:0] DST_IP        = {8'd192, 8'd168, 8'd1, 8'd1},
  parameter logic [15:0] SRC_PORT      = 16'd5000,
  parameter logic [15:0] DST_PORT      = 16'd5000,
  parameter int unsigned PAYLOAD_BYTES = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  pkt_kind_e  kind,
  input  logic [31:0] seq,
  output logic       busy,
  output logic       m_valid,
  input  logic       m_ready,
  output logic [7:0] m_data,
  output logic       m_last
);
  localparam int unsigned HDR_BYTES = 42;   // Ethernet 14 + IPv4 20 + UDP 8, or 14 + ARP 28
  localparam int unsigned UDP_LEN   = HDR_BYTES + PAYLOAD_BYTES;
  localparam int unsigned ARP_LEN   = 42;
  localparam logic [15:0] IP_TOTAL  = 16'(20 + 8 + PAYLOAD_BYTES);
  localparam logic [15:0] UDP_TOTAL = 16'(8 + PAYLOAD_BYTES);

  initial assert (PAYLOAD_BYTES >= 4 && UDP_LEN <= MAX_FRAME - 4)
    else $error("pkt_gen: PAYLOAD_BYTES out of range");

  pkt_kind_e   kind_q;
  logic [31:0] seq_q;
  logic [10:0] idx;
  logic [10:0] len;

  // One's-complement checksum of the IPv4 header with a zero checksum field.
  function automatic logic [15:0] ip_checksum(input logic [15:0] ident);
    logic [31:0] s;
    s = 32'h4500 + 32'(IP_TOTAL) + 32'(ident) + 32'h4000 + 32'h4011
      + 32'(SRC_IP[31:16]) + 32'(SRC_IP[15:0]) + 32'(DST_IP[31:16]) + 32'(DST_IP[15:0]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    return ~s[15:0];
  endfunction

  function automatic logic [7:0] b48(input logic [47:0] v, input int unsigned i);
    return v[8*(5-i) +: 8];
  endfunction
  function automatic logic [7:0] b32(input logic [31:0] v, input int unsigned i);
    return v[8*(3-i) +: 8];
  endfunction
  function automatic logic [7:0] b16(input logic [15:0] v, input int unsigned i);
    return v[8*(1-i) +: 8];
  endfunction

  logic [15:0] csum;
  assign csum = ip_checksum(seq_q[15:0]);

  // Byte at position idx of the current frame.
  always_comb begin
    int unsigned i;
    i = 32'(idx);
    m_data = 8'h00;
    if (i < 6)       m_data = (kind_q == PKT_ARP) ? 8'hFF : b48(DST_MAC, i);
    else if (i < 12) m_data = b48(SRC_MAC, i - 6);
    else if (i < 14) m_data = b16((kind_q == PKT_ARP) ? ETHERTYPE_ARP : ETHERTYPE_IPV4, i - 12);
    else if (kind_q == PKT_ARP) begin
      unique case (i)
        14: m_data = 8'h00;  15: m_data = 8'h01;   // hardware type Ethernet
        16: m_data = 8'h08;  17: m_data = 8'h00;   // protocol type IPv4
        18: m_data = 8'h06;  19: m_data = 8'h04;   // address lengths
        20: m_data = 8'h00;  21: m_data = 8'h01;   // request
        default: begin
          if (i >= 22 && i < 28)      m_data = b48(SRC_MAC, i - 22);
          else if (i >= 28 && i < 32) m_data = b32(SRC_IP, i - 28);
          else if (i >= 32 && i < 38) m_data = 8'h00;  // target MAC unknown
          else if (i >= 38 && i < 42) m_data = b32(DST_IP, i - 38);
        end
      endcase
    end else begin
      unique case (i)
        14: m_data = 8'h45;  15: m_data = 8'h00;
        16: m_data = IP_TOTAL[15:8];  17: m_data = IP_TOTAL[7:0];
        18: m_data = seq_q[15:8];     19: m_data = seq_q[7:0];
        20: m_data = 8'h40;  21: m_data = 8'h00;   // don't fragment
        22: m_data = 8'h40;  23: m_data = IP_PROTO_UDP;
        24: m_data = csum[15:8];      25: m_data = csum[7:0];
        default: begin
          if (i >= 26 && i < 30)      m_data = b32(SRC_IP, i - 26);
          else if (i >= 30 && i < 34) m_data = b32(DST_IP, i - 30);
          else if (i >= 34 && i < 36) m_data = b16(SRC_PORT, i - 34);
          else if (i >= 36 && i < 38) m_data = b16(DST_PORT, i - 36);
          else if (i >= 38 && i < 40) m_data = b16(UDP_TOTAL, i - 38);
          else if (i >= 40 && i < 42) m_data = 8'h00;  // no UDP checksum
          else if (i >= 42 && i < 46) m_data = b32(seq_q, i - 42);
          else                        m_data = 8'(i - 42);
        end
      endcase
    end
  end

  assign m_valid = busy;
  assign m_last  = busy && (idx == len - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      idx    <= '0;
      len    <= '0;
      kind_q <= PKT_UDP;
      seq_q  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        idx    <= '0;
        kind_q <= kind;
        seq_q  <= seq;
        len    <= (kind == PKT_ARP) ? 11'(ARP_LEN) : 11'(UDP_LEN);
      end
    end else if (m_ready) begin
      if (m_last) busy <= 1'b0;
      idx <= idx + 1'b1;
    end
  end
endmodule
