// eth_pkg - constants and helper functions shared by the Ethernet blocks.
//
// Holds the IEEE 802.3 framing constants (preamble, start-of-frame
// delimiter, minimum and maximum frame sizes, inter-frame gap), the
// EtherType and IP protocol numbers used by the UDP/ARP packet generator,
// the reflected CRC-32 byte update used for the frame check sequence and
// the register map of the MAC's Wishbone slave. The framing numbers come
// from the Ethernet standard; the register map is this design's own.
package eth_pkg;

  // Framing (IEEE 802.3). Sizes count bytes from destination MAC to FCS.
  localparam logic [7:0]  PREAMBLE_BYTE  = 8'h55;
  localparam logic [7:0]  SFD_BYTE       = 8'hD5;
  localparam int unsigned PREAMBLE_LEN   = 7;
  localparam int unsigned MIN_FRAME      = 64;    // including FCS
  localparam int unsigned MIN_PAYLOAD    = 60;    // MIN_FRAME without FCS
  localparam int unsigned MAX_FRAME      = 1518;  // including FCS
  localparam int unsigned IFG_BYTES      = 12;    // 96 bit times
  localparam logic [31:0] CRC_RESIDUE    = 32'hDEBB20E3;

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [15:0] ETHERTYPE_ARP  = 16'h0806;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'h11;

  // Kind of test packet built by pkt_gen.
  typedef enum logic {PKT_UDP = 1'b0, PKT_ARP = 1'b1} pkt_kind_e;

  // Status of a received frame, reported at its end.
  typedef struct packed {
    logic        good;       // FCS correct and length in range
    logic        crc_err;
    logic        too_short;  // fewer than MIN_FRAME bytes
    logic        too_long;   // more than the maximum length
    logic [10:0] length;     // bytes received after the SFD, saturating
  } rx_status_t;

  // Wishbone register map of the MAC (word addresses, wb_adr[4:2]).
  localparam logic [2:0] REG_CTRL    = 3'd0;  // [0] TX_EN [1] RX_EN [2] PAD_EN
  localparam logic [2:0] REG_MAC_LO  = 3'd1;  // MAC address bytes 2..5
  localparam logic [2:0] REG_MAC_HI  = 3'd2;  // MAC address bytes 0..1 in [15:0]
  localparam logic [2:0] REG_TX_CMD  = 3'd3;  // W: [10:0] length, [31] start; R: [31] busy
  localparam logic [2:0] REG_RX_STAT = 3'd4;  // R: status; W: [31]=1 releases the RX buffer
  localparam logic [2:0] REG_COUNT   = 3'd5;  // R: [15:0] frames sent, [31:16] frames received

  // One byte of the reflected CRC-32 (polynomial 0x04C11DB7, LSB first).
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] data);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ data[i]) c = (c >> 1) ^ 32'hEDB88320;
      else                c = c >> 1;
    end
    return c;
  endfunction

  // Byte n (0 = first sent) of the FCS for a CRC register value.
  function automatic logic [7:0] fcs_byte(input logic [31:0] crc, input logic [1:0] n);
    logic [31:0] f;
    f = ~crc;
    return f[8*n +: 8];
  endfunction

endpackage
