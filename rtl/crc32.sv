// crc32 - Ethernet frame check sequence generator and checker, one byte per
// enabled clock.
//
// The register starts at all ones on `init` and takes one byte per cycle in
// which `en` is high, using the reflected CRC-32 of IEEE 802.3 (bits enter
// least significant first). `fcs` is the complemented register, sent least
// significant byte first. When the received FCS has been fed through as
// well, the register holds the fixed residue 0xDEBB20E3 and `match` is high.
// `init` wins over `en`. Output is valid the cycle after the byte is taken.
module crc32
  import eth_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [31:0] crc,
  output logic [31:0] fcs,
  output logic        match
);
  always_ff @(posedge clk) begin
    if (rst || init) crc <= 32'hFFFFFFFF;
    else if (en)     crc <= crc32_byte(crc, data);
  end

  assign fcs   = ~crc;
  assign match = (crc == CRC_RESIDUE);
endmodule
