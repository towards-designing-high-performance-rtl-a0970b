// pkt_ram - simple dual-port packet RAM, one byte per address.
//
// Port A writes (`we`, `waddr`, `wdata`); port B reads with one clock of
// latency (`raddr` in, `rdata` valid the next cycle), the block-RAM style
// the FPGA offers. The design uses two of them, one holding the frame to be
// transmitted and one the frame received, as the text describes. The
// default of 2048 bytes holds one frame of up to 1518 bytes; the size is
// this design's choice.
module pkt_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
