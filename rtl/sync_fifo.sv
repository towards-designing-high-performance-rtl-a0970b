// sync_fifo - single-clock first-in first-out buffer.
//
// DEPTH entries of WIDTH bits held in an array. A write with `wr_en` while
// not full stores `wr_data`; `rd_data` always shows the oldest entry and a
// read with `rd_en` while not empty removes it (first-word fall-through).
// `count` gives the number of entries held. Writing when full and reading
// when empty are ignored and flagged by assertions. The text names a FIFO
// between packet capture and the LCD state machine; its size and behaviour
// are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(wr_en && full))
    else $error("sync_fifo: write when full");
  assert property (@(posedge clk) disable iff (rst) !(rd_en && empty))
    else $error("sync_fifo: read when empty");
endmodule
