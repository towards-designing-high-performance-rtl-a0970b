// period_timer - issues a one-cycle `tick` every PERIOD_CYCLES clocks while
// `en` is high.
//
// The test packets of the Ethernet designs are sent once per second, so the
// default period is one second of the 100 MHz system clock; the 10 Mbps
// sender overrides it with one second of its 20 MHz clock. The first tick
// comes PERIOD_CYCLES cycles after `en` rises; dropping `en` restarts the
// count.
module period_timer #(
  parameter int unsigned PERIOD_CYCLES = 100_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tick
);
  localparam int unsigned W = $clog2(PERIOD_CYCLES + 1);
  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == W'(PERIOD_CYCLES - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
