// mii_tx_if - MII transmit adapter: turns the byte stream of mac_tx into
// nibbles on TXD[3:0]/TX_EN, paced by the PHY's TX_CLK.
//
// The MAC runs on the 100 MHz system clock. TX_CLK (25 MHz at 100 Mbps,
// 2.5 MHz at 10 Mbps) is brought in through two synchroniser flops and its
// rising edges are detected; each rising edge moves out one nibble, low
// nibble first, so TXD changes about 30 ns after the PHY's sampling edge and
// is stable at the next one. Every second edge pulses `byte_tick`, at which
// mac_tx's byte is taken. MII itself follows the text; sampling TX_CLK in
// the system clock domain is this design's own choice and needs the system
// clock to be at least four times TX_CLK.
module mii_tx_if (
  input  logic       clk,
  input  logic       rst,
  input  logic       mii_tx_clk,
  output logic [3:0] mii_txd,
  output logic       mii_tx_en,
  output logic       byte_tick,
  input  logic       tx_valid,
  input  logic [7:0] tx_data
);
  logic [2:0] csync;
  logic       rise;
  logic       phase;       // 0: next edge starts a byte
  logic [3:0] hi_nib;
  logic       hi_en;

  assign rise      = csync[1] & ~csync[2];
  assign byte_tick = rise & ~phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      csync     <= '0;
      phase     <= 1'b0;
      hi_nib    <= '0;
      hi_en     <= 1'b0;
      mii_txd   <= '0;
      mii_tx_en <= 1'b0;
    end else begin
      csync <= {csync[1:0], mii_tx_clk};
      if (rise) begin
        phase <= ~phase;
        if (!phase) begin
          mii_txd   <= tx_valid ? tx_data[3:0] : 4'h0;
          mii_tx_en <= tx_valid;
          hi_nib    <= tx_data[7:4];
          hi_en     <= tx_valid;
        end else begin
          mii_txd   <= hi_en ? hi_nib : 4'h0;
          mii_tx_en <= hi_en;
        end
      end
    end
  end
endmodule
