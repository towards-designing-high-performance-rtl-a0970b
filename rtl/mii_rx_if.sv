// mii_rx_if - MII receive adapter: preamble removal and SFD detection on
// RXD[3:0]/RX_DV, bytes out.
//
// RX_CLK, RX_DV and RXD pass through the same two synchroniser flops into
// the 100 MHz system clock domain, and the nibble is taken at the detected
// falling edge of RX_CLK, half a cycle away from the PHY's change of RXD.
// While RX_DV is high the FSM skips preamble nibbles (0x5) until it sees
// 0xD, the second nibble of the SFD; from the next nibble on, pairs of
// nibbles (low first) form the frame bytes on `m_valid`/`m_data`, the first
// marked by `m_sof`. When RX_DV falls, `m_eof` pulses for one cycle; an odd
// trailing nibble is dropped. Preamble removal follows the text; the rest is
// this design's own. The system clock must be at least four times RX_CLK.
module mii_rx_if (
  input  logic       clk,
  input  logic       rst,
  input  logic       mii_rx_clk,
  input  logic       mii_rx_dv,
  input  logic [3:0] mii_rxd,
  output logic       m_valid,
  output logic [7:0] m_data,
  output logic       m_sof,
  output logic       m_eof
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA} state_e;
  state_e     state;
  logic [2:0] csync;
  logic [1:0] dv_s;
  logic [3:0] d_s1, d_s2;
  logic       fall;
  logic       half;        // low nibble of the current byte held
  logic [3:0] lo_nib;
  logic       first;

  assign fall = csync[2] & ~csync[1];

  always_ff @(posedge clk) begin
    m_valid <= 1'b0;
    m_sof   <= 1'b0;
    m_eof   <= 1'b0;
    if (rst) begin
      csync  <= '0;
      dv_s   <= '0;
      d_s1   <= '0;
      d_s2   <= '0;
      state  <= S_IDLE;
      half   <= 1'b0;
      lo_nib <= '0;
      first  <= 1'b0;
      m_data <= '0;
    end else begin
      csync <= {csync[1:0], mii_rx_clk};
      dv_s  <= {dv_s[0], mii_rx_dv};
      d_s1  <= mii_rxd;
      d_s2  <= d_s1;
      if (fall) begin
        if (!dv_s[1]) begin
          if (state == S_DATA) m_eof <= 1'b1;
          state <= S_IDLE;
        end else begin
          unique case (state)
            S_IDLE, S_PRE: begin
              state <= S_PRE;
              if (d_s2 == 4'hD) begin
                state <= S_DATA;
                half  <= 1'b0;
                first <= 1'b1;
              end
            end
            S_DATA: begin
              if (!half) begin
                lo_nib <= d_s2;
                half   <= 1'b1;
              end else begin
                half    <= 1'b0;
                m_valid <= 1'b1;
                m_data  <= {d_s2, lo_nib};
                m_sof   <= first;
                first   <= 1'b0;
              end
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end
endmodule
