// manchester_rx - 10BASE-T receiver: Manchester decoder, start-of-frame
// delimiter search and end-of-frame detection.
//
// The Rx line (the output of the differential input buffer) is sampled at
// SAMPLES_PER_BIT times the bit rate: 6 with the board's 60 MHz oscillator.
// After two synchroniser flops every edge is classified by the time since
// the last mid-cell edge: an edge at least 3/4 of a cell later is a mid-cell
// edge and carries the bit (rising = 1), an earlier one is a cell-boundary
// edge and is ignored. A frame starts on a rising edge (the middle of the
// first preamble 1). The FSM then hunts for two successive 1 bits, which end
// the SFD 10101011, and from there packs bits, LSB first, into bytes on
// `m_valid`/`m_data`. When no mid-cell edge comes for 1.5 cells the carrier
// is gone: `m_eof` pulses for one cycle and the FSM waits for the next
// frame. That SFD and end of frame are found by a state machine follows the
// text; the oversampling decoder is this design's own.
module manchester_rx #(
  parameter int unsigned SAMPLES_PER_BIT = 6
) (
  input  logic       clk,        // SAMPLES_PER_BIT x 10 MHz
  input  logic       rst,
  input  logic       rx,
  output logic       m_valid,
  output logic [7:0] m_data,
  output logic       m_sof,      // with the first byte after the SFD
  output logic       m_eof,
  output logic       carrier
);
  localparam int unsigned MID_MIN = (3 * SAMPLES_PER_BIT + 3) / 4;   // 3/4 cell
  localparam int unsigned LOST    = (3 * SAMPLES_PER_BIT) / 2;       // 1.5 cells
  localparam int unsigned CW      = $clog2(LOST + 2);

  typedef enum logic [1:0] {S_IDLE, S_HUNT, S_DATA} state_e;
  state_e      state;
  logic [2:0]  sync;
  logic        edge_s, rise_s;
  logic [CW-1:0] since;      // samples since the last mid-cell edge
  logic        prev_bit;
  logic [6:0]  shreg;
  logic [2:0]  nbits;
  logic        first;

  assign edge_s  = sync[2] ^ sync[1];
  assign rise_s  = sync[1] & ~sync[2];
  assign carrier = (state != S_IDLE);

  always_ff @(posedge clk) begin
    m_valid <= 1'b0;
    m_sof   <= 1'b0;
    m_eof   <= 1'b0;
    if (rst) begin
      sync     <= '0;
      state    <= S_IDLE;
      since    <= '0;
      prev_bit <= 1'b0;
      shreg    <= '0;
      nbits    <= '0;
      first    <= 1'b0;
      m_data   <= '0;
    end else begin
      sync <= {sync[1:0], rx};
      if (state == S_IDLE) begin
        since <= '0;
        if (rise_s) begin            // middle of the first preamble bit
          state    <= S_HUNT;
          prev_bit <= 1'b1;
        end
      end else if (edge_s && since >= CW'(MID_MIN - 1)) begin
        // mid-cell edge: new bit = level after the edge
        since    <= '0;
        prev_bit <= sync[1];
        if (state == S_HUNT) begin
          if (prev_bit && sync[1]) begin
            state <= S_DATA;
            nbits <= '0;
            first <= 1'b1;
          end
        end else begin
          shreg <= {sync[1], shreg[6:1]};
          nbits <= nbits + 1'b1;
          if (nbits == 3'd7) begin
            m_valid <= 1'b1;
            m_data  <= {sync[1], shreg};
            m_sof   <= first;
            first   <= 1'b0;
          end
        end
      end else if (since >= CW'(LOST)) begin
        state <= S_IDLE;
        if (state == S_DATA) m_eof <= 1'b1;
      end else begin
        since <= since + 1'b1;
      end
    end
  end
endmodule
