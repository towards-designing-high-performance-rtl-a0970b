// mac_tx - Ethernet MAC transmitter: preamble and SFD generation, automatic
// padding of short frames, FCS generation and the inter-frame gap.
//
// Frame bytes (destination MAC to end of payload) arrive on a valid/ready
// stream with `s_last` on the final byte. The line side is paced by the PHY
// adapter: `byte_tick` is a one-cycle strobe per byte time, and at each
// strobe the adapter takes `tx_valid`/`tx_data` and this block moves to the
// next byte. A frame goes out as 7 x 0x55, 0xD5, the data, zero padding up
// to 60 bytes when `pad_en` is set, the 4 FCS bytes (least significant
// first) and then 12 idle byte times before the next frame may start.
// The feature list (preamble generation, padding of short frames) follows
// the text; the byte-tick pacing is this design's own. The source must hold
// a byte ready whenever a tick falls in the data phase (a checked rule):
// pkt_gen and the TX RAM reader always do.
module mac_tx
  import eth_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       pad_en,
  input  logic       byte_tick,
  input  logic       s_valid,
  output logic       s_ready,
  input  logic [7:0] s_data,
  input  logic       s_last,
  output logic       tx_valid,
  output logic [7:0] tx_data,
  output logic       busy,
  output logic       frame_done,   // one cycle at the end of the FCS
  output logic       padded        // one cycle when padding starts
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_SFD, S_DATA, S_PAD, S_FCS, S_IFG} state_e;
  state_e      state;
  logic [3:0]  cnt;      // preamble, FCS and gap byte counter
  logic [10:0] nbytes;   // frame bytes sent so far, without FCS
  logic [31:0] crc;

  assign s_ready = (state == S_DATA) && byte_tick;
  assign busy    = (state != S_IDLE);

  always_comb begin
    tx_valid = 1'b1;
    tx_data  = 8'h00;
    unique case (state)
      S_IDLE, S_IFG: begin tx_valid = 1'b0; tx_data = 8'h00; end
      S_PRE:  tx_data = PREAMBLE_BYTE;
      S_SFD:  tx_data = SFD_BYTE;
      S_DATA: tx_data = s_data;
      S_PAD:  tx_data = 8'h00;
      S_FCS:  tx_data = fcs_byte(crc, cnt[1:0]);
      default: tx_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    frame_done <= 1'b0;
    padded     <= 1'b0;
    if (rst) begin
      state  <= S_IDLE;
      cnt    <= '0;
      nbytes <= '0;
      crc    <= 32'hFFFFFFFF;
    end else if (byte_tick) begin
      unique case (state)
        S_IDLE: if (s_valid) begin
          state <= S_PRE;
          cnt   <= 4'd1;
        end
        S_PRE: if (cnt == 4'(PREAMBLE_LEN)) state <= S_SFD;
               else cnt <= cnt + 1'b1;
        S_SFD: begin
          state  <= S_DATA;
          nbytes <= '0;
          crc    <= 32'hFFFFFFFF;
        end
        S_DATA: begin
          crc    <= crc32_byte(crc, s_data);
          nbytes <= nbytes + 1'b1;
          if (s_last) begin
            cnt <= '0;
            if (pad_en && (nbytes + 1'b1) < 11'(MIN_PAYLOAD)) begin
              state  <= S_PAD;
              padded <= 1'b1;
            end else begin
              state <= S_FCS;
            end
          end
        end
        S_PAD: begin
          crc    <= crc32_byte(crc, 8'h00);
          nbytes <= nbytes + 1'b1;
          if ((nbytes + 1'b1) == 11'(MIN_PAYLOAD)) state <= S_FCS;
        end
        S_FCS: if (cnt == 4'd3) begin
          state      <= S_IFG;
          cnt        <= 4'd1;
          frame_done <= 1'b1;
        end else cnt <= cnt + 1'b1;
        S_IFG: if (cnt == 4'(IFG_BYTES - 1)) state <= S_IDLE;  // the idle tick that starts the next frame is the 12th
               else cnt <= cnt + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The source may not run dry in the middle of a frame.
  assert property (@(posedge clk) disable iff (rst) (state == S_DATA && byte_tick) |-> s_valid)
    else $error("mac_tx: source underrun");
endmodule
