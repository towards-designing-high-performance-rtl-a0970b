// frame_check - checks received frames: FCS, too-short and too-long frames.
//
// Bytes that follow the SFD arrive on `s_valid`/`s_data` (first one marked
// by `s_sof`), and `s_eof` marks the end of the frame. The CRC-32 runs over
// every byte including the received FCS, so a correct frame leaves the
// register at the residue 0xDEBB20E3. One cycle after `s_eof`, `done`
// pulses with the status: length (saturating at 2047), FCS error, shorter
// than 64 bytes, longer than MAX_LEN bytes, and `good` when none of these
// holds. Detection of too long and too short frames follows the text; the
// limits are those of IEEE 802.3.
module frame_check
  import eth_pkg::*;
#(
  parameter int unsigned MAX_LEN = MAX_FRAME
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       s_valid,
  input  logic [7:0] s_data,
  input  logic       s_sof,
  input  logic       s_eof,
  output logic       done,
  output rx_status_t status
);
  logic [10:0] len;
  logic        match;
  logic [31:0] crc_unused, fcs_unused;

  crc32 u_crc (
    .clk  (clk),
    .rst  (rst),
    .init (s_eof),
    .en   (s_valid),
    .data (s_data),
    .crc  (crc_unused),
    .fcs  (fcs_unused),
    .match(match)
  );

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      len    <= '0;
      status <= '0;
    end else begin
      if (s_valid) begin
        if (s_sof)             len <= 11'd1;
        else if (len != '1)    len <= len + 1'b1;
      end
      if (s_eof) begin
        done             <= 1'b1;
        status.length    <= len;
        status.crc_err   <= !match;
        status.too_short <= (32'(len) < MIN_FRAME);
        status.too_long  <= (32'(len) > MAX_LEN);
        status.good      <= match && (32'(len) >= MIN_FRAME) && (32'(len) <= MAX_LEN);
        len              <= '0;
      end
    end
  end
endmodule
