// manchester_tx - 10BASE-T transmitter: serialises bytes from mac_tx and
// Manchester-encodes them onto the differential Tx pair.
//
// It runs on the 20 MHz clock, two clocks per 100 ns bit cell, giving the
// 10 Mbps line rate. Every 16 clocks it pulses `byte_tick`, takes
// `tx_valid`/`tx_data` and sends the byte least significant bit first. In
// each cell the first half carries the complement of the bit and the second
// half the bit, so a 1 is a rising and a 0 a falling transition in the
// middle of the cell (IEEE 802.3). After the last byte of a frame the line
// is held at the positive level for two bit times (the start of idle) and
// then both outputs go low, the undriven idle state. `line_en` is high while
// the pair is driven. The 10 Mbps rate and the 20 MHz clock follow the
// text; link test pulses are not generated.
module manchester_tx (
  input  logic       clk,        // 20 MHz
  input  logic       rst,
  output logic       byte_tick,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_p,
  output logic       tx_n,
  output logic       line_en
);
  logic [3:0] phase;     // 16 clocks per byte: [3:1] bit index, [0] half
  logic [7:0] shreg;
  logic       active;    // a byte is being sent
  logic [2:0] idl_cnt;   // half-bit counter of the closing positive level
  logic       level;

  assign byte_tick = (phase == 4'd15);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= '0;
      shreg   <= '0;
      active  <= 1'b0;
      idl_cnt <= '0;
    end else begin
      phase <= phase + 1'b1;
      if (byte_tick) begin
        shreg  <= tx_data;
        active <= tx_valid;
        if (active && !tx_valid) idl_cnt <= 3'd4;   // frame ended: 2 bit times high
      end else begin
        if (phase[0]) shreg <= shreg >> 1;
        if (idl_cnt != 0) idl_cnt <= idl_cnt - 1'b1;
      end
    end
  end

  // First half of the cell: ~bit, second half: bit.
  assign level = phase[0] ? shreg[0] : ~shreg[0];

  always_comb begin
    if (active) begin
      tx_p = level;  tx_n = ~level;  line_en = 1'b1;
    end else if (idl_cnt != 0) begin
      tx_p = 1'b1;   tx_n = 1'b0;    line_en = 1'b1;
    end else begin
      tx_p = 1'b0;   tx_n = 1'b0;    line_en = 1'b0;
    end
  end
endmodule
