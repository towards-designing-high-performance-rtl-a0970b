// lcd_ctrl - shows captured packet bytes in hexadecimal on a two-line,
// 16-character LCD with an HD44780-style 8-bit write-only bus.
//
// After power-up it waits 15 ms and sends function set (0x38: 8-bit bus, two
// lines), display on (0x0C), clear (0x01, 1.64 ms) and entry mode (0x06).
// Then, whenever the FIFO holds at least 16 bytes, it pops them one by one
// and writes line 1 (address 0x80) with bytes 0..7 and line 2 (0xC0) with
// bytes 8..15, two hex characters per byte, most significant nibble first.
// Every transfer sets RS and DB, raises E for E_CYC cycles, drops it and
// waits 40 us (the command execution time) before the next one. `frames`
// counts the records shown. The text says only that selected packets are
// shown on the LCD through a FIFO and a dedicated state machine; the panel
// protocol, the layout and all timing are this design's choices.
module lcd_ctrl #(
  parameter int unsigned CLK_HZ = 60_000_000
) (
  input  logic       clk,
  input  logic       rst,
  // FIFO read side (first-word fall-through)
  input  logic [7:0] fifo_data,
  input  logic [6:0] fifo_count,
  output logic       fifo_rd,
  // LCD bus
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_db,
  output logic       ready,      // initialisation finished
  output logic [15:0] frames
);
  localparam int unsigned REC_BYTES = 16;                           // two lines of 8 bytes
  localparam int unsigned E_CYC     = (CLK_HZ / 4_000_000) + 1;      // >= 250 ns
  localparam int unsigned CMD_CYC   = (CLK_HZ / 25_000) + 1;         // 40 us
  localparam int unsigned CLR_CYC   = (CLK_HZ / 1_000 * 2);          // 2 ms > 1.64 ms
  localparam int unsigned PWR_CYC   = (CLK_HZ / 1_000 * 15);         // 15 ms
  localparam int unsigned TW        = $clog2(PWR_CYC + 1);

  typedef enum logic [2:0] {S_PWR, S_INIT, S_IDLE, S_ADDR, S_CHAR, S_PULSE, S_WAIT} state_e;
  state_e      state, ret;
  logic [TW-1:0] timer;
  logic [1:0]  init_idx;
  logic [4:0]  char_idx;      // 0..31 character position in the record
  logic [3:0]  lo_nib;        // low nibble of the byte being shown
  logic [TW-1:0] wait_cyc;

  function automatic logic [7:0] hex_char(input logic [3:0] n);
    return (n < 4'd10) ? (8'h30 + 8'(n)) : (8'h41 + 8'(n) - 8'd10);
  endfunction

  function automatic logic [7:0] init_cmd(input logic [1:0] i);
    unique case (i)
      2'd0: return 8'h38;
      2'd1: return 8'h0C;
      2'd2: return 8'h01;
      default: return 8'h06;
    endcase
  endfunction

  assign lcd_rw = 1'b0;

  always_ff @(posedge clk) begin
    fifo_rd <= 1'b0;
    if (rst) begin
      state    <= S_PWR;
      ret      <= S_PWR;
      timer    <= '0;
      init_idx <= '0;
      char_idx <= '0;
      lo_nib   <= '0;
      ready    <= 1'b0;
      wait_cyc <= '0;
      lcd_rs   <= 1'b0;
      lcd_e    <= 1'b0;
      lcd_db   <= '0;
      frames   <= '0;
    end else begin
      unique case (state)
        S_PWR: begin
          if (timer == TW'(PWR_CYC - 1)) begin
            state <= S_INIT;
            timer <= '0;
          end else timer <= timer + 1'b1;
        end
        S_INIT: begin
          lcd_rs   <= 1'b0;
          lcd_db   <= init_cmd(init_idx);
          wait_cyc <= (init_idx == 2'd2) ? TW'(CLR_CYC) : TW'(CMD_CYC);
          ret      <= (init_idx == 2'd3) ? S_IDLE : S_INIT;
          init_idx <= init_idx + 1'b1;
          state    <= S_PULSE;
          timer    <= '0;
        end
        S_IDLE: begin
          ready    <= 1'b1;
          char_idx <= '0;
          if (32'(fifo_count) >= REC_BYTES) state <= S_ADDR;
        end
        S_ADDR: begin                      // set DDRAM address of the line
          lcd_rs   <= 1'b0;
          lcd_db   <= (char_idx == 5'd0) ? 8'h80 : 8'hC0;
          wait_cyc <= TW'(CMD_CYC);
          ret      <= S_CHAR;
          state    <= S_PULSE;
          timer    <= '0;
        end
        S_CHAR: begin
          lcd_rs <= 1'b1;
          if (!char_idx[0]) begin          // high nibble: take the next byte
            lo_nib   <= fifo_data[3:0];
            fifo_rd  <= 1'b1;
            lcd_db   <= hex_char(fifo_data[7:4]);
          end else begin
            lcd_db   <= hex_char(lo_nib);
          end
          wait_cyc <= TW'(CMD_CYC);
          char_idx <= char_idx + 1'b1;
          if (char_idx == 5'd15)      ret <= S_ADDR;
          else if (char_idx == 5'd31) ret <= S_IDLE;
          else                        ret <= S_CHAR;
          if (char_idx == 5'd31) frames <= frames + 1'b1;
          state <= S_PULSE;
          timer <= '0;
        end
        S_PULSE: begin                     // E high for E_CYC cycles
          lcd_e <= 1'b1;
          if (timer == TW'(E_CYC)) begin
            lcd_e <= 1'b0;
            timer <= '0;
            state <= S_WAIT;
          end else timer <= timer + 1'b1;
        end
        S_WAIT: begin
          if (timer == wait_cyc) state <= ret;
          else timer <= timer + 1'b1;
        end
        default: state <= S_PWR;
      endcase
    end
  end
endmodule
