// tb_lcd_ctrl - runs the LCD controller at a 4 MHz clock against a FIFO
// model holding two 16-byte records and checks the bus writes taken at each
// falling edge of E: the initialisation commands, the line addresses and
// the hexadecimal characters, plus the power-up wait, E width and the
// command delays (40 us, 2 ms after clear).
module tb_lcd_ctrl;
  localparam int HZ = 4_000_000;
  logic clk = 0, rst = 1, fifo_rd, lcd_rs, lcd_rw, lcd_e, ready;
  logic [7:0] fifo_data, lcd_db;
  logic [6:0] fifo_count;
  logic [15:0] frames;
  int checks = 0, failures = 0, cyc = 0, e_rise = -1, e_fall = -1, n = 0;
  byte unsigned fifo[$];
  logic [8:0] writes[$];
  int gaps[$], widths[$], first_rise = -1;

  lcd_ctrl #(.CLK_HZ(HZ)) dut (.*);
  always #125 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign fifo_data  = fifo.size() ? fifo[0] : 8'h00;
  assign fifo_count = 7'(fifo.size());
  logic e_q = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (fifo_rd && fifo.size()) void'(fifo.pop_front());
    if (lcd_e && !e_q) begin
      if (first_rise < 0) first_rise = cyc;
      if (e_fall >= 0) gaps.push_back(cyc - e_fall);
      e_rise = cyc;
    end
    if (!lcd_e && e_q) begin
      widths.push_back(cyc - e_rise);
      e_fall = cyc;
      writes.push_back({lcd_rs, lcd_db});
    end
    e_q <= lcd_e;
    if (lcd_rw) begin checks++; failures++; end
  end

  function automatic logic [7:0] hx(logic [3:0] v);
    return (v < 10) ? 8'h30 + v : 8'h37 + v;
  endfunction

  initial begin
    logic [8:0] exp[$];
    byte unsigned data[$];
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 32; i++) data.push_back(8'($urandom));
    exp = {9'h038, 9'h00C, 9'h001, 9'h006};
    for (int r = 0; r < 2; r++) begin
      exp.push_back(9'h080);
      for (int i = 0; i < 16; i++) begin
        if (i == 8) exp.push_back(9'h0C0);
        exp.push_back({1'b1, hx(data[16*r+i][7:4])});
        exp.push_back({1'b1, hx(data[16*r+i][3:0])});
      end
    end
    repeat (10) @(negedge clk);
    foreach (data[i]) fifo.push_back(data[i]);
    wait (writes.size() >= exp.size());
    repeat (400) @(negedge clk);
    checks++; if (writes.size() != exp.size()) begin failures++; $display("writes %0d exp %0d", writes.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++; if (writes[i] !== exp[i]) begin failures++; $display("write %0d %h exp %h", i, writes[i], exp[i]); end
    end
    checks++; if (first_rise < HZ / 1000 * 15) begin failures++; $display("power-up wait %0d", first_rise); end
    foreach (widths[i]) begin checks++; if (widths[i] < 1) begin failures++; $display("E width %0d", widths[i]); end end
    foreach (gaps[i]) begin
      int need;
      need = (i == 2) ? HZ / 1000 * 164 / 100 : HZ / 25_000;
      checks++; if (gaps[i] < need) begin failures++; $display("gap %0d = %0d < %0d", i, gaps[i], need); end
    end
    checks++; if (frames != 2) begin failures++; $display("frames %0d", frames); end
    checks++; if (!ready) begin failures++; $display("not ready"); end
    checks++; if (fifo.size() != 0) begin failures++; $display("fifo left %0d", fifo.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
