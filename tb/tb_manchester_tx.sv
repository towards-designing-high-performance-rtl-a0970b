// tb_manchester_tx - checks the 10BASE-T line signal clock by clock: one
// byte every 16 clocks of 20 MHz (10 Mbps), bits LSB first with the
// complement in the first half-cell and the bit in the second, Tx- always
// the complement of Tx+, then two bit times of positive level and idle.
module tb_manchester_tx;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, byte_tick, tx_valid, tx_p, tx_n, line_en;
  logic [7:0] tx_data;
  int checks = 0, failures = 0, cyc = 0, last_tick = -1;
  bq_t q;
  int  pos = 0;
  logic [1:0] seen[$];   // {line_en, tx_p} per clock from the first driven one
  bit started = 0;

  manchester_tx dut (.*);
  always #25 clk = ~clk;   // 20 MHz

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign tx_valid = (pos < q.size());
  assign tx_data  = tx_valid ? q[pos] : 8'h00;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (byte_tick) begin
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != 16) begin failures++; $display("tick spacing %0d", cyc - last_tick); end
        end
        last_tick = cyc;
        if (pos < q.size()) pos <= pos + 1;
      end
      if (line_en) started = 1;
      if (started) seen.push_back({line_en, tx_p});
      if (line_en) begin
        checks++;
        if (tx_n !== ~tx_p && !(tx_p && !tx_n)) begin failures++; $display("pair not complementary"); end
      end else if (tx_p || tx_n) begin
        checks++; failures++; $display("driven while idle");
      end
    end
  end

  initial begin
    logic [1:0] exp[$];
    repeat (3) @(negedge clk); rst = 0;
    q = {8'h55, 8'h55, 8'hD5, 8'h00, 8'hFF, 8'hA3, 8'h3C};
    foreach (q[i]) for (int b = 0; b < 8; b++) begin
      exp.push_back({1'b1, ~q[i][b]});
      exp.push_back({1'b1, q[i][b]});
    end
    repeat (4) exp.push_back(2'b11);
    repeat (8) exp.push_back(2'b00);
    wait (seen.size() >= exp.size());
    foreach (exp[i]) begin
      checks++;
      if (seen[i] !== exp[i]) begin failures++; $display("clock %0d got %b exp %b", i, seen[i], exp[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
