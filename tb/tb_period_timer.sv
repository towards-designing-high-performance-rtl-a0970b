// tb_period_timer - checks that ticks come exactly PERIOD_CYCLES apart and
// stop while the timer is disabled.
module tb_period_timer;
  localparam int P = 37;
  logic clk = 0, rst = 1, en = 0, tick;
  int checks = 0, failures = 0, cyc = 0, last = -1, nticks = 0;

  period_timer #(.PERIOD_CYCLES(P)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst && tick) begin
    nticks++;
    if (last >= 0) begin
      checks++;
      if (cyc - last != P) begin failures++; $display("spacing %0d", cyc - last); end
    end
    last = cyc;
  end

  initial begin
    int start;
    repeat (3) @(negedge clk); rst = 0;
    en = 1; start = cyc;
    wait (tick); 
    checks++; if (cyc - start != P) begin failures++; $display("first tick after %0d", cyc - start); end
    repeat (P * 5) @(negedge clk);
    en = 0; nticks = 0; last = -1;
    repeat (P * 3) @(negedge clk);
    checks++; if (nticks != 0) begin failures++; $display("ticks while disabled"); end
    checks++; if (nticks == 0 && last != -1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
