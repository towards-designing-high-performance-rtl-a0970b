// tb_sync_fifo - random pushes and pops against a queue model: data order,
// count, full and empty, including attempts to write when full.
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] wr_data = 0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, nfull = 0;
  byte unsigned model[$];

  sync_fifo #(.WIDTH(8), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks += 3;
      if (count != model.size()) begin failures++; $display("count %0d exp %0d", count, model.size()); end
      if (full != (model.size() == D)) begin failures++; $display("full"); end
      if (empty != (model.size() == 0)) begin failures++; $display("empty"); end
      if (model.size() > 0) begin
        checks++; if (rd_data != model[0]) begin failures++; $display("data %h exp %h", rd_data, model[0]); end
      end
      if (full) nfull++;
      // phases: fill up, then drain, then random
      wr_en = (t % 600 < 200) ? !full : (t % 600 < 400) ? 1'b0 : ($urandom_range(0, 1) && !full);
      rd_en = (t % 600 < 200) ? 1'b0 : (t % 600 < 400) ? !empty : ($urandom_range(0, 1) && !empty);
      wr_data = 8'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++; if (nfull == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
