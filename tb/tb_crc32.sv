// tb_crc32 - checks the CRC-32 block against the standard check value
// (0xCBF43926 for "123456789"), against the bit-serial reference model on
// random data, and checks that feeding the FCS back gives `match`.
module tb_crc32;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [7:0] data = 0;
  logic [31:0] crc, fcs;
  logic match;
  int checks = 0, failures = 0;

  crc32 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic feed(bq_t q);
    @(negedge clk) init = 1; en = 0;
    @(negedge clk) init = 0;
    foreach (q[i]) begin en = 1; data = q[i]; @(negedge clk); end
    en = 0;
  endtask

  initial begin
    bq_t q;
    repeat (2) @(negedge clk); rst = 0;
    q = {8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    feed(q);
    checks++; if (fcs !== 32'hCBF43926) begin failures++; $display("check value %h", fcs); end
    for (int t = 0; t < 50; t++) begin
      int n;
      logic [31:0] r;
      n = 1 + $urandom_range(0, 100);
      q = {};
      repeat (n) q.push_back(8'($urandom));
      r = ref_fcs(q);
      feed(q);
      checks++; if (fcs !== r) begin failures++; $display("len %0d fcs %h exp %h", n, fcs, r); end
      checks++; if (match) begin failures++; $display("match before FCS"); end
      feed(with_fcs(q));
      checks++; if (!match) begin failures++; $display("no match after FCS"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
