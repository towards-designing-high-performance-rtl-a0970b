// tb_pkt_ram - writes random bytes to random addresses and checks reads
// (one cycle of latency) against a model array, including a read of an
// address in the same cycle it is written (old data expected).
module tb_pkt_ram;
  localparam int AW = 8;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [2**AW];
  int checks = 0, failures = 0;

  pkt_ram #(.DEPTH(2**AW), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk) we = 1; waddr = AW'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [7:0] exp;
      @(negedge clk);
      raddr = AW'($urandom);
      exp = model[raddr];
      we = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom);
      wdata = 8'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++; if (rdata !== exp) begin failures++; $display("addr %0d %h exp %h", raddr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
