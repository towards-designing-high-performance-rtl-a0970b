// tb_mii_rx_if - a PHY model drives preamble, SFD and data nibbles on
// RXD/RX_DV, changing them just after each rising RX_CLK edge (25 MHz), and
// the test checks the bytes, the start-of-frame mark and the end pulse;
// the second frame has an odd trailing nibble, which must be dropped.
module tb_mii_rx_if;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, mii_rx_clk = 0, mii_rx_dv = 0;
  logic [3:0] mii_rxd = 0;
  logic m_valid, m_sof, m_eof;
  logic [7:0] m_data;
  int checks = 0, failures = 0, neof = 0;
  bq_t got, sofs;

  mii_rx_if dut (.*);
  always #5 clk = ~clk;
  initial begin #7; forever #20 mii_rx_clk = ~mii_rx_clk; end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (m_valid) begin if (m_sof) sofs.push_back(8'(got.size())); got.push_back(m_data); end
    if (m_eof) neof++;
  end

  task automatic nib(logic dv, logic [3:0] d);
    @(posedge mii_rx_clk); #4; mii_rx_dv = dv; mii_rxd = d;
  endtask

  task automatic send(bq_t d, bit odd);
    repeat (15) nib(1, 4'h5);
    nib(1, 4'hD);
    foreach (d[i]) begin nib(1, d[i][3:0]); nib(1, d[i][7:4]); end
    if (odd) nib(1, 4'hA);
    nib(0, 4'h0);
    repeat (12) nib(0, 4'h0);
  endtask

  initial begin
    bq_t f1, f2, e;
    repeat (5) @(negedge clk); rst = 0;
    for (int i = 0; i < 64; i++) f1.push_back(8'($urandom));
    for (int i = 0; i < 72; i++) f2.push_back(8'($urandom));
    send(f1, 0); send(f2, 1);
    repeat (20) @(negedge clk);
    e = f1; foreach (f2[i]) e.push_back(f2[i]);
    checks++; if (got.size() != e.size()) begin failures++; $display("got %0d exp %0d", got.size(), e.size()); end
    foreach (e[i]) if (i < got.size()) begin
      checks++; if (got[i] != e[i]) begin failures++; $display("byte %0d %h exp %h", i, got[i], e[i]); end
    end
    checks++; if (sofs.size() != 2 || sofs[1] != 64) begin failures++; $display("sof %p", sofs); end
    checks++; if (neof != 2) begin failures++; $display("eof %0d", neof); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
