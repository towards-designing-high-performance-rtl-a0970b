// tb_mii_tx_if - drives bytes into the MII transmit adapter (100 MHz system
// clock, 25 MHz TX_CLK) and checks what a PHY samples on each rising TX_CLK
// edge: low nibble then high nibble with TX_EN high, one byte per two TX_CLK
// cycles (100 Mbps), and TX_EN low once the bytes stop.
module tb_mii_tx_if;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, mii_tx_clk = 0, mii_tx_en, byte_tick, tx_valid;
  logic [3:0] mii_txd;
  logic [7:0] tx_data;
  int checks = 0, failures = 0, cyc = 0, last_tick = -1;
  bq_t q;
  int pos = 0;
  bit go = 0;
  logic [4:0] phy[$];

  mii_tx_if dut (.*);
  always #5 clk = ~clk;
  initial begin #3; forever #20 mii_tx_clk = ~mii_tx_clk; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign tx_valid = go && (pos < q.size());
  assign tx_data  = tx_valid ? q[pos] : 8'h00;
  always @(posedge clk) begin
    cyc++;
    if (byte_tick && go) begin
      if (last_tick >= 0) begin
        checks++; if (cyc - last_tick != 8) begin failures++; $display("tick spacing %0d", cyc - last_tick); end
      end
      last_tick = cyc;
      if (pos < q.size()) pos <= pos + 1;
    end
  end
  always @(posedge mii_tx_clk) if (mii_tx_en || phy.size() > 0) phy.push_back({mii_tx_en, mii_txd});

  initial begin
    logic [4:0] exp[$];
    for (int i = 0; i < 30; i++) q.push_back(8'($urandom));
    foreach (q[i]) begin exp.push_back({1'b1, q[i][3:0]}); exp.push_back({1'b1, q[i][7:4]}); end
    repeat (4) exp.push_back(5'b0_0000);
    repeat (5) @(negedge clk); rst = 0;
    repeat (7) @(negedge clk); go = 1;
    wait (phy.size() >= exp.size());
    foreach (exp[i]) begin
      checks++; if (phy[i] !== exp[i]) begin failures++; $display("nibble %0d %b exp %b", i, phy[i], exp[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
