// tb_pkt_gen - compares the UDP and ARP frames of pkt_gen byte for byte with
// frames assembled by the reference model, under random back-pressure.
module tb_pkt_gen;
  import tb_ref_pkg::*;
  import eth_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, m_valid, m_ready = 0, m_last;
  pkt_kind_e kind = PKT_UDP;
  logic [31:0] seq = 0;
  logic [7:0] m_data;
  int checks = 0, failures = 0;

  pkt_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(pkt_kind_e k, logic [31:0] s, bq_t exp);
    bq_t got;
    @(negedge clk) start = 1; kind = k; seq = s;
    @(negedge clk) start = 0;
    forever begin
      m_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (m_valid && m_ready) begin
        got.push_back(m_data);
        if (m_last) break;
      end
      @(negedge clk);
    end
    @(negedge clk) m_ready = 0;
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("size %0d exp %0d", got.size(), exp.size()); end
    foreach (exp[i]) if (i < got.size()) begin
      checks++;
      if (got[i] != exp[i]) begin failures++; $display("kind %0d byte %0d got %h exp %h", k, i, got[i], exp[i]); end
    end
    checks++; if (busy) begin failures++; $display("busy after last"); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run(PKT_UDP, 32'h0000_0001, ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 1));
    run(PKT_ARP, 32'h0000_0002, ref_arp(D_SMAC, D_SIP, D_DIP));
    run(PKT_UDP, 32'hDEAD_BEEF, ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 32'hDEAD_BEEF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
