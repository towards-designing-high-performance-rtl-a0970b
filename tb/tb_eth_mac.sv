// tb_eth_mac - the MAC with its two packet RAMs and a PHY model that loops
// TXD back to RXD at 25 MHz (100 Mbps). Checks: a short frame goes out with
// preamble, padding and FCS in 144 TX_CLK cycles; it comes back into the RX
// RAM with good status; a frame arriving while the buffer is held is
// dropped and counted; after release, a corrupted frame injected by the
// PHY model is reported with an FCS error.
module tb_eth_mac;
  import tb_ref_pkg::*;
  import eth_pkg::*;
  localparam int AW = 11;
  logic clk = 0, rst = 1;
  logic wb_cyc = 0, wb_stb = 0, wb_we = 0, wb_ack;
  logic [2:0] wb_adr = 0;
  logic [31:0] wb_dat_i = 0, wb_dat_o;
  logic [AW-1:0] txr_addr, rxw_addr, tb_waddr = 0, tb_raddr = 0;
  logic [7:0] txr_data, rxw_data, tb_wdata = 0, tb_rdata;
  logic rxw_en, tb_we = 0;
  logic mii_clk = 0, mii_tx_en, mii_rx_dv;
  logic [3:0] mii_txd, mii_rxd;
  logic tx_busy, rx_pending, tx_padded, rx_done;
  rx_status_t rx_status;
  logic [15:0] rx_dropped;
  int checks = 0, failures = 0;

  eth_mac #(.RAM_AW(AW)) dut (
    .clk, .rst, .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_i, .wb_dat_o, .wb_ack,
    .txr_addr, .txr_data, .rxw_en, .rxw_addr, .rxw_data,
    .mii_tx_clk(mii_clk), .mii_txd, .mii_tx_en, .mii_rx_clk(mii_clk), .mii_rx_dv, .mii_rxd,
    .tx_busy, .rx_pending, .rx_status, .rx_dropped, .tx_padded, .rx_done
  );
  pkt_ram #(.DEPTH(2**AW), .AW(AW)) u_txram (.clk, .we(tb_we), .waddr(tb_waddr), .wdata(tb_wdata), .raddr(txr_addr), .rdata(txr_data));
  pkt_ram #(.DEPTH(2**AW), .AW(AW)) u_rxram (.clk, .we(rxw_en), .waddr(rxw_addr), .wdata(rxw_data), .raddr(tb_raddr), .rdata(tb_rdata));

  always #5 clk = ~clk;
  initial begin #2; forever #20 mii_clk = ~mii_clk; end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // PHY model: capture TX nibbles, loop them back (or inject) on RX.
  logic inj = 0, inj_dv = 0;
  logic [3:0] inj_d = 0;
  logic lb_dv = 0;
  logic [3:0] lb_d = 0;
  bq_t txb;                 // bytes of the last transmitted frame (with preamble)
  logic [3:0] lo;
  bit hi = 0;
  int en_cycles = 0;
  always @(posedge mii_clk) begin
    lb_dv <= mii_tx_en; lb_d <= mii_txd;
    if (!rst && mii_tx_en) begin
      en_cycles++;
      if (!hi) lo = mii_txd; else txb.push_back({mii_txd, lo});
      hi = !hi;
    end
  end
  assign mii_rx_dv = inj ? inj_dv : lb_dv;
  assign mii_rxd   = inj ? inj_d : lb_d;

  task automatic wb(input logic we, input logic [2:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk) wb_cyc = 1; wb_stb = 1; wb_we = we; wb_adr = a; wb_dat_i = d;
    do @(posedge clk); while (!wb_ack);
    #1 r = wb_dat_o;
    @(negedge clk) wb_cyc = 0; wb_stb = 0;
  endtask

  task automatic load(bq_t f);
    foreach (f[i]) begin @(negedge clk) tb_we = 1; tb_waddr = AW'(i); tb_wdata = f[i]; end
    @(negedge clk) tb_we = 0;
  endtask

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    logic [31:0] r;
    bq_t arp, udp, exp, bad;
    int npad = 0;
    repeat (3) @(negedge clk); rst = 0;
    wb(1, REG_CTRL, 32'h7, r);
    arp = ref_arp(D_SMAC, D_SIP, D_DIP);
    load(arp);
    txb = {}; en_cycles = 0;
    fork
      begin @(posedge tx_padded); npad++; end
      begin
        wb(1, REG_TX_CMD, 32'h8000_0000 | 42, r);
        wait (rx_done); @(negedge clk);
      end
    join_any
    wait (!tx_busy && rx_pending);
    exp = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    begin bq_t b; b = with_fcs(pad60(arp)); foreach (b[i]) exp.push_back(b[i]); end
    chk(txb == exp, "transmitted ARP frame");
    chk(en_cycles == 144, $sformatf("TX_EN cycles %0d", en_cycles));
    chk(npad == 1, "padding seen");
    wb(0, REG_RX_STAT, 0, r);
    chk(r[31] && r[16] && r[10:0] == 64, $sformatf("rx status %h", r));
    exp = with_fcs(pad60(arp));
    foreach (exp[i]) begin
      @(negedge clk) tb_raddr = AW'(i); @(posedge clk); #1;
      chk(tb_rdata == exp[i], $sformatf("rx ram %0d", i));
    end
    // second frame while the buffer is held: dropped
    udp = ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 7);
    load(udp);
    wb(1, REG_TX_CMD, 32'h8000_0000 | 74, r);
    wait (rx_done); @(negedge clk); @(negedge clk);
    chk(rx_dropped == 1, "dropped count");
    wb(0, REG_COUNT, 0, r);
    chk(r == 32'h0001_0002, $sformatf("counts %h", r));
    // release, then a corrupted frame from the PHY
    wb(1, REG_RX_STAT, 32'h8000_0000, r);
    @(negedge clk) chk(!rx_pending, "released");
    bad = with_fcs(udp); bad[20] ^= 8'h01;
    inj = 1;
    repeat (15) begin @(posedge mii_clk); #3 inj_dv = 1; inj_d = 4'h5; end
    @(posedge mii_clk); #3 inj_d = 4'hD;
    foreach (bad[i]) begin
      @(posedge mii_clk); #3 inj_d = bad[i][3:0];
      @(posedge mii_clk); #3 inj_d = bad[i][7:4];
    end
    @(posedge mii_clk); #3 inj_dv = 0;
    wait (rx_pending);
    wb(0, REG_RX_STAT, 0, r);
    chk(r[31] && !r[16] && r[17] && r[10:0] == 78, $sformatf("bad status %h", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
