// tb_eth_web_fpga_top - end-to-end test of both designs at their default
// sizes, including the one-second send period. Nexys3 side: a PHY model
// loops MII TX back to RX and injects one frame with a bad FCS; the layer
// above reads every frame from the RX RAM, slowly at first. D2SB side: the
// Tx pair is looped back to Rx, and a burst of frames from a Manchester
// generator in the test (one with a bad FCS) fills the LCD FIFO. Each
// mechanism is counted and must happen at least once: padding, the
// inter-frame gap, good and bad frames received, frames dropped while the
// RX buffer is held, LCD records shown and skipped.
`timescale 1ns/1ps
module tb_eth_web_fpga_top;
  import tb_ref_pkg::*;
  import eth_pkg::*;
  logic rst = 1;
  logic n3_clk = 0, mii_clk = 0, n3_mii_tx_en, n3_mii_rx_dv, n3_host_rx_valid, n3_host_rx_release = 0;
  logic [3:0] n3_mii_txd, n3_mii_rxd;
  rx_status_t n3_host_rx_status, d2_rx_status;
  logic [10:0] n3_host_rd_addr = 0;
  logic [7:0] n3_host_rd_data, d2_lcd_db;
  logic n3_init_done, n3_tx_busy, n3_tx_padded, n3_rx_done;
  logic [15:0] n3_rx_dropped, n3_frames_queued, d2_frames_sent, d2_lcd_frames, d2_lcd_skipped;
  logic d2_clk20 = 0, d2_clk60 = 0, d2_tx_p, d2_tx_n, d2_tx_line_en, d2_rx;
  logic d2_lcd_rs, d2_lcd_rw, d2_lcd_e, d2_rx_done, d2_tx_padded;
  logic [2:0] d2_led;
  int checks = 0, failures = 0;

  eth_web_fpga_top dut (
    .rst, .n3_clk, .n3_mii_tx_clk(mii_clk), .n3_mii_txd, .n3_mii_tx_en, .n3_mii_rx_clk(mii_clk),
    .n3_mii_rx_dv, .n3_mii_rxd, .n3_host_rx_valid, .n3_host_rx_status, .n3_host_rx_release,
    .n3_host_rd_addr, .n3_host_rd_data, .n3_init_done, .n3_tx_busy, .n3_tx_padded, .n3_rx_done,
    .n3_rx_dropped, .n3_frames_queued,
    .d2_clk20, .d2_clk60, .d2_tx_p, .d2_tx_n, .d2_tx_line_en, .d2_rx, .d2_lcd_rs, .d2_lcd_rw,
    .d2_lcd_e, .d2_lcd_db, .d2_led, .d2_frames_sent, .d2_rx_done, .d2_rx_status, .d2_lcd_frames,
    .d2_lcd_skipped, .d2_tx_padded
  );

  always #5 n3_clk = ~n3_clk;
  initial begin #2; forever #20 mii_clk = ~mii_clk; end
  always #25 d2_clk20 = ~d2_clk20;
  always #8.333 d2_clk60 = ~d2_clk60;

  initial begin
    #1.1s;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic bq_t on_line(bq_t f);
    bq_t q, b;
    q = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    b = with_fcs(pad60(f));
    foreach (b[i]) q.push_back(b[i]);
    return q;
  endfunction

  // ---------------- Nexys3 PHY model ----------------
  logic lb_dv = 0, inj = 0, inj_dv = 0;
  logic [3:0] lb_d = 0, inj_d = 0;
  assign n3_mii_rx_dv = inj ? inj_dv : lb_dv;
  assign n3_mii_rxd   = inj ? inj_d : lb_d;
  bq_t cur, n3_line[$];
  logic [3:0] lo; bit hi = 0, en_q = 0;
  int idle = 1000, n3_min_gap = 1000, n3_gaps = 0;
  always @(posedge mii_clk) begin
    lb_dv <= n3_mii_tx_en; lb_d <= n3_mii_txd;
    if (!rst && n3_mii_tx_en) begin
      if (!en_q && n3_line.size() > 0 && idle < 100) begin n3_gaps++; if (idle < n3_min_gap) n3_min_gap = idle; end
      idle = 0;
      if (!hi) lo = n3_mii_txd; else cur.push_back({n3_mii_txd, lo});
      hi = !hi;
    end else begin
      idle++;
      if (en_q) begin n3_line.push_back(cur); cur = {}; hi = 0; end
    end
    en_q = n3_mii_tx_en;
  end

  // layer above the MAC
  int n3_good = 0, n3_bad = 0, nhost = 0;
  initial begin
    forever begin
      wait (!rst && n3_host_rx_valid);
      if (n3_host_rx_status.good) begin
        bq_t f, e, a;
        f = {};
        for (int i = 0; i < n3_host_rx_status.length; i++) begin
          @(negedge n3_clk) n3_host_rd_addr = 11'(i); @(posedge n3_clk); #1; f.push_back(n3_host_rd_data);
        end
        e = with_fcs(pad60(ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 0)));
        a = with_fcs(pad60(ref_arp(D_SMAC, D_SIP, D_DIP)));
        chk(f == e || f == a, "Nexys3 frame read from the RX RAM");
        n3_good++;
      end else begin
        chk(n3_host_rx_status.crc_err, "bad frame flagged as FCS error");
        n3_bad++;
      end
      if (nhost == 1) repeat (2000) @(negedge n3_clk);   // slow: the frame behind is dropped
      nhost++;
      @(negedge n3_clk) n3_host_rx_release = 1; @(negedge n3_clk) n3_host_rx_release = 0;
      wait (!n3_host_rx_valid);
    end
  end

  int n3_pad = 0, d2_pad = 0;
  always @(posedge n3_clk) if (!rst) if (n3_tx_padded) n3_pad++;
  always @(posedge d2_clk20) if (!rst) if (d2_tx_padded) d2_pad++;

  // ---------------- D2SB line ----------------
  logic gen_on = 0, gen_rx = 0;
  assign d2_rx = gen_on ? gen_rx : (d2_tx_line_en & d2_tx_p);
  bq_t d2_line[$], dcur;
  logic lev[$];
  int d2_en = 0, d2_bad_cell = 0;
  always @(posedge d2_clk20) if (!rst) begin
    if (d2_tx_line_en) begin d2_en++; lev.push_back(d2_tx_p); end
    else if (d2_en > 0) begin
      byte unsigned b;
      repeat (4) void'(lev.pop_back());
      dcur = {};
      for (int i = 0; i + 16 <= lev.size(); i += 16) begin
        for (int j = 0; j < 8; j++) begin
          if (lev[i + 2*j] == lev[i + 2*j + 1]) d2_bad_cell++;
          b[j] = lev[i + 2*j + 1];
        end
        dcur.push_back(b);
      end
      d2_line.push_back(dcur);
      lev = {};
      d2_en = 0;
    end
  end
  int d2_good = 0, d2_bad = 0;
  always @(posedge d2_clk60) if (!rst) if (d2_rx_done) begin if (d2_rx_status.good) d2_good++; else d2_bad++; end

  // Manchester generator: 100 ns cells, 50 ns halves
  task automatic man_send(bq_t f);
    bq_t q;
    q = on_line(f);
    gen_on = 1;
    foreach (q[i]) for (int b = 0; b < 8; b++) begin
      gen_rx = ~q[i][b]; #50; gen_rx = q[i][b]; #50;
    end
    gen_rx = 1; #200; gen_rx = 0; #2000;
    gen_on = 0;
  endtask

  initial begin
    bq_t inj_frame, bad;
    repeat (100) @(posedge n3_clk); rst = 0;   // 1 us: several clocks of each domain
    // Nexys3: one corrupted frame from the PHY before any traffic
    #200us;
    bad = with_fcs(pad60(ref_arp(48'h02_00_00_00_00_99, 32'hC0A80163, D_SIP)));
    bad[30] ^= 8'h40;
    inj = 1;
    repeat (15) begin @(posedge mii_clk); #3 inj_dv = 1; inj_d = 4'h5; end
    @(posedge mii_clk); #3 inj_d = 4'hD;
    foreach (bad[i]) begin
      @(posedge mii_clk); #3 inj_d = bad[i][3:0];
      @(posedge mii_clk); #3 inj_d = bad[i][7:4];
    end
    @(posedge mii_clk); #3 inj_dv = 0; inj = 0;
    // D2SB: a burst of six frames during LCD start-up, the last one corrupted
    #1ms;
    inj_frame = ref_arp(48'h02_00_00_00_00_42, 32'hC0A80142, D_SIP);
    repeat (5) man_send(inj_frame);
    begin
      bq_t q; logic [31:0] f;
      q = pad60(inj_frame); q[20] ^= 8'h01;
      f = ref_fcs(pad60(inj_frame));          // FCS of the unmodified frame
      gen_on = 1;
      q = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5, q};
      for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
      foreach (q[i]) for (int b = 0; b < 8; b++) begin
        gen_rx = ~q[i][b]; #50; gen_rx = q[i][b]; #50;
      end
      gen_rx = 1; #200; gen_rx = 0; #2000;
      gen_on = 0;
    end
    // wait for the one-second send period of both designs, plus the frames
    #1004ms;
    $display("n3: sent %0d good %0d bad %0d dropped %0d padded %0d gaps %0d (min %0d)",
             n3_line.size(), n3_good, n3_bad, n3_rx_dropped, n3_pad, n3_gaps, n3_min_gap);
    $display("d2: sent %0d good %0d bad %0d padded %0d lcd shown %0d skipped %0d",
             d2_line.size(), d2_good, d2_bad, d2_pad, d2_lcd_frames, d2_lcd_skipped);
    // Nexys3 checks
    chk(n3_init_done, "Nexys3 initialised");
    chk(n3_line.size() == 2, "Nexys3 sent one UDP and one ARP frame in the first second");
    if (n3_line.size() == 2) begin
      chk(n3_line[0] == on_line(ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 0)), "Nexys3 UDP frame");
      chk(n3_line[1] == on_line(ref_arp(D_SMAC, D_SIP, D_DIP)), "Nexys3 ARP frame");
    end
    chk(n3_pad >= 1, "Nexys3 padding happened");
    chk(n3_gaps >= 1 && n3_min_gap >= 24, "Nexys3 inter-frame gap");
    chk(n3_good >= 1, "Nexys3 good frame received");
    chk(n3_bad >= 1, "Nexys3 FCS error detected");
    chk(n3_rx_dropped >= 1, "Nexys3 frame dropped while the buffer was held");
    chk(n3_good + n3_bad + n3_rx_dropped == 3, "Nexys3 every frame accounted for");
    // D2SB checks
    chk(d2_line.size() == 2, "D2SB sent one UDP and one ARP frame in the first second");
    if (d2_line.size() == 2) begin
      chk(d2_line[0] == on_line(ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 0)), "D2SB UDP frame");
      chk(d2_line[1] == on_line(ref_arp(D_SMAC, D_SIP, D_DIP)), "D2SB ARP frame");
    end
    chk(d2_bad_cell == 0, "D2SB Manchester cells");
    chk(d2_pad >= 1, "D2SB padding happened");
    chk(d2_good == 7 && d2_bad == 1, "D2SB frames received good/bad");
    chk(d2_lcd_skipped >= 1, "D2SB LCD records skipped");
    chk(d2_lcd_frames + d2_lcd_skipped == 8, "D2SB every frame shown or skipped");
    chk(d2_led[1] == 1'b1, "bad-frame LED toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
