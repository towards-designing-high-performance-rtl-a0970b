// tb_d2sb_udp_arp_sender - the 10 Mbps sender with its Tx pair looped back
// to its Rx input, a 1 ms send period and the real 20 and 60 MHz clocks.
// The test decodes the Manchester line itself and checks every frame
// (preamble, UDP/ARP content, padding, FCS, 16 clocks per byte), counts the
// frames the receiver accepts as good, checks that each record shown on the
// LCD is the first 16 bytes of a sent frame in hexadecimal, and that frames
// arriving while the FIFO is full are skipped.
module tb_d2sb_udp_arp_sender;
  import tb_ref_pkg::*;
  import eth_pkg::*;
  localparam int PERIOD = 20_000;   // 1 ms of 20 MHz
  logic clk20 = 0, clk60 = 0, rst = 1;
  logic tx_p, tx_n, tx_line_en, rx;
  logic lcd_rs, lcd_rw, lcd_e, rx_done, tx_padded;
  logic [7:0] lcd_db;
  logic [2:0] led;
  logic [15:0] frames_sent, lcd_frames, lcd_skipped;
  rx_status_t rx_status;
  int checks = 0, failures = 0;

  d2sb_udp_arp_sender #(.SEND_PERIOD(PERIOD)) dut (.*);
  always #25 clk20 = ~clk20;
  always #8.333 clk60 = ~clk60;
  assign rx = tx_line_en & tx_p;

  initial begin
    #40ms;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // line decoder on the 20 MHz clock
  bq_t cur, line[$];
  logic lev[$];
  int en_len[$], en_cnt = 0, bad_pair = 0;
  always @(posedge clk20) if (!rst) begin
    if (tx_line_en) begin
      en_cnt++;
      if (tx_n == tx_p) bad_pair++;   // only the closing positive level has tx_n low with tx_p high
      lev.push_back(tx_p);
    end else if (en_cnt > 0) begin
      bq_t f;
      byte unsigned b;
      en_len.push_back(en_cnt);
      repeat (4) void'(lev.pop_back());             // start of idle
      f = {};
      for (int i = 0; i + 16 <= lev.size(); i += 16) begin
        for (int j = 0; j < 8; j++) begin
          if (lev[i + 2*j] == lev[i + 2*j + 1]) bad_pair++;
          b[j] = lev[i + 2*j + 1];
        end
        f.push_back(b);
      end
      line.push_back(f);
      lev = {};
      en_cnt = 0;
    end
  end

  // LCD monitor
  logic [8:0] wr[$];
  logic e_q = 0;
  always @(posedge clk60) if (!rst) begin
    if (!lcd_e && e_q) wr.push_back({lcd_rs, lcd_db});
    e_q <= lcd_e;
  end

  int ngood = 0, nbad = 0;
  always @(posedge clk60) if (!rst) if (rx_done) begin if (rx_status.good) ngood++; else nbad++; end
  int npad = 0;
  always @(posedge clk20) if (!rst) if (tx_padded) npad++;
  logic [2:0] led_seen_hi = 0;
  always @(posedge clk60) if (!rst) led_seen_hi |= led;

  function automatic bq_t on_line(bq_t f);
    bq_t q, b;
    q = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    b = with_fcs(pad60(f));
    foreach (b[i]) q.push_back(b[i]);
    return q;
  endfunction

  function automatic logic [3:0] unhex(logic [7:0] c);
    return (c >= 8'h41) ? 4'(c - 8'h37) : 4'(c - 8'h30);
  endfunction

  initial begin
    bq_t u16, a16;
    repeat (5) @(posedge clk20); rst = 0;
    #25ms;
    chk(line.size() >= 40, $sformatf("frames on the line %0d", line.size()));
    foreach (line[k]) begin
      bq_t e;
      e = on_line((k % 2 == 0) ? ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, k / 2)
                               : ref_arp(D_SMAC, D_SIP, D_DIP));
      chk(line[k] == e, $sformatf("line frame %0d", k));
      chk(en_len[k] == 16 * e.size() + 4, $sformatf("frame %0d length %0d clocks", k, en_len[k]));
    end
    chk(bad_pair == 0, "Manchester cells and pair polarity");
    chk(frames_sent == 16'(line.size()), "frames_sent");
    chk(ngood == line.size() && nbad == 0, $sformatf("received good %0d bad %0d", ngood, nbad));
    chk(npad == line.size() / 2, "ARP frames padded");
    // LCD: 4 init commands, then records of 34 writes
    chk(wr.size() >= 4 + 34 && wr[0] == 9'h038 && wr[3] == 9'h006, "LCD init");
    begin
      bq_t u, a;
      u = ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 0);
      a = ref_arp(D_SMAC, D_SIP, D_DIP);
      for (int i = 0; i < 16; i++) begin u16.push_back(u[i]); a16.push_back(a[i]); end
    end
    for (int r = 0; 4 + 34 * (r + 1) <= wr.size(); r++) begin
      bq_t got;
      int base;
      base = 4 + 34 * r;
      got = {};
      chk(wr[base] == 9'h080 && wr[base + 17] == 9'h0C0, $sformatf("record %0d addresses", r));
      for (int i = 0; i < 34; i++) if (i != 0 && i != 17)
        chk(wr[base + i][8], "data write");
      for (int i = 0; i < 16; i++) begin
        int p;
        p = base + 1 + 2 * i + (i >= 8);
        got.push_back({unhex(wr[p][7:0]), unhex(wr[p + 1][7:0])});
      end
      chk(got == u16 || got == a16, $sformatf("record %0d content", r));

    end
    chk(lcd_frames >= 5, $sformatf("records shown %0d", lcd_frames));
    chk(lcd_skipped > 0, "frames skipped while the FIFO was full");
    chk(led_seen_hi[1:0] == 2'b11, "activity and good-frame LEDs");
    $display("sent %0d shown %0d skipped %0d", line.size(), lcd_frames, lcd_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
