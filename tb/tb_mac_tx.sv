// tb_mac_tx - sends frames through mac_tx with a byte tick every 4 cycles
// and checks the line bytes: 7 x 0x55, 0xD5, the data, padding to 60 bytes
// when enabled, the FCS from the reference model, and a gap of exactly 12
// idle byte times between back-to-back frames.
module tb_mac_tx;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, pad_en = 1, byte_tick;
  logic s_valid, s_ready, s_last;
  logic [7:0] s_data;
  logic tx_valid, busy, frame_done, padded;
  logic [7:0] tx_data;
  int checks = 0, failures = 0, npadded = 0, ndone = 0;
  bq_t src[$];          // frames waiting to be sent
  bq_t cur;
  int  pos = 0;
  bq_t line[$];         // frames seen on the line
  bq_t rx;
  int  idle_run = 0;
  int  gaps[$];

  mac_tx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // tick every 4 cycles
  int ph = 0;
  always @(posedge clk) begin ph <= (ph + 1) % 4; end
  assign byte_tick = (ph == 3);

  // source
  assign s_valid = (cur.size() > 0);
  assign s_data  = (cur.size() > 0) ? cur[pos] : 8'h00;
  assign s_last  = (cur.size() > 0) && (pos == cur.size() - 1);
  always @(posedge clk) begin
    if (s_valid && s_ready) begin
      if (s_last) begin
        cur = {};
        pos = 0;
      end else pos++;
    end
    if (cur.size() == 0 && src.size() > 0) cur = src.pop_front();
  end

  // line monitor
  always @(posedge clk) if (byte_tick) begin
    if (tx_valid) begin
      if (rx.size() == 0 && idle_run > 0) gaps.push_back(idle_run);
      idle_run = 0;
      rx.push_back(tx_data);
    end else begin
      if (rx.size() > 0) begin line.push_back(rx); rx = {}; end
      idle_run++;
    end

  end
  always @(posedge clk) if (!rst) begin if (frame_done) ndone++; if (padded) npadded++; end

  function automatic bq_t expect_line(bq_t d, bit pad);
    bq_t q, b;
    repeat (7) q.push_back(8'h55);
    q.push_back(8'hD5);
    b = pad ? pad60(d) : d;
    b = with_fcs(b);
    foreach (b[i]) q.push_back(b[i]);
    return q;
  endfunction

  initial begin
    bq_t f1, f2, f3, e[$];
    repeat (3) @(negedge clk); rst = 0;
    f1 = ref_arp(D_SMAC, D_SIP, D_DIP);
    for (int i = 0; i < 80; i++) f2.push_back(8'($urandom));
    for (int i = 0; i < 20; i++) f3.push_back(8'($urandom));
    src.push_back(f1); src.push_back(f2);
    e.push_back(expect_line(f1, 1)); e.push_back(expect_line(f2, 1));
    wait (line.size() == 2);
    @(negedge clk) pad_en = 0;
    src.push_back(f3); e.push_back(expect_line(f3, 0));
    wait (line.size() == 3);
    foreach (e[k]) begin
      checks++;
      if (line[k].size() != e[k].size()) begin failures++; $display("frame %0d size %0d exp %0d", k, line[k].size(), e[k].size()); end
      else foreach (e[k][i]) begin
        checks++;
        if (line[k][i] != e[k][i]) begin failures++; $display("frame %0d byte %0d %h exp %h", k, i, line[k][i], e[k][i]); end
      end
    end
    // frame 2 was queued while frame 1 was sent: the gap must be exactly 12
    checks++; if (gaps.size() < 2 || gaps[1] != 12) begin failures++; $display("gap %p", gaps); end
    checks++; if (npadded != 1) begin failures++; $display("padded %0d", npadded); end
    checks++; if (ndone != 3) begin failures++; $display("done %0d", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
