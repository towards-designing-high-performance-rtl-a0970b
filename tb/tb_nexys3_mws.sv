// tb_nexys3_mws - the Nexys3 network front end with a 20 us send period and
// a PHY model that loops TXD back to RXD at 25 MHz. Checks every frame seen
// on the MII (preamble, UDP or ARP content with the right sequence number,
// padding, FCS), the gap between frames, the send period, and every frame
// handed to the layer above, read back from the RX RAM. The layer above is
// slow for the first frame, so a frame behind it must be dropped.
module tb_nexys3_mws;
  import tb_ref_pkg::*;
  import eth_pkg::*;
  localparam int PERIOD = 2000;     // cycles of 100 MHz
  logic clk = 0, rst = 1, mii_clk = 0, mii_tx_en, mii_rx_dv;
  logic [3:0] mii_txd, mii_rxd;
  logic host_rx_valid, host_rx_release = 0, init_done, tx_busy, tx_padded, rx_done;
  rx_status_t host_rx_status;
  logic [10:0] host_rd_addr = 0;
  logic [7:0] host_rd_data;
  logic [15:0] rx_dropped, frames_queued;
  int checks = 0, failures = 0;

  nexys3_mws #(.SEND_PERIOD(PERIOD)) dut (
    .clk, .rst, .mii_tx_clk(mii_clk), .mii_txd, .mii_tx_en, .mii_rx_clk(mii_clk), .mii_rx_dv,
    .mii_rxd, .host_rx_valid, .host_rx_status, .host_rx_release, .host_rd_addr, .host_rd_data,
    .init_done, .tx_busy, .tx_padded, .rx_done, .rx_dropped, .frames_queued
  );
  always #5 clk = ~clk;
  initial begin #2; forever #20 mii_clk = ~mii_clk; end

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // PHY: loop back and record frames
  logic lb_dv = 0; logic [3:0] lb_d = 0;
  assign mii_rx_dv = lb_dv; assign mii_rxd = lb_d;
  bq_t cur, line[$];
  realtime start_t[$];
  logic [3:0] lo; bit hi = 0, en_q = 0;
  int idle = 100, min_gap = 1000;
  always @(posedge mii_clk) begin
    lb_dv <= mii_tx_en; lb_d <= mii_txd;
    if (!rst && mii_tx_en) begin
      if (!en_q) begin start_t.push_back($realtime); if (idle < min_gap) min_gap = idle; end
      idle = 0;
      if (!hi) lo = mii_txd; else cur.push_back({mii_txd, lo});
      hi = !hi;
    end else begin
      idle++;
      if (en_q) begin line.push_back(cur); cur = {}; hi = 0; end
    end
    en_q = mii_tx_en;
  end

  function automatic bq_t on_line(bq_t f);
    bq_t q, b;
    q = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    b = with_fcs(pad60(f));
    foreach (b[i]) q.push_back(b[i]);
    return q;
  endfunction

  function automatic bq_t expected(int k);   // k-th frame sent
    if (k % 2 == 0) return ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, k / 2);
    else            return ref_arp(D_SMAC, D_SIP, D_DIP);
  endfunction

  // layer above: read each held frame, slow the first time
  bq_t host[$];
  int nhost = 0;
  initial begin
    forever begin
      bq_t f;
      wait (!rst && host_rx_valid);
      f = {};
      for (int i = 0; i < host_rx_status.length; i++) begin
        @(negedge clk) host_rd_addr = 11'(i); @(posedge clk); #1; f.push_back(host_rd_data);
      end
      chk(host_rx_status.good, "received frame good");
      host.push_back(f);
      if (nhost == 0) repeat (1500) @(negedge clk);
      nhost++;
      @(negedge clk) host_rx_release = 1; @(negedge clk) host_rx_release = 0;
      wait (!host_rx_valid);
    end
  end

  int npad = 0;
  always @(posedge clk) if (!rst) if (tx_padded) npad++;

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    wait (line.size() >= 8);
    repeat (3000) @(negedge clk);
    foreach (line[k]) chk(line[k] == on_line(expected(k)), $sformatf("line frame %0d", k));
    chk(min_gap >= 24, $sformatf("gap %0d TX_CLK cycles", min_gap));
    for (int k = 2; k < 8; k += 2) begin
      realtime d;
      d = start_t[k] - start_t[k-2];
      chk(d > (PERIOD - 100) * 10.0 && d < (PERIOD + 100) * 10.0, $sformatf("period %0t", d));
    end
    chk(rx_dropped >= 1, "a frame dropped while the buffer was held");
    chk(host.size() + rx_dropped == line.size(), $sformatf("host %0d dropped %0d sent %0d", host.size(), rx_dropped, line.size()));
    // every frame handed up is one that was sent, in order
    begin
      int k = 0;
      foreach (host[h]) begin
        while (k < line.size() && host[h] != with_fcs(pad60(expected(k)))) k++;
        chk(k < line.size(), $sformatf("host frame %0d matches a sent frame", h));
        k++;
      end
    end
    chk(npad == line.size() / 2, $sformatf("padded %0d", npad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
