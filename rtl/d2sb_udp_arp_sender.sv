// d2sb_udp_arp_sender - the 10 Mbps UDP/ARP packet sender of the Spartan-IIE
// board with its home-built Ethernet extension card.
//
// Transmit, on the 20 MHz clock the FPGA's DLL derives from the card's
// 60 MHz crystal: once per second period_timer starts pkt_gen, which sends
// a UDP frame and then an ARP request; mac_tx adds preamble, SFD, padding
// and FCS and manchester_tx drives the differential Tx pair at 10 Mbps.
// Receive, on the 60 MHz oscillator clock: manchester_rx decodes the Rx
// pair, finds the SFD and the end of each frame, and frame_check checks it.
// The first 16 bytes of a frame (both MAC addresses, the type and two more
// bytes) are put in the FIFO when it has room for all 16, and lcd_ctrl
// shows them on the two-line LCD; frames that find no room are counted in
// `lcd_skipped`. The three green LEDs of the card show line activity, and
// toggle on each good and on each bad received frame. The reset input is
// synchronised into each clock domain, so hold it for at least three clocks
// of clk20. The 10 Mbps rate, 20 and 60 MHz clocks, differential pairs,
// FIFO, LCD and three LEDs follow the text; the selection rule and the LED
// use are this design's own.
module d2sb_udp_arp_sender
  import eth_pkg::*;
#(
  parameter int unsigned CLK20_HZ    = 20_000_000,
  parameter int unsigned CLK60_HZ    = 60_000_000,
  parameter int unsigned SEND_PERIOD = CLK20_HZ,       // one second
  parameter int unsigned FIFO_DEPTH  = 64
) (
  input  logic        clk20,
  input  logic        clk60,
  input  logic        rst,
  // differential Tx pair and Rx line (after the input buffer)
  output logic        tx_p,
  output logic        tx_n,
  output logic        tx_line_en,
  input  logic        rx,
  // LCD
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_e,
  output logic [7:0]  lcd_db,
  output logic [2:0]  led,
  // status
  output logic [15:0] frames_sent,
  output logic        rx_done,
  output rx_status_t  rx_status,
  output logic [15:0] lcd_frames,
  output logic [15:0] lcd_skipped,
  output logic        tx_padded
);
  // ---------------- 20 MHz transmit domain ----------------
  logic [1:0]  rst20_s;
  logic        rst20;
  logic        tick, gen_start, gen_busy, gen_valid, gen_ready, gen_last;
  pkt_kind_e   gen_kind;
  logic [7:0]  gen_data;
  logic [31:0] seq;
  logic        arp_next;
  logic        byte_tick, txm_valid, txm_busy_unused, txm_done;
  logic [7:0]  txm_data;

  always_ff @(posedge clk20) rst20_s <= {rst20_s[0], rst};
  assign rst20 = rst20_s[1];

  period_timer #(.PERIOD_CYCLES(SEND_PERIOD)) u_timer (
    .clk(clk20), .rst(rst20), .en(1'b1), .tick
  );

  // A tick starts the UDP frame; the ARP frame follows as soon as pkt_gen
  // is free again (mac_tx holds it back until the gap has passed).
  always_ff @(posedge clk20) begin
    if (rst20) begin
      arp_next    <= 1'b0;
      seq         <= '0;
      frames_sent <= '0;
    end else begin
      if (gen_start) begin
        arp_next <= (gen_kind == PKT_UDP);
        if (gen_kind == PKT_ARP) seq <= seq + 1'b1;
      end
      if (txm_done) frames_sent <= frames_sent + 1'b1;
    end
  end
  assign gen_start = !gen_busy && (tick || arp_next);
  assign gen_kind  = arp_next ? PKT_ARP : PKT_UDP;

  pkt_gen u_gen (
    .clk(clk20), .rst(rst20), .start(gen_start), .kind(gen_kind), .seq, .busy(gen_busy),
    .m_valid(gen_valid), .m_ready(gen_ready), .m_data(gen_data), .m_last(gen_last)
  );

  mac_tx u_mac_tx (
    .clk(clk20), .rst(rst20), .pad_en(1'b1), .byte_tick,
    .s_valid(gen_valid), .s_ready(gen_ready), .s_data(gen_data), .s_last(gen_last),
    .tx_valid(txm_valid), .tx_data(txm_data), .busy(txm_busy_unused), .frame_done(txm_done),
    .padded(tx_padded)
  );

  manchester_tx u_man_tx (
    .clk(clk20), .rst(rst20), .byte_tick, .tx_valid(txm_valid), .tx_data(txm_data),
    .tx_p, .tx_n, .line_en(tx_line_en)
  );

  // ---------------- 60 MHz receive and display domain ----------------
  logic [1:0]  rst60_s;
  logic        rst60;
  logic        rb_valid, rb_sof, rb_eof, carrier;
  logic [7:0]  rb_data;
  logic        capturing;
  logic [4:0]  cap_cnt;
  logic        fifo_wr, fifo_rd, fifo_full_unused, fifo_empty_unused;
  logic [7:0]  fifo_q;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  logic [1:0]  led_q;
  logic        lcd_ready_unused;
  logic        tx_act_s0, tx_act_s1;

  always_ff @(posedge clk60) rst60_s <= {rst60_s[0], rst};
  assign rst60 = rst60_s[1];

  manchester_rx #(.SAMPLES_PER_BIT(CLK60_HZ / 10_000_000)) u_man_rx (
    .clk(clk60), .rst(rst60), .rx,
    .m_valid(rb_valid), .m_data(rb_data), .m_sof(rb_sof), .m_eof(rb_eof), .carrier
  );

  frame_check u_check (
    .clk(clk60), .rst(rst60), .s_valid(rb_valid), .s_data(rb_data), .s_sof(rb_sof),
    .s_eof(rb_eof), .done(rx_done), .status(rx_status)
  );

  // Selection: the first 16 bytes of a frame, if the FIFO can take them all.
  logic room;
  assign room    = (32'(fifo_count) + 16 <= FIFO_DEPTH);
  assign fifo_wr = rb_valid && (rb_sof ? room : (capturing && cap_cnt != 5'd16));

  always_ff @(posedge clk60) begin
    if (rst60) begin
      capturing   <= 1'b0;
      cap_cnt     <= '0;
      lcd_skipped <= '0;
      led_q       <= '0;
    end else begin
      if (rb_valid && rb_sof) begin
        capturing <= room;
        cap_cnt   <= 5'd1;
        if (!room) lcd_skipped <= lcd_skipped + 1'b1;
      end else if (fifo_wr) begin
        cap_cnt <= cap_cnt + 1'b1;
      end
      if (rx_done) begin
        if (rx_status.good) led_q[0] <= ~led_q[0];
        else                led_q[1] <= ~led_q[1];
      end
    end
  end

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk60), .rst(rst60), .wr_en(fifo_wr), .wr_data(rb_data), .rd_en(fifo_rd),
    .rd_data(fifo_q), .full(fifo_full_unused), .empty(fifo_empty_unused), .count(fifo_count)
  );

  lcd_ctrl #(.CLK_HZ(CLK60_HZ)) u_lcd (
    .clk(clk60), .rst(rst60), .fifo_data(fifo_q), .fifo_count(7'(fifo_count)), .fifo_rd,
    .lcd_rs, .lcd_rw, .lcd_e, .lcd_db, .ready(lcd_ready_unused), .frames(lcd_frames)
  );

  // LED 0: Tx or Rx activity (Tx enable brought over with two flops).
  always_ff @(posedge clk60) begin
    tx_act_s0 <= tx_line_en;
    tx_act_s1 <= tx_act_s0;
  end
  assign led = {led_q[1], led_q[0], tx_act_s1 | carrier};
endmodule
