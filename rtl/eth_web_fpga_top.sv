// eth_web_fpga_top - both Ethernet designs side by side.
//
// n3_*: the Nexys3 web-service network front end (nexys3_mws) on the
// 100 MHz system clock with an MII PHY: MAC, control FSM, packet RAMs and
// periodic UDP/ARP test frames, handing received frames to the layer above
// through the host_* ports. d2_*: the 10 Mbps UDP/ARP packet sender of the
// Spartan-IIE board (d2sb_udp_arp_sender), with its own 20 MHz transmit and
// 60 MHz receive clocks, Manchester line pair, LCD and LEDs. The two share
// nothing but the reset. The parts outside the FPGA logic (PHY chip,
// magnetics, clock DLL, differential pads, TCP/IP stack and web server) sit
// on these ports.
module eth_web_fpga_top
  import eth_pkg::*;
(
  input  logic        rst,
  // ---- Nexys3 side ----
  input  logic        n3_clk,
  input  logic        n3_mii_tx_clk,
  output logic [3:0]  n3_mii_txd,
  output logic        n3_mii_tx_en,
  input  logic        n3_mii_rx_clk,
  input  logic        n3_mii_rx_dv,
  input  logic [3:0]  n3_mii_rxd,
  output logic        n3_host_rx_valid,
  output rx_status_t  n3_host_rx_status,
  input  logic        n3_host_rx_release,
  input  logic [10:0] n3_host_rd_addr,
  output logic [7:0]  n3_host_rd_data,
  output logic        n3_init_done,
  output logic        n3_tx_busy,
  output logic        n3_tx_padded,
  output logic        n3_rx_done,
  output logic [15:0] n3_rx_dropped,
  output logic [15:0] n3_frames_queued,
  // ---- D2SB side ----
  input  logic        d2_clk20,
  input  logic        d2_clk60,
  output logic        d2_tx_p,
  output logic        d2_tx_n,
  output logic        d2_tx_line_en,
  input  logic        d2_rx,
  output logic        d2_lcd_rs,
  output logic        d2_lcd_rw,
  output logic        d2_lcd_e,
  output logic [7:0]  d2_lcd_db,
  output logic [2:0]  d2_led,
  output logic [15:0] d2_frames_sent,
  output logic        d2_rx_done,
  output rx_status_t  d2_rx_status,
  output logic [15:0] d2_lcd_frames,
  output logic [15:0] d2_lcd_skipped,
  output logic        d2_tx_padded
);
  nexys3_mws u_nexys3 (
    .clk(n3_clk), .rst,
    .mii_tx_clk(n3_mii_tx_clk), .mii_txd(n3_mii_txd), .mii_tx_en(n3_mii_tx_en),
    .mii_rx_clk(n3_mii_rx_clk), .mii_rx_dv(n3_mii_rx_dv), .mii_rxd(n3_mii_rxd),
    .host_rx_valid(n3_host_rx_valid), .host_rx_status(n3_host_rx_status),
    .host_rx_release(n3_host_rx_release), .host_rd_addr(n3_host_rd_addr),
    .host_rd_data(n3_host_rd_data), .init_done(n3_init_done), .tx_busy(n3_tx_busy),
    .tx_padded(n3_tx_padded), .rx_done(n3_rx_done), .rx_dropped(n3_rx_dropped),
    .frames_queued(n3_frames_queued)
  );

  d2sb_udp_arp_sender u_d2sb (
    .clk20(d2_clk20), .clk60(d2_clk60), .rst,
    .tx_p(d2_tx_p), .tx_n(d2_tx_n), .tx_line_en(d2_tx_line_en), .rx(d2_rx),
    .lcd_rs(d2_lcd_rs), .lcd_rw(d2_lcd_rw), .lcd_e(d2_lcd_e), .lcd_db(d2_lcd_db),
    .led(d2_led), .frames_sent(d2_frames_sent), .rx_done(d2_rx_done),
    .rx_status(d2_rx_status), .lcd_frames(d2_lcd_frames), .lcd_skipped(d2_lcd_skipped),
    .tx_padded(d2_tx_padded)
  );
endmodule
