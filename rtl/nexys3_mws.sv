// nexys3_mws - the FPGA side of the Nexys3 multimedia web service below the
// TCP/IP stack: Ethernet MAC on MII, its control state machine, the TX and
// RX packet RAMs and the once-per-second UDP/ARP test traffic.
//
// Structure: period_timer ticks once per second of the 100 MHz clock;
// mac_ctrl_fsm configures eth_mac over Wishbone, has pkt_gen write a UDP and
// an ARP frame into the TX RAM and starts each transmission. Received frames
// land in the RX RAM; while `host_rx_valid` is high the layer above (the
// TCP/IP stack and web server, outside this block) reads the frame through
// `host_rd_addr`/`host_rd_data` (one-cycle latency) and frees the buffer
// with `host_rx_release`. The PHY is external and sits on the MII pins.
// The blocks and their connections follow the architecture of the design
// (MAC between PHY and memory, Wishbone between the MAC and its memories,
// two packet RAMs); the system clock is 100 MHz.
module nexys3_mws
  import eth_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned SEND_PERIOD = CLK_HZ,          // one second
  parameter logic [47:0] MAC_ADDR    = 48'h02_00_00_00_00_01,
  parameter logic [31:0] IP_ADDR     = {8'd192, 8'd168, 8'd1, 8'd10},
  parameter logic [31:0] PEER_IP     = {8'd192, 8'd168, 8'd1, 8'd1},
  parameter int unsigned RAM_AW      = 11
) (
  input  logic              clk,
  input  logic              rst,
  // MII to the PHY
  input  logic              mii_tx_clk,
  output logic [3:0]        mii_txd,
  output logic              mii_tx_en,
  input  logic              mii_rx_clk,
  input  logic              mii_rx_dv,
  input  logic [3:0]        mii_rxd,
  // received frames to the layer above
  output logic              host_rx_valid,
  output rx_status_t        host_rx_status,
  input  logic              host_rx_release,
  input  logic [RAM_AW-1:0] host_rd_addr,
  output logic [7:0]        host_rd_data,
  // status
  output logic              init_done,
  output logic              tx_busy,
  output logic              tx_padded,
  output logic              rx_done,
  output logic [15:0]       rx_dropped,
  output logic [15:0]       frames_queued
);
  logic        tick;
  logic        wb_cyc, wb_stb, wb_we, wb_ack;
  logic [2:0]  wb_adr;
  logic [31:0] wb_m2s, wb_s2m;
  logic        gen_start, gen_valid, gen_ready, gen_last, gen_busy_unused;
  pkt_kind_e   gen_kind;
  logic [31:0] gen_seq;
  logic [7:0]  gen_data;
  logic              txw_en, rxw_en;
  logic [RAM_AW-1:0] txw_addr, txr_addr, rxw_addr;
  logic [7:0]        txw_data, txr_data, rxw_data;
  logic              rx_pending_unused;
  rx_status_t        rx_status_unused;

  period_timer #(.PERIOD_CYCLES(SEND_PERIOD)) u_timer (
    .clk, .rst, .en(init_done), .tick
  );

  pkt_gen #(.SRC_MAC(MAC_ADDR), .SRC_IP(IP_ADDR), .DST_IP(PEER_IP)) u_gen (
    .clk, .rst, .start(gen_start), .kind(gen_kind), .seq(gen_seq), .busy(gen_busy_unused),
    .m_valid(gen_valid), .m_ready(gen_ready), .m_data(gen_data), .m_last(gen_last)
  );

  mac_ctrl_fsm #(.MAC_ADDR(MAC_ADDR), .RAM_AW(RAM_AW)) u_ctrl (
    .clk, .rst, .tick,
    .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_o(wb_m2s), .wb_dat_i(wb_s2m), .wb_ack,
    .gen_start, .gen_kind, .gen_seq, .gen_valid, .gen_data, .gen_last, .gen_ready,
    .txw_en, .txw_addr, .txw_data,
    .host_rx_valid, .host_rx_status, .host_rx_release, .init_done, .frames_queued
  );

  pkt_ram #(.DEPTH(2 ** RAM_AW), .AW(RAM_AW)) u_tx_ram (
    .clk, .we(txw_en), .waddr(txw_addr), .wdata(txw_data), .raddr(txr_addr), .rdata(txr_data)
  );

  pkt_ram #(.DEPTH(2 ** RAM_AW), .AW(RAM_AW)) u_rx_ram (
    .clk, .we(rxw_en), .waddr(rxw_addr), .wdata(rxw_data), .raddr(host_rd_addr), .rdata(host_rd_data)
  );

  eth_mac #(.RAM_AW(RAM_AW)) u_mac (
    .clk, .rst,
    .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_i(wb_m2s), .wb_dat_o(wb_s2m), .wb_ack,
    .txr_addr, .txr_data, .rxw_en, .rxw_addr, .rxw_data,
    .mii_tx_clk, .mii_txd, .mii_tx_en, .mii_rx_clk, .mii_rx_dv, .mii_rxd,
    .tx_busy, .rx_pending(rx_pending_unused), .rx_status(rx_status_unused), .rx_dropped,
    .tx_padded, .rx_done
  );
endmodule
