// mac_ctrl_fsm - Wishbone master that configures the Ethernet MAC and moves
// the periodic test frames and received frames between the MAC and the
// packet RAMs.
//
// After reset it writes CTRL (TX_EN, RX_EN, PAD_EN) and the station address
// into the MAC. Then it loops: on each `tick` (once per second) it sends a
// UDP frame and then an ARP frame. For each one it polls TX_CMD until the
// MAC is idle, has pkt_gen write the frame into the TX RAM at one byte per
// clock, and writes TX_CMD with the length and the start bit. Between
// sends it polls RX_STAT; when a frame is held it raises `host_rx_valid`
// with the status until `host_rx_release` comes from the layer above, which
// reads the RX RAM meanwhile, and then writes RX_STAT bit 31 to free the
// buffer. Test frames keep going out while a received frame is held. Every Wishbone access is a classic single cycle that waits for
// ACK. That a state machine initialises the configuration registers, feeds
// the transmit side through Wishbone and that test frames go out every
// second follows the text; the sequence and polling are this design's own.
// The TX RAM write data `txw_data` is the generator's byte passed straight
// through; the FSM only supplies the write enable and address.
module mac_ctrl_fsm
  import eth_pkg::*;
#(
  parameter logic [47:0] MAC_ADDR = 48'h02_00_00_00_00_01,
  parameter int unsigned RAM_AW   = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  // Wishbone master
  output logic              wb_cyc,
  output logic              wb_stb,
  output logic              wb_we,
  output logic [2:0]        wb_adr,
  output logic [31:0]       wb_dat_o,
  input  logic [31:0]       wb_dat_i,
  input  logic              wb_ack,
  // packet generator
  output logic              gen_start,
  output pkt_kind_e         gen_kind,
  output logic [31:0]       gen_seq,
  input  logic              gen_valid,
  input  logic [7:0]        gen_data,
  input  logic              gen_last,
  output logic              gen_ready,
  // TX RAM write port
  output logic              txw_en,
  output logic [RAM_AW-1:0] txw_addr,
  output logic [7:0]        txw_data,
  // received frame hand-off
  output logic              host_rx_valid,
  output rx_status_t        host_rx_status,
  input  logic              host_rx_release,
  output logic              init_done,
  output logic [15:0]       frames_queued
);
  typedef enum logic [3:0] {
    S_CFG, S_IDLE, S_TXPOLL, S_TXPOLL_CHK, S_LOAD, S_LOAD_WAIT, S_TXGO,
    S_RXPOLL, S_RXPOLL_CHK, S_RXREL, S_BUS
  } state_e;

  state_e      state, ret;
  logic [1:0]  cfg_idx;
  logic        pending_tick;   // a second has passed, frames to send
  logic        send_arp;       // second frame of the pair
  logic        release_req;    // the layer above has finished with the RX frame
  logic [RAM_AW:0] len;
  logic [31:0] rdata;

  assign gen_ready = (state == S_LOAD_WAIT);
  assign txw_en    = (state == S_LOAD_WAIT) && gen_valid;
  assign txw_addr  = len[RAM_AW-1:0];
  assign txw_data  = gen_data;

  // Start a single Wishbone access; S_BUS waits for ACK and returns to `r`.
  task automatic bus(input logic we, input logic [2:0] adr, input logic [31:0] dat, input state_e r);
    wb_cyc   <= 1'b1;
    wb_stb   <= 1'b1;
    wb_we    <= we;
    wb_adr   <= adr;
    wb_dat_o <= dat;
    ret      <= r;
    state    <= S_BUS;
  endtask

  always_ff @(posedge clk) begin
    gen_start <= 1'b0;
    if (rst) begin
      state          <= S_CFG;
      ret            <= S_CFG;
      cfg_idx        <= '0;
      wb_cyc         <= 1'b0;
      wb_stb         <= 1'b0;
      wb_we          <= 1'b0;
      wb_adr         <= '0;
      wb_dat_o       <= '0;
      rdata          <= '0;
      pending_tick   <= 1'b0;
      send_arp       <= 1'b0;
      release_req    <= 1'b0;
      len            <= '0;
      gen_kind       <= PKT_UDP;
      gen_seq        <= '0;
      host_rx_valid  <= 1'b0;
      host_rx_status <= '0;
      init_done      <= 1'b0;
      frames_queued  <= '0;
    end else begin
      if (tick) pending_tick <= 1'b1;
      if (host_rx_release && host_rx_valid) release_req <= 1'b1;
      unique case (state)
        S_CFG: begin
          cfg_idx <= cfg_idx + 1'b1;
          unique case (cfg_idx)
            2'd0: bus(1'b1, REG_MAC_LO, MAC_ADDR[31:0], S_CFG);
            2'd1: bus(1'b1, REG_MAC_HI, {16'd0, MAC_ADDR[47:32]}, S_CFG);
            default: bus(1'b1, REG_CTRL, 32'h7, S_IDLE);   // PAD_EN, RX_EN, TX_EN
          endcase
        end
        S_IDLE: begin
          init_done <= 1'b1;
          if (host_rx_valid && release_req) begin
            host_rx_valid <= 1'b0;
            release_req   <= 1'b0;
            state         <= S_RXREL;
          end else if (pending_tick || send_arp) begin
            state <= S_TXPOLL;
          end else if (!host_rx_valid) begin
            state <= S_RXPOLL;
          end
        end
        S_TXPOLL:     bus(1'b0, REG_TX_CMD, '0, S_TXPOLL_CHK);
        S_TXPOLL_CHK: state <= !rdata[31] ? S_LOAD : (host_rx_valid ? S_IDLE : S_RXPOLL);  // busy: serve RX, come back
        S_LOAD: begin
          gen_start <= 1'b1;
          if (!send_arp) pending_tick <= 1'b0;
          gen_kind  <= send_arp ? PKT_ARP : PKT_UDP;
          len       <= '0;
          state     <= S_LOAD_WAIT;
        end
        S_LOAD_WAIT: if (gen_valid) begin
          len <= len + 1'b1;
          if (gen_last) state <= S_TXGO;
        end
        S_TXGO: begin
          frames_queued <= frames_queued + 1'b1;
          if (send_arp) gen_seq <= gen_seq + 1'b1;
          send_arp <= ~send_arp;
          bus(1'b1, REG_TX_CMD, {1'b1, 20'd0, 11'(len)}, S_IDLE);
        end
        S_RXPOLL:     bus(1'b0, REG_RX_STAT, '0, S_RXPOLL_CHK);
        S_RXPOLL_CHK: begin
          if (rdata[31]) begin
            host_rx_valid            <= 1'b1;
            host_rx_status.length    <= rdata[10:0];
            host_rx_status.good      <= rdata[16];
            host_rx_status.crc_err   <= rdata[17];
            host_rx_status.too_short <= rdata[18];
            host_rx_status.too_long  <= rdata[19];
            state                    <= S_IDLE;
          end else begin
            state <= S_IDLE;
          end
        end
        S_RXREL: bus(1'b1, REG_RX_STAT, 32'h8000_0000, S_IDLE);
        S_BUS: if (wb_ack) begin
          wb_cyc <= 1'b0;
          wb_stb <= 1'b0;
          rdata  <= wb_dat_i;
          state  <= ret;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
