// eth_mac - 10/100 Mbps Ethernet MAC with an MII PHY interface, a Wishbone
// register slave and direct ports to the TX and RX packet RAMs.
//
// Transmit: a start command through the registers makes the TX reader fetch
// the frame from the TX RAM (one-cycle read latency, at most one byte per
// byte time) and hand it to mac_tx, which adds preamble, SFD, padding and
// FCS; mii_tx_if puts it on TXD/TX_EN. Receive: mii_rx_if strips the
// preamble and SFD, frame_check checks FCS and length, and the RX writer
// stores the bytes, FCS included, from address 0 of the RX RAM. A received
// frame is held until software releases it; frames that arrive meanwhile,
// or while RX_EN is low, are dropped and counted in `rx_dropped`. There is
// no address filter. Full duplex only: there is no collision handling.
// The feature set (MII, preamble generation and removal, padding, too long
// and too short detection, full duplex, 10 and 100 Mbps) is the one the
// text lists; how it is built here is this design's own.
module eth_mac
  import eth_pkg::*;
#(
  parameter int unsigned RAM_AW = 11
) (
  input  logic              clk,
  input  logic              rst,
  // Wishbone slave
  input  logic              wb_cyc,
  input  logic              wb_stb,
  input  logic              wb_we,
  input  logic [2:0]        wb_adr,
  input  logic [31:0]       wb_dat_i,
  output logic [31:0]       wb_dat_o,
  output logic              wb_ack,
  // TX RAM read port
  output logic [RAM_AW-1:0] txr_addr,
  input  logic [7:0]        txr_data,
  // RX RAM write port
  output logic              rxw_en,
  output logic [RAM_AW-1:0] rxw_addr,
  output logic [7:0]        rxw_data,
  // MII
  input  logic              mii_tx_clk,
  output logic [3:0]        mii_txd,
  output logic              mii_tx_en,
  input  logic              mii_rx_clk,
  input  logic              mii_rx_dv,
  input  logic [3:0]        mii_rxd,
  // status
  output logic              tx_busy,
  output logic              rx_pending,
  output rx_status_t        rx_status,
  output logic [15:0]       rx_dropped,
  output logic              tx_padded,
  output logic              rx_done
);
  logic        tx_en, rx_en, pad_en, tx_start, rx_release;
  logic [47:0] mac_addr_unused;
  logic [10:0] tx_len;
  logic [15:0] tx_count, rx_count;

  mac_wb_regs u_regs (
    .clk, .rst, .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_i, .wb_dat_o, .wb_ack,
    .tx_en, .rx_en, .pad_en, .mac_addr(mac_addr_unused), .tx_start, .tx_len, .tx_busy,
    .rx_release, .rx_pending, .rx_status, .tx_count, .rx_count
  );

  // ---------------- transmit ----------------
  logic              rd_active;
  logic [1:0]        rd_lat;
  logic [RAM_AW-1:0] rd_ptr;
  logic              s_valid, s_ready, s_last;
  logic              byte_tick, txm_valid, txm_busy, txm_done;
  logic [7:0]        txm_data;

  assign txr_addr = rd_ptr;
  assign s_valid  = rd_active && (rd_lat == 2'd0);
  assign s_last   = (32'(rd_ptr) == 32'(tx_len) - 1);
  assign tx_busy  = rd_active || txm_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_active <= 1'b0;
      rd_lat    <= '0;
      rd_ptr    <= '0;
      tx_count  <= '0;
    end else begin
      if (rd_lat != 2'd0) rd_lat <= rd_lat - 1'b1;
      if (tx_start && tx_en && !tx_busy && tx_len != 0) begin
        rd_active <= 1'b1;
        rd_ptr    <= '0;
        rd_lat    <= 2'd2;
      end else if (s_valid && s_ready) begin
        if (s_last) rd_active <= 1'b0;
        else begin
          rd_ptr <= rd_ptr + 1'b1;
          rd_lat <= 2'd2;
        end
      end
      if (txm_done) tx_count <= tx_count + 1'b1;
    end
  end

  mac_tx u_tx (
    .clk, .rst, .pad_en, .byte_tick,
    .s_valid, .s_ready, .s_data(txr_data), .s_last,
    .tx_valid(txm_valid), .tx_data(txm_data), .busy(txm_busy),
    .frame_done(txm_done), .padded(tx_padded)
  );

  mii_tx_if u_mii_tx (
    .clk, .rst, .mii_tx_clk, .mii_txd, .mii_tx_en, .byte_tick,
    .tx_valid(txm_valid), .tx_data(txm_data)
  );

  // ---------------- receive ----------------
  logic       rb_valid, rb_sof, rb_eof;
  logic [7:0] rb_data;
  logic       fc_done;
  rx_status_t fc_status;
  logic       accepting;

  mii_rx_if u_mii_rx (
    .clk, .rst, .mii_rx_clk, .mii_rx_dv, .mii_rxd,
    .m_valid(rb_valid), .m_data(rb_data), .m_sof(rb_sof), .m_eof(rb_eof)
  );

  frame_check u_check (
    .clk, .rst, .s_valid(rb_valid), .s_data(rb_data), .s_sof(rb_sof), .s_eof(rb_eof),
    .done(fc_done), .status(fc_status)
  );

  logic accept_now;
  assign accept_now = rb_sof ? (rx_en && !rx_pending) : accepting;
  assign rxw_en     = rb_valid && accept_now && (rxw_addr != '1 || rb_sof);
  assign rxw_data   = rb_data;
  assign rx_done    = fc_done;

  logic [RAM_AW-1:0] wr_ptr;
  assign rxw_addr = rb_sof ? '0 : wr_ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      accepting  <= 1'b0;
      wr_ptr     <= '0;
      rx_pending <= 1'b0;
      rx_status  <= '0;
      rx_count   <= '0;
      rx_dropped <= '0;
    end else begin
      if (rb_valid && rb_sof) accepting <= rx_en && !rx_pending;
      if (rxw_en) wr_ptr <= rxw_addr + 1'b1;
      if (rx_release) rx_pending <= 1'b0;
      if (fc_done) begin
        if (accepting) begin
          rx_pending <= 1'b1;
          rx_status  <= fc_status;
          rx_count   <= rx_count + 1'b1;
        end else begin
          rx_dropped <= rx_dropped + 1'b1;
        end
        accepting <= 1'b0;
      end
    end
  end
endmodule
