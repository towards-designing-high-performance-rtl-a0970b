// mac_wb_regs - Wishbone slave with the configuration and status registers
// of the Ethernet MAC.
//
// Classic Wishbone cycles, 32-bit data, word addresses on wb_adr (the
// register map is in eth_pkg): each cycle with CYC and STB is acknowledged
// one clock later, for one clock. CTRL holds TX_EN, RX_EN and PAD_EN (all
// zero after reset), MAC_LO/MAC_HI the station address. Writing TX_CMD with
// bit 31 set starts sending the frame in the TX RAM of length [10:0]
// (`tx_start`); reading it shows busy in bit 31. RX_STAT shows the status of
// the frame in the RX RAM, bit 31 high while one is held, and writing bit 31
// releases the buffer (`rx_release`). COUNT holds frames sent and received.
// The text says a state machine sets the configuration registers of the
// MAC over Wishbone; this register set is the design's own.
module mac_wb_regs
  import eth_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        wb_cyc,
  input  logic        wb_stb,
  input  logic        wb_we,
  input  logic [2:0]  wb_adr,
  input  logic [31:0] wb_dat_i,
  output logic [31:0] wb_dat_o,
  output logic        wb_ack,
  output logic        tx_en,
  output logic        rx_en,
  output logic        pad_en,
  output logic [47:0] mac_addr,
  output logic        tx_start,
  output logic [10:0] tx_len,
  input  logic        tx_busy,
  output logic        rx_release,
  input  logic        rx_pending,
  input  rx_status_t  rx_status,
  input  logic [15:0] tx_count,
  input  logic [15:0] rx_count
);
  logic access;
  assign access = wb_cyc && wb_stb && !wb_ack;

  always_ff @(posedge clk) begin
    tx_start   <= 1'b0;
    rx_release <= 1'b0;
    if (rst) begin
      wb_ack   <= 1'b0;
      wb_dat_o <= '0;
      tx_en    <= 1'b0;
      rx_en    <= 1'b0;
      pad_en   <= 1'b0;
      mac_addr <= '0;
      tx_len   <= '0;
    end else begin
      wb_ack <= access;
      if (access && wb_we) begin
        unique case (wb_adr)
          REG_CTRL:   {pad_en, rx_en, tx_en} <= wb_dat_i[2:0];
          REG_MAC_LO: mac_addr[31:0]  <= wb_dat_i;
          REG_MAC_HI: mac_addr[47:32] <= wb_dat_i[15:0];
          REG_TX_CMD: begin
            tx_len <= wb_dat_i[10:0];
            if (wb_dat_i[31] && !tx_busy) tx_start <= 1'b1;
          end
          REG_RX_STAT: rx_release <= wb_dat_i[31];
          default: ;
        endcase
      end
      if (access && !wb_we) begin
        unique case (wb_adr)
          REG_CTRL:    wb_dat_o <= {29'd0, pad_en, rx_en, tx_en};
          REG_MAC_LO:  wb_dat_o <= mac_addr[31:0];
          REG_MAC_HI:  wb_dat_o <= {16'd0, mac_addr[47:32]};
          REG_TX_CMD:  wb_dat_o <= {tx_busy, 20'd0, tx_len};
          REG_RX_STAT: wb_dat_o <= {rx_pending, 11'd0, rx_status.too_long, rx_status.too_short,
                                    rx_status.crc_err, rx_status.good, 5'd0, rx_status.length};
          REG_COUNT:   wb_dat_o <= {rx_count, tx_count};
          default:     wb_dat_o <= '0;
        endcase
      end
    end
  end

  // Wishbone classic rules: no acknowledge outside a cycle, one per access.
  assert property (@(posedge clk) disable iff (rst) wb_ack |-> $past(wb_cyc && wb_stb))
    else $error("mac_wb_regs: ack without request");
  assert property (@(posedge clk) disable iff (rst) wb_ack |=> !wb_ack)
    else $error("mac_wb_regs: ack held");
endmodule
