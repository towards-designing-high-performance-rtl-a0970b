// tb_mac_ctrl_fsm - the control FSM with a real pkt_gen and a Wishbone slave
// model that acknowledges after a random delay, reports TX busy for a few
// polls and holds one received frame. Checks the configuration writes, the
// UDP then ARP frames written to the TX RAM with their TX_CMD writes, the
// sequence number step, and the hand-off and release of the received frame.
module tb_mac_ctrl_fsm;
  import tb_ref_pkg::*;
  import eth_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  logic wb_cyc, wb_stb, wb_we, wb_ack = 0;
  logic [2:0] wb_adr;
  logic [31:0] wb_dat_o, wb_dat_i = 0;
  logic gen_start, gen_valid, gen_last, gen_ready, gen_busy;
  pkt_kind_e gen_kind;
  logic [31:0] gen_seq;
  logic [7:0] gen_data;
  logic txw_en;
  logic [10:0] txw_addr;
  logic [7:0] txw_data;
  logic host_rx_valid, host_rx_release = 0, init_done;
  rx_status_t host_rx_status;
  logic [15:0] frames_queued;
  int checks = 0, failures = 0;

  mac_ctrl_fsm dut (.*);
  pkt_gen u_gen (.clk, .rst, .start(gen_start), .kind(gen_kind), .seq(gen_seq), .busy(gen_busy),
                 .m_valid(gen_valid), .m_ready(gen_ready), .m_data(gen_data), .m_last(gen_last));
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Wishbone slave model
  logic [35:0] wr_log[$];            // {adr, data}
  int busy_polls = 3;
  bit rx_hold = 0;
  byte unsigned ram[2048];
  bq_t frames[$];
  always @(posedge clk) begin
    wb_ack <= 1'b0;
    if (wb_cyc && wb_stb && !wb_ack && $urandom_range(0, 2) == 0) begin
      wb_ack <= 1'b1;
      if (wb_we) begin
        wr_log.push_back({1'b0, wb_adr, wb_dat_o});
        if (wb_adr == REG_TX_CMD) begin
          bq_t f;
          f = {};
          for (int i = 0; i < wb_dat_o[10:0]; i++) f.push_back(ram[i]);
          frames.push_back(f);
          busy_polls = 3;
        end
        if (wb_adr == REG_RX_STAT && wb_dat_o[31]) rx_hold = 0;
      end else begin
        unique case (wb_adr)
          REG_TX_CMD:  begin wb_dat_i <= {busy_polls > 0, 31'd0}; if (busy_polls > 0) busy_polls--; end
          REG_RX_STAT: wb_dat_i <= rx_hold ? {1'b1, 11'd0, 4'b0001, 5'd0, 11'd90} : 32'd0;
          default:     wb_dat_i <= 32'd0;
        endcase
      end
    end
    if (txw_en) ram[txw_addr] = txw_data;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    bq_t u0, a0, u1;
    repeat (3) @(negedge clk); rst = 0;
    wait (init_done);
    chk(wr_log.size() == 3, "three config writes");
    chk(wr_log[0] == {4'(REG_MAC_LO), 32'h0000_0001}, "MAC_LO");
    chk(wr_log[1] == {4'(REG_MAC_HI), 32'h0000_0200}, "MAC_HI");
    chk(wr_log[2] == {4'(REG_CTRL), 32'h7}, "CTRL");
    repeat (50) @(negedge clk);
    chk(frames.size() == 0, "nothing sent before tick");
    @(negedge clk) tick = 1; @(negedge clk) tick = 0;
    wait (frames.size() == 2);
    repeat (200) @(negedge clk);
    @(negedge clk) tick = 1; @(negedge clk) tick = 0;
    wait (frames.size() == 3);
    u0 = ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 0);
    a0 = ref_arp(D_SMAC, D_SIP, D_DIP);
    u1 = ref_udp(D_SMAC, 48'hFFFF_FFFF_FFFF, D_SIP, D_DIP, 5000, 5000, 32, 1);
    chk(frames[0] == u0, "first UDP frame");
    chk(frames[1] == a0, "ARP frame");
    chk(frames[2] == u1, "second UDP frame, next sequence number");
    chk(frames_queued == 3, "frames queued");
    // received frame
    rx_hold = 1;
    wait (host_rx_valid);
    chk(host_rx_status.length == 90 && host_rx_status.good, "host status");
    repeat (30) @(negedge clk);
    chk(rx_hold, "not released before host");
    @(negedge clk) host_rx_release = 1; @(negedge clk) host_rx_release = 0;
    wait (!rx_hold);
    chk(wr_log[wr_log.size()-1] == {4'(REG_RX_STAT), 32'h8000_0000}, "release write");
    repeat (20) @(negedge clk);
    chk(!host_rx_valid, "valid dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
