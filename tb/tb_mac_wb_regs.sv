// tb_mac_wb_regs - Wishbone reads and writes of every register: reset
// values, read-back, the TX start and RX release pulses, start refused while
// busy, status packing and acknowledge one clock after the request.
module tb_mac_wb_regs;
  import eth_pkg::*;
  logic clk = 0, rst = 1, wb_cyc = 0, wb_stb = 0, wb_we = 0, wb_ack;
  logic [2:0] wb_adr = 0;
  logic [31:0] wb_dat_i = 0, wb_dat_o;
  logic tx_en, rx_en, pad_en, tx_start, rx_release;
  logic [47:0] mac_addr;
  logic [10:0] tx_len;
  logic tx_busy = 0, rx_pending = 0;
  rx_status_t rx_status = '0;
  logic [15:0] tx_count = 16'h1234, rx_count = 16'h00AB;
  int checks = 0, failures = 0, nstart = 0, nrel = 0;

  mac_wb_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin if (tx_start) nstart++; if (rx_release) nrel++; end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wb(input logic we, input logic [2:0] a, input logic [31:0] d, output logic [31:0] r);
    int n = 0;
    @(negedge clk) wb_cyc = 1; wb_stb = 1; wb_we = we; wb_adr = a; wb_dat_i = d;
    do begin @(posedge clk); #1; n++; end while (!wb_ack);
    r = wb_dat_o;
    checks++; if (n != 1) begin failures++; $display("ack after %0d cycles", n); end
    @(negedge clk) wb_cyc = 0; wb_stb = 0;
  endtask

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++; if (got !== exp) begin failures++; $display("%s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk); rst = 0;
    wb(0, REG_CTRL, 0, r);               expect_eq(r, 0, "ctrl reset");
    wb(1, REG_CTRL, 32'h5, r);           expect_eq({pad_en, rx_en, tx_en}, 3'b101, "ctrl bits");
    wb(0, REG_CTRL, 0, r);               expect_eq(r, 32'h5, "ctrl read");
    wb(1, REG_MAC_LO, 32'h0A0B0C0D, r);
    wb(1, REG_MAC_HI, 32'hFFFF0203, r);  expect_eq(mac_addr[47:16], 32'h02030A0B, "mac");
    wb(0, REG_MAC_HI, 0, r);             expect_eq(r, 32'h0203, "mac hi read");
    wb(1, REG_TX_CMD, 32'h8000_004A, r); expect_eq(tx_len, 11'h4A, "tx len");
    @(posedge clk); #1;
    expect_eq(nstart, 1, "start pulse");
    tx_busy = 1;
    wb(1, REG_TX_CMD, 32'h8000_0010, r); @(posedge clk); #1; expect_eq(nstart, 1, "start while busy");
    wb(0, REG_TX_CMD, 0, r);             expect_eq(r, 32'h8000_0010, "tx cmd read");
    tx_busy = 0;
    rx_pending = 1; rx_status = '{good: 1'b0, crc_err: 1'b1, too_short: 1'b0, too_long: 1'b1, length: 11'd1600};
    wb(0, REG_RX_STAT, 0, r);            expect_eq(r, {1'b1, 11'd0, 1'b1, 1'b0, 1'b1, 1'b0, 5'd0, 11'd1600}, "rx stat");
    wb(1, REG_RX_STAT, 32'h0, r);        @(posedge clk); #1; expect_eq(nrel, 0, "no release");
    wb(1, REG_RX_STAT, 32'h8000_0000, r); @(posedge clk); #1; expect_eq(nrel, 1, "release");
    wb(0, REG_COUNT, 0, r);              expect_eq(r, 32'h00AB_1234, "counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
