// tb_frame_check - feeds good, corrupted, too short and too long frames
// (maximum length set to 100 bytes) and checks the reported status.
module tb_frame_check;
  import tb_ref_pkg::*;
  import eth_pkg::*;
  logic clk = 0, rst = 1, s_valid = 0, s_sof = 0, s_eof = 0, done;
  logic [7:0] s_data = 0;
  rx_status_t status;
  int checks = 0, failures = 0;

  frame_check #(.MAX_LEN(100)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic frame(int n, bit corrupt, bit exp_good, bit exp_crc, bit exp_short, bit exp_long);
    bq_t d;
    for (int i = 0; i < n - 4; i++) d.push_back(8'($urandom));
    d = with_fcs(d);
    if (corrupt) d[n/2] ^= 8'h10;
    foreach (d[i]) begin
      @(negedge clk) s_valid = 1; s_sof = (i == 0); s_data = d[i];
      if ($urandom_range(0, 1)) begin @(negedge clk) s_valid = 0; s_sof = 0; end
    end
    @(negedge clk) s_valid = 0; s_sof = 0;
    repeat (2) @(negedge clk);
    s_eof = 1; @(negedge clk) s_eof = 0;
    checks++;
    if (!done) begin failures++; $display("no done"); end
    checks += 5;
    if (status.length != 11'(n))       begin failures++; $display("len %0d exp %0d", status.length, n); end
    if (status.good != exp_good)       begin failures++; $display("n=%0d good %b", n, status.good); end
    if (status.crc_err != exp_crc)     begin failures++; $display("n=%0d crc %b", n, status.crc_err); end
    if (status.too_short != exp_short) begin failures++; $display("n=%0d short %b", n, status.too_short); end
    if (status.too_long != exp_long)   begin failures++; $display("n=%0d long %b", n, status.too_long); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    frame(64, 0, 1, 0, 0, 0);
    frame(100, 0, 1, 0, 0, 0);
    frame(80, 1, 0, 1, 0, 0);
    frame(40, 0, 0, 0, 1, 0);
    frame(63, 0, 0, 0, 1, 0);
    frame(101, 0, 0, 0, 0, 1);
    frame(70, 0, 1, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
