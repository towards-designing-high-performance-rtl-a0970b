// tb_manchester_rx - drives Manchester-coded frames (preamble, SFD, data,
// start of idle) at 6 samples per bit into the receiver and checks the
// decoded bytes, the start-of-frame mark and one end-of-frame pulse per
// frame. The second frame starts with a shortened preamble.
module tb_manchester_rx;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, rx = 0;
  logic m_valid, m_sof, m_eof, carrier;
  logic [7:0] m_data;
  int checks = 0, failures = 0, neof = 0;
  bq_t got, sofpos;

  manchester_rx #(.SAMPLES_PER_BIT(6)) dut (.*);
  always #8 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (m_valid) begin
      if (m_sof) sofpos.push_back(8'(got.size()));
      got.push_back(m_data);
    end
    if (m_eof) neof++;
  end

  task automatic send(bq_t bytes, int npre);
    for (int i = 0; i < npre; i++) bytes.push_front(8'h55);
    foreach (bytes[i]) for (int b = 0; b < 8; b++) begin
      @(negedge clk) rx = ~bytes[i][b]; repeat (2) @(negedge clk);
      rx = bytes[i][b];                 repeat (3) @(negedge clk);
    end
    rx = 1; repeat (12) @(negedge clk);   // two bit times high
    rx = 0; repeat (60) @(negedge clk);
  endtask

  initial begin
    bq_t f1, f2, e;
    repeat (4) @(negedge clk); rst = 0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 70; i++) f1.push_back(8'($urandom));
    for (int i = 0; i < 64; i++) f2.push_back(8'($urandom));
    f1.push_front(8'hD5); f2.push_front(8'hD5);
    send(f1, 7);
    send(f2, 3);
    f1.pop_front(); f2.pop_front();
    e = f1; foreach (f2[i]) e.push_back(f2[i]);
    checks++; if (got.size() != e.size()) begin failures++; $display("got %0d bytes exp %0d", got.size(), e.size()); end
    foreach (e[i]) if (i < got.size()) begin
      checks++; if (got[i] != e[i]) begin failures++; $display("byte %0d %h exp %h", i, got[i], e[i]); end
    end
    checks++; if (sofpos.size() != 2 || sofpos[0] != 0 || sofpos[1] != 70) begin failures++; $display("sof %p", sofpos); end
    checks++; if (neof != 2) begin failures++; $display("eof %0d", neof); end
    checks++; if (carrier) begin failures++; $display("carrier stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
