// tb_pcm_transmitter: the PCM-to-ADM converter against a reference model.
//
// The model runs the Song predictor and summer on the transmitter's own ADM
// output and forms each new bit as "PCM input greater than the updated
// estimate", where the comparison is the sign of the 8-bit wrap-around
// difference estimate - input, as the converter's program computes it. Two
// input signals are used: a slow triangle wave the estimate can track, and
// random values. Every ADM bit and the conversion length
// 23 + 4*(S<0) + 4*(e(k-1) = -1) + 3*(new bit = 1) clocks are checked, and
// the worst case of 34 clocks per bit must occur and never be exceeded.
module tb_pcm_transmitter;
  logic       clk = 1'b0;
  logic       reset, go;
  logic [7:0] pcm_in;
  logic       ready, adm_out;
  int checks = 0, failures = 0;

  pcm_transmitter dut (.clk, .reset, .go, .pcm_in, .ready, .adm_out);

  always #5 clk = ~clk;

  logic signed [7:0] m_s, m_x;
  logic              m_e1, m_e2;

  task automatic model_step(logic signed [7:0] p);
    logic signed [7:0] mag, t, diff;
    logic a;
    mag  = (m_s < 0) ? -m_s : m_s;
    t    = m_e1 ? mag : -mag;
    m_s  = t + (m_e2 ? 8'sd1 : -8'sd1);
    m_x  = m_x + m_s;
    diff = m_x - p;
    a    = diff[7];
    m_e2 = m_e1;
    m_e1 = a;
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  task automatic next_ready(output int n);
    n = 0;
    do begin @(posedge clk); #1; n++; end while (ready);
    do begin @(posedge clk); #1; n++; end while (!ready);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, after_reset, worst;
    logic signed [7:0] p;
    reset = 1'b1; go = 1'b0; pcm_in = 8'h00;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    after_reset = 0;
    do begin @(posedge clk); #1; after_reset++; end while (!ready);
    chk(after_reset == 4, $sformatf("READY %0d clocks after reset, expected 4", after_reset));
    repeat (4) begin @(posedge clk); #1; chk(ready, "waits for GO"); end
    go = 1'b1;
    m_s = 0; m_x = 0; m_e1 = 0; m_e2 = 0;
    worst = 0;
    for (int k = 0; k < 4000; k++) begin
      int len;
      if (k < 2000) p = 8'((k % 200 < 100) ? (k % 100) - 50 : 50 - (k % 100));
      else          p = 8'($urandom);
      pcm_in = p;
      len = 23 + (m_s < 0 ? 4 : 0) + (m_e1 ? 0 : 4);
      model_step(p);
      len += m_e1 ? 3 : 0;
      next_ready(n);
      chk(adm_out == m_e1, $sformatf("bit %0d: ADM %0d expected %0d (pcm %0d, est %0d)",
          k, adm_out, m_e1, p, m_x));
      if (k > 0) chk(n == len, $sformatf("bit %0d: %0d clocks expected %0d", k, n, len));
      if (n > worst) worst = n;
    end
    chk(worst == 34, $sformatf("worst-case conversion %0d clocks, expected 34", worst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
