// tb_adm_receiver: the ADM-to-PCM converter against published numbers and a
// reference model.
//
// Part 1 replays the receiver verification example: after reset the ADM bits
// 1,1,1,1,1,1,1,0,0,0,0,0,0 must give the step sizes
// -1,0,1,2,3,4,5,6,-5,-6,-7,-8,-9 and the PCM outputs
// -1,-1,0,2,5,9,14,20,15,9,2,-6,-15, and the clocks between successive READY
// rises must equal the gaps of that example at 1 us per clock
// (25,21,21,21,21,21,18,22,26,26,26,26).
// Part 2 runs 3000 random ADM bits against a behavioural model of the Song
// predictor and summer (8-bit wrap-around), checking every PCM output and the
// conversion length 18 + 4*(S<0) + 4*(e(k-1) = -1) + 3*(new bit = 1).
// GO is held high throughout; each new ADM bit is applied in the wait state.
module tb_adm_receiver;
  logic       clk = 1'b0;
  logic       reset, go, adm_in;
  logic       ready;
  logic [7:0] pcm_out, bus;
  int checks = 0, failures = 0;

  adm_receiver dut (.clk, .reset, .go, .adm_in, .ready, .pcm_out, .bus);

  always #5 clk = ~clk;

  // behavioural model of the conversion
  logic signed [7:0] m_s, m_x;
  logic              m_e1, m_e2;
  int                m_len;

  task automatic model_step(logic a);
    logic signed [7:0] mag, t;
    m_len = 18 + (m_s < 0 ? 4 : 0) + (m_e1 ? 0 : 4) + (a ? 3 : 0);
    mag  = (m_s < 0) ? -m_s : m_s;
    t    = m_e1 ? mag : -mag;
    m_s  = t + (m_e2 ? 8'sd1 : -8'sd1);
    m_x  = m_x + m_s;
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

  // wait for the next READY rise, return the clocks it took
  task automatic next_ready(output int n);
    n = 0;
    do begin @(posedge clk); #1; n++; end while (ready);
    do begin @(posedge clk); #1; n++; end while (!ready);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic        T_ADM [13] = '{1,1,1,1,1,1,1,0,0,0,0,0,0};
  localparam int          T_S   [13] = '{-1,0,1,2,3,4,5,6,-5,-6,-7,-8,-9};
  localparam int          T_X   [13] = '{-1,-1,0,2,5,9,14,20,15,9,2,-6,-15};
  localparam int          T_GAP [12] = '{25,21,21,21,21,21,18,22,26,26,26,26};

  initial begin
    int n, after_reset;
    // reset: READY must rise 4 clocks after the last clock that saw RESET
    reset = 1'b1; go = 1'b0; adm_in = 1'b0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    after_reset = 0;
    do begin @(posedge clk); #1; after_reset++; end while (!ready);
    chk(after_reset == 4, $sformatf("READY %0d clocks after reset, expected 4", after_reset));
    chk(dut.u_dp.x_q == 8'h00 && dut.u_dp.sx_q == 8'h00 && dut.u_dp.ex_q == 8'h00,
        "reset procedure clears Ex, Sx_of_k, X_of_k");
    // GO low: stays waiting
    repeat (6) begin @(posedge clk); #1; chk(ready, "waits for GO"); end

    // Part 1: published example
    go = 1'b1;
    for (int k = 0; k < 13; k++) begin
      adm_in = T_ADM[k];
      next_ready(n);
      chk(pcm_out == 8'(T_X[k]), $sformatf("point %0d: PCM %0d expected %0d", k,
          $signed(pcm_out), T_X[k]));
      chk(dut.u_dp.sx_q == 8'(T_S[k]), $sformatf("point %0d: step %0d expected %0d", k,
          $signed(dut.u_dp.sx_q), T_S[k]));
      if (k > 0) chk(n == T_GAP[k-1], $sformatf("point %0d: %0d clocks expected %0d", k, n, T_GAP[k-1]));
    end

    // Part 2: random stream against the model, continuing from the state reached
    m_s = -8'sd9; m_x = -8'sd15; m_e1 = 1'b0; m_e2 = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      logic a;
      // mostly runs, so the step size grows and the estimate wraps
      a = (k % 64 < 32) ? ($urandom_range(0, 7) != 0) : ($urandom_range(0, 7) == 0);
      adm_in = a;
      model_step(a);
      next_ready(n);
      chk(pcm_out == m_x, $sformatf("random %0d: PCM %h expected %h", k, pcm_out, m_x));
      chk(n == m_len, $sformatf("random %0d: %0d clocks expected %0d", k, n, m_len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
