// tb_codec_speech: the codec used as intended, in real time at the minimum
// clock rate.
//
// The chip is meant to turn 8-bit, 8 kHz PCM into 32 kbit/s ADM and back.
// Its slowest conversion takes 34 clocks, so a 1.088 MHz clock gives exactly
// one ADM bit per 34 clocks. This testbench runs both halves from one clock
// at that budget:
//   * a bit strobe every BIT_CLKS = 34 clocks pulses GO on both halves for
//     one clock;
//   * the PCM input is a two-tone test signal (300 Hz and 1100 Hz) sampled
//     at 8 kHz, each sample held for N_DEC = 4 ADM bits;
//   * the transmitter's ADM output, taken one clock after each strobe and
//     held, feeds the receiver, which starts one strobe later;
//   * the receiver's output is decimated by 4 back to 8 kHz.
//
// Checks:
//   * both halves are back in their wait state when each strobe is latched
//     (a missed strobe means the design is too slow for this workload);
//   * every ADM bit and every receiver PCM value equals an independent
//     integer model of the estimator (8-bit wrap-around, transmitter decides
//     +1 when PCM input > estimate);
//   * the signal-to-noise ratio of the 8 kHz output against the input is at
//     least MIN_SNR_DB.
// The test also counts the worst-case 34-clock transmitter conversion and
// fails if it never happens at this budget.
//
// The 8 kHz / 32 kHz rates, the 34-clock worst case and the decimation by
// picking every N-th value follow the original design. The test signal, its
// amplitude and the SNR limit are this testbench's own choices: the limit
// only confirms that the decoded signal follows the input (this signal gives
// about 15.7 dB), the exact comparison with the model is the real check.
module tb_codec_speech;
  localparam int    BIT_CLKS   = 34;     // clocks per ADM bit at 1.088 MHz
  localparam int    N_DEC      = 4;      // 32 kHz ADM / 8 kHz PCM
  localparam int    N_PCM      = 1600;   // 8 kHz samples (200 ms)
  localparam int    N_BITS     = N_PCM * N_DEC;
  localparam real   MIN_SNR_DB = 12.0;   // sanity limit; 15.7 dB is measured
  localparam real   PI         = 3.14159265358979;

  logic       clk = 1'b0;
  logic       rx_reset, rx_go, rx_adm_in, rx_ready;
  logic [7:0] rx_pcm_out, rx_bus_probe_n;
  logic       tx_reset, tx_go, tx_ready, tx_adm_out;
  logic [7:0] tx_pcm_in;
  logic       pad_test_in, pad_test_out;
  int checks = 0, failures = 0;

  adm_pcm_codec dut (
    .rx_clk(clk), .rx_reset, .rx_go, .rx_adm_in, .rx_ready, .rx_pcm_out, .rx_bus_probe_n,
    .tx_clk(clk), .tx_reset, .tx_go, .tx_pcm_in, .tx_ready, .tx_adm_out,
    .pad_test_in, .pad_test_out);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("%0t: %s", $time, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (N_BITS * BIT_CLKS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model of the estimator (shared by both halves) ----
  typedef struct {
    logic signed [7:0] s;    // step size S(k)
    logic signed [7:0] x;    // estimate x(k)
    logic              e1;   // e(k-1), 1 = +1
    logic              e2;   // e(k-2)
  } est_t;

  function automatic est_t est_step(est_t st, logic signed [7:0] pcm,
                                    output logic e_out);
    logic signed [7:0] mag, s;
    mag = (st.s < 0) ? -st.s : st.s;
    s   = (st.e1 ? mag : -mag) + (st.e2 ? 8'sd1 : -8'sd1);
    st.s = s;
    st.x = st.x + s;
    e_out = (pcm > st.x);
    st.e2 = st.e1;
    st.e1 = e_out;
    return st;
  endfunction

  // test signal, 8 kHz
  function automatic logic signed [7:0] sample(int n);
    real v;
    v = 40.0 * $sin(2.0 * PI * 300.0 * n / 8000.0)
      + 20.0 * $sin(2.0 * PI * 1100.0 * n / 8000.0);
    return 8'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  // worst-case conversions under the strobe budget
  int tx_low = 0, n_worst34 = 0;
  always @(posedge clk) begin
    if (tx_ready) begin
      if (tx_low == BIT_CLKS - 1) n_worst34 <= n_worst34 + 1;
      tx_low <= 0;
    end else tx_low <= tx_low + 1;
  end

  logic signed [7:0] pcm_of_bit [N_BITS];
  logic              tx_bit     [N_BITS];
  logic signed [7:0] tx_est     [N_BITS];

  initial begin
    est_t tx_m;
    logic e;
    int n_missed;
    real sig_pow, err_pow, snr_db;

    rx_reset = 1'b1; tx_reset = 1'b1;
    rx_go = 1'b0; tx_go = 1'b0; rx_adm_in = 1'b0;
    tx_pcm_in = 8'h00; pad_test_in = 1'b0;
    tx_m = '{s: 8'sd0, x: 8'sd0, e1: 1'b0, e2: 1'b0};
    n_missed = 0; sig_pow = 0.0; err_pow = 0.0;

    repeat (2) @(negedge clk);
    rx_reset = 1'b0; tx_reset = 1'b0;
    repeat (8) @(negedge clk);
    chk(rx_ready && tx_ready, "not ready after reset");

    for (int k = 0; k <= N_BITS; k++) begin
      // strobe k (k == N_BITS only collects the last results)
      if (k < N_BITS) begin
        if (k % N_DEC == 0) tx_pcm_in = sample(k / N_DEC);
        pcm_of_bit[k] = tx_pcm_in;
        tx_m = est_step(tx_m, tx_pcm_in, e);
        tx_bit[k] = e;
        tx_est[k] = tx_m.x;
        tx_go = 1'b1;
        rx_go = (k > 0);
      end
      @(negedge clk);
      tx_go = 1'b0; rx_go = 1'b0;
      // the strobe was latched at the last edge: both halves must be waiting
      if (k < N_BITS) begin
        chk(tx_ready, $sformatf("transmitter busy at strobe %0d", k));
        if (!tx_ready) n_missed++;
        if (k > 0) begin
          chk(rx_ready, $sformatf("receiver busy at strobe %0d", k));
          if (!rx_ready) n_missed++;
        end
      end
      // results of conversion k-1
      if (k > 0) begin
        chk(tx_adm_out == tx_bit[k-1],
            $sformatf("ADM bit %0d: got %0b, model %0b", k-1, tx_adm_out, tx_bit[k-1]));
        rx_adm_in = tx_adm_out;       // held through receiver conversion k
      end
      if (k > 1) begin
        // receiver conversion k-1 decoded bits 0..k-2: its estimate equals
        // the transmitter's after conversion k-2
        chk($signed(rx_pcm_out) == tx_est[k-2],
            $sformatf("RX PCM after %0d: got %0d, model %0d", k-1,
                      $signed(rx_pcm_out), tx_est[k-2]));
        // 8 kHz output: the value at the end of each held input sample
        if ((k - 1) % N_DEC == 0 && k - 1 >= N_DEC) begin
          real d, s;
          s = real'(pcm_of_bit[k-2]);
          d = s - real'($signed(rx_pcm_out));
          sig_pow += s * s;
          err_pow += d * d;
        end
      end
      if (k < N_BITS) repeat (BIT_CLKS - 1) @(negedge clk);
    end

    snr_db = 10.0 * $log10(sig_pow / (err_pow > 0.0 ? err_pow : 1.0e-9));
    $display("bits=%0d missed strobes=%0d worst-case conversions=%0d SNR=%0.1f dB",
             N_BITS, n_missed, n_worst34, snr_db);
    chk(n_missed == 0, "strobes missed");
    chk(n_worst34 > 0, "the 34-clock worst case never happened");
    chk(snr_db >= MIN_SNR_DB, $sformatf("SNR %0.1f dB below %0.1f dB", snr_db, MIN_SNR_DB));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
