// tb_adm_pcm_codec: end-to-end test of the codec chip at its default sizes.
//
// Part A replays the receiver's production test: 1024 clock-by-clock input
// words (RESET high for words 0-1, GO high from word 7, ADM_IN high up to word
// 159 and low after) and captures the PCM output at every READY rise after GO,
// as a logic analyser strobed by READY would. The 40 captures must equal the
// published analyser listing, which includes the wrap of the estimate from
// -123 to +115 when it runs past -128.
//
// Part B replays the back-to-back test: both halves share clock and RESET,
// the AND of the two READY outputs drives both GO inputs, the receiver's
// ADM_IN is high up to word 205, and the transmitter's PCM input is 0x6A while
// ADM_IN is high and 0x95 while it is low. At each rise of the common GO the
// transmitter's ADM output must equal the receiver's ADM input and the
// receiver's PCM output must follow the published 20-row listing.
//
// Part C links the two halves: the transmitter's ADM output, taken at each
// start of a conversion and held through it, drives the receiver's ADM input, and the receiver's PCM output must reproduce the
// transmitter's internal estimate one conversion later, over 1000+ samples
// (the receiver is started one sample after the transmitter).
//
// The test counts how often each mechanism occurs and fails if one never
// does: the reset procedure, the wait for GO while the other half is still
// busy, every conditional arc of both programs going each way, the 8-bit
// wrap-around of the estimate, the worst-case 34-state transmitter
// conversion, the probe pads and the pad test path.
module tb_adm_pcm_codec;
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

  localparam logic [7:0] RX_CAPT [40] = '{
    8'hFF, 8'hFF, 8'h00, 8'h02, 8'h05, 8'h09, 8'h0E, 8'h14, 8'h0F, 8'h09,
    8'h02, 8'hFA, 8'hF1, 8'hE7, 8'hDC, 8'hD0, 8'hC3, 8'hB5, 8'hA6, 8'h96,
    8'h85, 8'h73, 8'h60, 8'h4C, 8'h37, 8'h21, 8'h0A, 8'hF2, 8'hD9, 8'hBF,
    8'hA4, 8'h88, 8'h6B, 8'h4D, 8'h2E, 8'h0E, 8'hED, 8'hCB, 8'hA8, 8'h84};

  localparam logic [7:0] B2B_PCM [20] = '{
    8'hFF, 8'hFF, 8'h00, 8'h02, 8'h05, 8'h09, 8'h0E, 8'h14, 8'h0F, 8'h09,
    8'h02, 8'hFA, 8'hF1, 8'hE7, 8'hDC, 8'hD0, 8'hC3, 8'hB5, 8'hA6, 8'h96};

  // mechanism counters
  int n_reset_proc, n_wait_stall, n_wrap, n_worst34, n_probe, n_padtest;
  int rx_arc_t [int], rx_arc_f [int], tx_arc_t [int], tx_arc_f [int];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // watch the controllers' branch decisions
  logic [5:0] rx_st_q, tx_st_q;
  int tx_len, tx_len_cur;
  always @(posedge clk) begin
    rx_st_q <= dut.u_rx.u_fsm.state;
    tx_st_q <= dut.u_tx.u_fsm.state;
  end
  always @(negedge clk) begin
    int rs, rp, ts, tp;
    rs = int'(dut.u_rx.u_fsm.state); rp = int'(rx_st_q);
    ts = int'(dut.u_tx.u_fsm.state); tp = int'(tx_st_q);
    if (rp inside {3, 5, 11, 18, 28}) begin
      if (rs == rp + 1) rx_arc_t[rp]++; else rx_arc_f[rp]++;
    end
    if (rp == 2 && rs == 3) n_reset_proc++;
    if (tp inside {3, 5, 11, 18, 33}) begin
      if (ts == tp + 1) tx_arc_t[tp]++; else tx_arc_f[tp]++;
    end
    if (tp == 2 && ts == 3) n_reset_proc++;
    // transmitter conversion length, counted from leaving the wait state
    if (tp == 3 && ts == 4) begin
      if (tx_len_cur == 34) n_worst34++;
      tx_len_cur = 1;
    end else if (!(ts == 3 && tp == 3)) tx_len_cur++;
    // the waiting half idles while the other is busy
    if (rs == 3 && rp == 3 && !rx_go && tx_go == 1'b0 && !rx_reset && tx_ready == 1'b0)
      n_wait_stall++;
    // probe: in the wait state nothing drives the bus, so every probe is low
    if (rs == 3 && rp == 3) begin
      checks++;
      if (rx_bus_probe_n != 8'h00) begin failures++; $display("probe %h in wait state", rx_bus_probe_n); end
      else n_probe++;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ncap;
    logic ready_q, go_q;
    tx_len_cur = 0;
    // pad test path
    for (int i = 0; i < 4; i++) begin
      pad_test_in = i[0];
      #1 chk(pad_test_out == pad_test_in, "pad test path");
      n_padtest++;
    end

    // ---------------- Part A: receiver production test ----------------
    tx_reset = 1'b1; tx_go = 1'b0; tx_pcm_in = 8'h00;
    ncap = 0; ready_q = 1'b1;
    for (int w = 0; w < 1024; w++) begin
      @(negedge clk);
      rx_reset  = (w <= 1);
      rx_go     = (w >= 7);
      rx_adm_in = (w < 160);
      @(posedge clk); #1;
      if (rx_ready && !ready_q && w >= 7) begin
        if (ncap < 40)
          chk(rx_pcm_out == RX_CAPT[ncap], $sformatf("capture %0d: PCM %h expected %h",
              ncap, rx_pcm_out, RX_CAPT[ncap]));
        if (ncap > 0 && rx_pcm_out[7] == 1'b0 && RX_CAPT[ncap-1][7] == 1'b1 &&
            RX_CAPT[ncap-1] < 8'hC0 && rx_pcm_out > 8'h40) n_wrap++;
        ncap++;
      end
      ready_q = rx_ready;
    end
    chk(ncap >= 40, $sformatf("part A: %0d captures, expected at least 40", ncap));

    // ---------------- Part B: back-to-back test ----------------
    ncap = 0; go_q = 1'b1;
    for (int w = 0; w <= 640; w++) begin
      @(negedge clk);
      rx_reset  = (w <= 1);
      tx_reset  = (w <= 1);
      rx_adm_in = (w <= 205);
      tx_pcm_in = rx_adm_in ? 8'h6A : 8'h95;
      #1;
      rx_go = rx_ready & tx_ready;
      tx_go = rx_go;
      @(posedge clk); #1;
      rx_go = rx_ready & tx_ready;         // GO follows the READY outputs
      tx_go = rx_go;
      if (rx_go && !go_q && w >= 7) begin
        if (ncap < 20) begin
          chk(rx_pcm_out == B2B_PCM[ncap], $sformatf("b2b row %0d: RX PCM %h expected %h",
              ncap, rx_pcm_out, B2B_PCM[ncap]));
          chk(tx_adm_out == (ncap <= 6), $sformatf("b2b row %0d: TX ADM %0d", ncap, tx_adm_out));
          chk(rx_adm_in == (ncap <= 6), $sformatf("b2b row %0d: RX ADM %0d", ncap, rx_adm_in));
        end
        ncap++;
      end
      go_q = rx_go;
    end
    chk(ncap >= 20, $sformatf("part B: %0d conversions, expected at least 20", ncap));

    // ---------------- Part C: transmitter feeding the receiver ----------------
    // The receiver decodes the transmitter's ADM stream, starting one sample
    // after the transmitter so that it sees the stream from its first bit;
    // its estimate must then equal the transmitter's one conversion later. The PCM input is a triangle wave with random steps.
    ncap = 0; go_q = 1'b1;
    begin
      logic [7:0] tx_x_prev;
      int p;
      p = 0;
      for (int w = 0; w < 60000; w++) begin
        @(negedge clk);
        rx_reset = (w <= 1);
        tx_reset = (w <= 1);
        #1;
        tx_go = rx_ready & tx_ready & (w % 97 != 0);   // with occasional pauses
        rx_go = tx_go & (ncap > 0);     // the receiver starts one sample later
        @(posedge clk); #1;
        if (rx_ready && tx_ready && !go_q && w >= 7) begin
          if (ncap >= 1)
            chk(rx_pcm_out == tx_x_prev, $sformatf("link %0d: RX PCM %h, TX estimate %h",
                ncap, rx_pcm_out, tx_x_prev));
          tx_x_prev = dut.u_tx.u_dp.x_q;
          rx_adm_in = tx_adm_out;       // held for the whole next conversion
          // next PCM sample: triangle between -100 and 100, random slope
          p = ((ncap / 50) % 2 == 0) ? p + $urandom_range(0, 6) : p - $urandom_range(0, 6);
          if (p > 100) p = 100;
          if (p < -100) p = -100;
          tx_pcm_in = 8'(p);
          ncap++;
        end
        go_q = rx_ready && tx_ready;
      end
      chk(ncap > 1000, $sformatf("part C: %0d conversions", ncap));
    end

    // ---------------- mechanism coverage ----------------
    $display("reset procedures %0d, GO waits %0d, wraps %0d, 34-state conversions %0d",
             n_reset_proc, n_wait_stall, n_wrap, n_worst34);
    chk(n_reset_proc >= 5, "reset procedure");
    chk(n_wait_stall > 0, "receiver waiting for the transmitter");
    chk(n_wrap > 0, "estimate wrap-around");
    chk(n_worst34 > 0, "worst-case transmitter conversion");
    chk(n_probe > 0, "probe pads");
    chk(n_padtest > 0, "pad test path");
    for (int s = 0; s < 40; s++) begin
      if (s inside {3, 5, 11, 18, 28})
        chk(rx_arc_t.exists(s) && rx_arc_f.exists(s), $sformatf("receiver arc %0d both ways", s));
      if (s inside {3, 5, 11, 18, 33})
        chk(tx_arc_t.exists(s) && tx_arc_f.exists(s), $sformatf("transmitter arc %0d both ways", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
