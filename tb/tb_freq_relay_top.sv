// tb_freq_relay_top - end to end: a PC-like sender streams a phase-continuous
// sinusoid over the serial line (8N1, 16 clocks per bit to keep the run
// short; all GA sizes at their defaults). The frequency steps from 60.0 Hz
// to 59.5 Hz after 80 samples. Checks: no estimate before the window holds
// 15 samples; at least 90 % of the raw estimates whose window lies in one
// segment are within 0.2 % of the true frequency (a GA run can end in a
// poor optimum); every smoothed value is within 0.2 % of the truth while
// the frequency is 60 Hz (the filter starts at 60 Hz) and again from 75
// samples (about 0.1 s, the filter's settling time) after the step.
// Mechanisms that must each happen at least once: GA run, filtered output,
// overrun (two samples sent back to back), serial frame error, byte-pair
// resynchronisation after a lost byte.
module tb_freq_relay_top;
  localparam int CPB = 16, GAP = 400, SPACING = 8000, NS = 200, STEP_AT = 80;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, uart_rxd, est_valid, filt_valid, busy, overrun, frame_err;
  logic [7:0] rng_start;
  logic [31:0] est_freq_hz, filt_freq_hz;
  ga_pkg::indiv_t est_best;
  logic [23:0] est_cost;
  int checks = 0, failures = 0;
  int n_sent = 0, n_est = 0, n_filt = 0, n_overrun = 0, n_ferr = 0, n_resync = 0;
  real true_f [NS];
  int n_judged = 0, n_miss = 0;
  real last_filt;

  freq_relay_top #(.CLKS_PER_BIT(CPB), .GAP_CLKS(GAP)) dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(uart_rxd), .rng_start(rng_start),
    .est_valid(est_valid), .est_freq_hz(est_freq_hz), .est_best(est_best), .est_cost(est_cost),
    .filt_valid(filt_valid), .filt_freq_hz(filt_freq_hz), .busy(busy), .overrun(overrun),
    .frame_err(frame_err));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic send_byte(logic [7:0] bt, bit stop);
    uart_rxd = 0; idle(CPB);
    for (int i = 0; i < 8; i++) begin uart_rxd = bt[i]; idle(CPB); end
    uart_rxd = stop; idle(CPB);
    uart_rxd = 1; idle(2);
  endtask

  task automatic send_sample(logic [15:0] s);
    send_byte(s[7:0], 1'b1);
    send_byte(s[15:8], 1'b1);
  endtask

  // which sample index the newest window sample has: counted at sample_valid
  int n_in = 0;
  always @(posedge clk) if (rst_n && dut.sample_valid) n_in++;

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (frame_err) n_ferr++;
    if (dut.u_srx.have_lo && dut.u_srx.gap == 0 && !dut.rx_valid) n_resync++;
    if (filt_valid) begin n_filt++; last_filt = real'(filt_freq_hz) / 16777216.0; end
    if (est_valid) begin
      real f;
      int newest;
      f = real'(est_freq_hz) / 16777216.0;
      newest = n_in - 1;
      n_est++;
      checks++;
      if (n_in < 15) begin failures++; $display("estimate before the window was full"); end
      // window u[newest-14 .. newest] within one frequency segment
      if (newest - 14 >= STEP_AT || newest < STEP_AT) begin
        n_judged++;
        if (f - true_f[newest] > 0.12 || true_f[newest] - f > 0.12) begin
          n_miss++;
          $display("sample %0d: raw estimate %.4f Hz, true %.4f Hz", newest, f, true_f[newest]);
        end
      end
    end
    if (filt_valid) begin
      real g;
      int newest;
      g = real'(filt_freq_hz) / 16777216.0;
      newest = n_in - 1;
      if ((newest >= 20 && newest < STEP_AT) || newest >= STEP_AT + 75) begin
        checks++;
        if (g - true_f[newest] > 0.12 || true_f[newest] - g > 0.12) begin
          failures++;
          $display("sample %0d: smoothed %.4f Hz, true %.4f Hz", newest, g, true_f[newest]);
        end
      end
    end
  end

  initial begin
    real ph, f;
    logic [15:0] s;
    rst_n = 0; uart_rxd = 1; rng_start = 8'd42;
    idle(5);
    rst_n = 1;
    idle(5);
    ph = 0.0;
    for (int n = 0; n < NS; n++) begin
      f = (n < STEP_AT) ? 60.0 : 59.5;
      true_f[n] = f;
      s = 16'(int'($floor(16384.0 * 0.97 * $sin(ph) + 0.5)));
      ph += 2.0 * 3.14159265358979 * f * 1.3e-3;
      if (n == 20) begin
        send_byte(8'h00, 1'b0);            // a corrupted frame: dropped
        idle(2 * CPB);
        send_byte(8'h55, 1'b1);            // a lone byte: dropped after the gap
        idle(GAP + 10);
      end
      send_sample(s);
      n_sent++;
      // samples 30 and 31 back to back: the second arrives while the GA runs
      if (n != 30) idle(SPACING - 20 * CPB);
    end
    idle(SPACING);
    checks += 8;
    if (n_miss * 10 > n_judged) begin failures++; $display("%0d of %0d raw estimates off", n_miss, n_judged); end
    if (n_est == 0)     begin failures++; $display("no GA run finished"); end
    if (n_filt == 0)    begin failures++; $display("no filtered output"); end
    if (n_overrun == 0) begin failures++; $display("no overrun happened"); end
    if (n_ferr == 0)    begin failures++; $display("no frame error happened"); end
    if (n_resync == 0)  begin failures++; $display("no byte-pair resynchronisation happened"); end
    if (n_est != NS - 14 - n_overrun) begin failures++; $display("%0d runs for %0d samples", n_est, NS); end
    if (last_filt < 59.38 || last_filt > 59.62) begin failures++; $display("filtered %.4f Hz", last_filt); end
    $display("raw estimates within 0.2 %%: %0d of %0d", n_judged - n_miss, n_judged);
    $display("runs=%0d filtered=%0d overruns=%0d frame_errors=%0d resyncs=%0d last_filtered=%.4f",
             n_est, n_filt, n_overrun, n_ferr, n_resync, last_filt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
