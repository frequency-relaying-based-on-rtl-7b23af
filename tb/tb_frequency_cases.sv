// tb_frequency_cases - the relay tracking three disturbance-like frequency
// trajectories, streamed over the serial line one sample per 1.3 ms of
// signal time (samples are sent back to back in simulation, 7,600 clocks
// apart, which still leaves the GA time to finish):
//   A  load connection: 60 Hz, then a damped 1 Hz swing of 0.25 Hz
//   B  energisation:    60 Hz falling towards 59.4 Hz (time constant 0.4 s)
//   C  disconnection:   60 Hz rising towards 60.6 Hz (time constant 0.4 s)
// Each case runs 0.78 s (600 samples) after a 0.13 s steady lead-in. The
// trajectories are synthetic stand-ins shaped like such events. Checks per
// case: at least 95 % of raw estimates within 0.2 % of the true frequency;
// every smoothed value, once the filter has settled, within 0.2 % of the
// range the true frequency spanned over the last 0.1 s (the filter's delay
// at low frequency is about 0.045 s). Mean squared errors are printed.
// A fourth run repeats case A with a 2 % 3rd harmonic. A one-cycle fit of a
// pure sinusoid is biased by it, so there only the smoothed band is checked,
// widened to 0.5 %, and the raw error is reported.
module tb_frequency_cases;
  localparam int CPB = 16, SPACING = 7600, LEAD = 100, NS = 600;
  localparam real PI = 3.14159265358979;
  localparam real T = 1.3e-3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, uart_rxd, est_valid, filt_valid, busy, overrun, frame_err;
  logic [31:0] est_freq_hz, filt_freq_hz;
  ga_pkg::indiv_t est_best;
  logic [23:0] est_cost;
  int checks = 0, failures = 0;
  int n_in = 0, n_raw = 0, n_raw_miss = 0, n_ovr = 0;
  real ftrue [LEAD + NS];
  real se_raw, se_filt;
  int n_filt_judged;
  int cur_case;
  real band;
  real harm;

  freq_relay_top #(.CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(uart_rxd), .rng_start(8'd99),
    .est_valid(est_valid), .est_freq_hz(est_freq_hz), .est_best(est_best), .est_cost(est_cost),
    .filt_valid(filt_valid), .filt_freq_hz(filt_freq_hz), .busy(busy), .overrun(overrun),
    .frame_err(frame_err));

  initial begin
    repeat (4 * (LEAD + NS + 20) * SPACING) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic send_byte(logic [7:0] bt);
    uart_rxd = 0; idle(CPB);
    for (int i = 0; i < 8; i++) begin uart_rxd = bt[i]; idle(CPB); end
    uart_rxd = 1; idle(CPB);
  endtask

  function automatic real f_of(int c, real t);
    if (t <= 0.0) return 60.0;
    case (c)
      0:       return 60.0 - 0.25 * $exp(-t / 0.5) * $sin(2.0 * PI * 1.0 * t);
      1:       return 60.0 - 0.6 * (1.0 - $exp(-t / 0.4));
      default: return 60.0 + 0.6 * (1.0 - $exp(-t / 0.4));
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    int m;
    if (dut.sample_valid) n_in++;
    if (overrun) n_ovr++;
    m = n_in - 1;
    if (est_valid && m >= 0) begin
      real f, e;
      f = real'(est_freq_hz) / 16777216.0;
      e = f - ftrue[m];
      n_raw++;
      se_raw += e * e;
      if (e > 0.12 || e < -0.12) n_raw_miss++;
    end
    if (filt_valid && m >= 0) begin
      real g, e, lo, hi;
      g = real'(filt_freq_hz) / 16777216.0;
      e = g - ftrue[m];
      if (m >= LEAD) begin
        se_filt += e * e;
        n_filt_judged++;
        // true frequency over the last 0.1 s, widened by the 0.2 % band
        lo = 100.0; hi = 0.0;
        for (int j = m - 77; j <= m; j++) begin
          if (ftrue[j] < lo) lo = ftrue[j];
          if (ftrue[j] > hi) hi = ftrue[j];
        end
        checks++;
        if (g < lo - band || g > hi + band) begin
          failures++;
          $display("case %0d sample %0d: smoothed %.4f Hz outside [%.4f, %.4f]", cur_case, m, g, lo - band, hi + band);
        end
      end
    end
  end

  initial begin
    real ph, t;
    logic [15:0] s;
    se_raw = 0; se_filt = 0; n_filt_judged = 0;
    for (int c = 0; c < 4; c++) begin
      cur_case = c;
      band = c == 3 ? 0.3 : 0.12;
      harm = c == 3 ? 0.02 : 0.0;
      rst_n = 0; uart_rxd = 1;
      idle(5);
      rst_n = 1;
      idle(5);
      n_in = 0; n_raw = 0; n_raw_miss = 0; n_ovr = 0;
      se_raw = 0; se_filt = 0; n_filt_judged = 0;
      ph = 0.7;
      for (int n = 0; n < LEAD + NS; n++) begin
        t = real'(n - LEAD) * T;
        ftrue[n] = f_of(c == 3 ? 0 : c, t);
        s = 16'(int'($floor(16384.0 * 0.95 * ($sin(ph) + harm * $sin(3.0 * ph)) + 0.5)));
        ph += 2.0 * PI * ftrue[n] * T;
        send_byte(s[7:0]);
        send_byte(s[15:8]);
        idle(SPACING - 20 * CPB);
      end
      idle(SPACING);
      $display("case %0s: %0d runs, raw MSE %.3e Hz^2 (%0d outside 0.2 %%), smoothed MSE %.3e Hz^2",
               c == 0 ? "A" : c == 1 ? "B" : c == 2 ? "C" : "A + 3rd harmonic", n_raw, se_raw / n_raw, n_raw_miss, se_filt / n_filt_judged);
      checks += 3;
      if (n_raw != LEAD + NS - 14) begin failures++; $display("%0d runs", n_raw); end
      if (n_ovr != 0) begin failures++; $display("%0d overruns", n_ovr); end
      if (c != 3 && n_raw_miss * 20 > n_raw) begin failures++; $display("too many raw estimates off"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
