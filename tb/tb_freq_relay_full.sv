// tb_freq_relay_full - the relay at its default sizes: 25 MHz clock,
// 115,200 baud serial line, one sample every 1.3 ms (32,500 clocks), a
// 60.4 Hz, 0.93 pu sinusoid. Eighteen samples give four GA runs. Checks:
// the first estimate follows the 15th sample; each run ends before the
// next sample arrives (the real-time condition: the whole GA within one
// sampling interval) and takes under 0.4 ms; each estimate is within
// 0.2 % of 60.4 Hz; no overrun.
module tb_freq_relay_full;
  localparam int CPB = 217, SPACING = 32500, NS = 18;
  localparam real F_TRUE = 60.4;
  logic clk = 0;
  always #20 clk = ~clk;     // 25 MHz
  logic rst_n, uart_rxd, est_valid, filt_valid, busy, overrun, frame_err;
  logic [31:0] est_freq_hz, filt_freq_hz;
  ga_pkg::indiv_t est_best;
  logic [23:0] est_cost;
  int checks = 0, failures = 0, n_est = 0, n_overrun = 0, n_in = 0;
  int cyc = 0, t_busy = 0;

  freq_relay_top dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(uart_rxd), .rng_start(8'd5),
    .est_valid(est_valid), .est_freq_hz(est_freq_hz), .est_best(est_best), .est_cost(est_cost),
    .filt_valid(filt_valid), .filt_freq_hz(filt_freq_hz), .busy(busy), .overrun(overrun),
    .frame_err(frame_err));

  initial begin
    repeat (SPACING * (NS + 3)) @(posedge clk);
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

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.sample_valid) n_in++;
      if (overrun) n_overrun++;
      if (busy && t_busy == 0) t_busy = cyc;
      if (est_valid) begin
        real f;
        f = real'(est_freq_hz) / 16777216.0;
        n_est++;
        $display("estimate %0d after sample %0d: %.4f Hz, A=%.4f, GA run %0d clocks", n_est, n_in,
                 f, 0.75 + real'(est_best.a) / 1024.0, cyc - t_busy);
        checks += 3;
        if (n_in < 15) begin failures++; $display("estimate before the window was full"); end
        if (f - F_TRUE > 0.12 || F_TRUE - f > 0.12) begin failures++; $display("frequency off"); end
        if (cyc - t_busy > 10000) begin failures++; $display("run longer than 0.4 ms"); end
        t_busy = 0;
      end
      if (dut.sample_valid && busy) begin
        checks++; failures++; $display("sample arrived while the GA was still running");
      end
    end
  end

  initial begin
    real ph;
    logic [15:0] s;
    rst_n = 0; uart_rxd = 1;
    idle(5);
    rst_n = 1;
    idle(5);
    ph = 0.3;
    for (int n = 0; n < NS; n++) begin
      s = 16'(int'($floor(16384.0 * 0.93 * $sin(ph) + 0.5)));
      ph += 2.0 * 3.14159265358979 * F_TRUE * 1.3e-3;
      send_byte(s[7:0]);
      send_byte(s[15:8]);
      idle(SPACING - 20 * CPB);
    end
    checks += 2;
    if (n_est != NS - 14) begin failures++; $display("%0d estimates, want %0d", n_est, NS - 14); end
    if (n_overrun != 0) begin failures++; $display("%0d overruns", n_overrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
