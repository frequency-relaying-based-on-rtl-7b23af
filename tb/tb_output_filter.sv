// tb_output_filter - feeds a frequency step 60 -> 61 Hz and a 60.5 Hz tone
// modulated at 40 Hz; compares every output with a double-precision model
// of the 5 Hz Butterworth low-pass (tolerance 1e-4 Hz), checks the DC gain
// after settling, the 40 Hz attenuation and the one-clock latency.
module tb_output_filter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  logic [31:0] in_hz, out_hz;
  int checks = 0, failures = 0;
  real b0, b1, b2, a1, a2, x1, x2, y1, y2;

  output_filter dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_hz(in_hz),
                     .out_valid(out_valid), .out_hz(out_hz));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real hz(logic [31:0] q);
    return real'(q) / 16777216.0;
  endfunction

  task automatic step(real f, output real y);
    real x, y0;
    x  = f - 60.0;
    y0 = b0 * x + b1 * x1 + b2 * x2 - a1 * y1 - a2 * y2;
    x2 = x1; x1 = x; y2 = y1; y1 = y0;
    y  = 60.0 + y0;
    in_valid <= 1; in_hz <= 32'(longint'(f * 16777216.0)); @(posedge clk); in_valid <= 0;
    #1;
    checks++;
    if (!out_valid) begin failures++; $display("no output one clock after input"); end
    if (hz(out_hz) - y > 1e-4 || y - hz(out_hz) > 1e-4) begin
      failures++; $display("in %.4f out %.6f model %.6f", f, hz(out_hz), y);
    end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    real K, g, y, ymax, ymin;
    K  = $tan(3.14159265358979 * 5.0 * 1.3e-3);
    g  = 1.0 / (1.0 + $sqrt(2.0) * K + K * K);
    b0 = K * K * g; b1 = 2.0 * b0; b2 = b0;
    a1 = 2.0 * (K * K - 1.0) * g; a2 = (1.0 - $sqrt(2.0) * K + K * K) * g;
    x1 = 0; x2 = 0; y1 = 0; y2 = 0;
    rst_n = 0; in_valid = 0; in_hz = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 checks++;
    if (hz(out_hz) != 60.0) begin failures++; $display("reset value %.4f", hz(out_hz)); end
    for (int n = 0; n < 800; n++) step(61.0, y);
    checks++;
    if (hz(out_hz) < 60.999 || hz(out_hz) > 61.001) begin failures++; $display("settled at %.5f", hz(out_hz)); end
    // 40 Hz ripple of +/-0.5 Hz around 60.5 Hz must shrink below +/-0.01 Hz
    ymax = 0; ymin = 100;
    for (int n = 0; n < 800; n++) begin
      step(60.5 + 0.5 * $sin(2.0 * 3.14159265358979 * 40.0 * n * 1.3e-3), y);
      if (n > 600) begin
        if (hz(out_hz) > ymax) ymax = hz(out_hz);
        if (hz(out_hz) < ymin) ymin = hz(out_hz);
      end
    end
    checks++;
    if (ymax - ymin > 0.02) begin failures++; $display("ripple %.4f Hz", ymax - ymin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
