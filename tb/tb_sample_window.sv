// tb_sample_window - pushes 40 samples with idle clocks between them and
// checks win[k] = u[n-k] and the full flag after every sample.
module tb_sample_window;
  localparam int N = 15;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, sample_valid, full;
  logic signed [15:0] sample;
  logic signed [15:0] win [N];
  int hist [$];
  int checks = 0, failures = 0;

  sample_window #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .sample(sample),
    .sample_valid(sample_valid), .win(win), .full(full));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; sample_valid = 0; sample = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      automatic int s = int'($urandom_range(0, 65535)) - 32768;
      hist.push_front(s);
      sample_valid <= 1; sample <= 16'(s); @(posedge clk); sample_valid <= 0;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #1;
      checks++;
      if (full !== (t >= N - 1)) begin failures++; $display("full=%0d after %0d samples", full, t + 1); end
      for (int k = 0; k < N && k < hist.size(); k++) begin
        checks++;
        if (int'(win[k]) != hist[k]) begin failures++; $display("t=%0d k=%0d got %0d want %0d", t, k, win[k], hist[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
