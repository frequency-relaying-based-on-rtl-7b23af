// tb_sample_rx - byte pairs become signed samples, low byte first; a lone
// byte followed by a pause longer than GAP_CLKS is dropped and the next pair
// is still read correctly.
module tb_sample_rx;
  localparam int GAP = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, byte_valid, sample_valid;
  logic [7:0] byte_data;
  logic signed [15:0] sample;
  logic signed [15:0] q [$];
  logic signed [15:0] e, s;
  int checks = 0, failures = 0;

  sample_rx #(.GAP_CLKS(GAP)) dut (.clk(clk), .rst_n(rst_n), .byte_data(byte_data),
    .byte_valid(byte_valid), .sample(sample), .sample_valid(sample_valid));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inputs change 1 time unit after a clock edge
  task automatic put(logic [7:0] b);
    byte_valid = 1; byte_data = b;
    @(posedge clk); #1;
    byte_valid = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  always @(posedge clk) if (rst_n && sample_valid) begin
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected sample %0d", sample); end
    else begin
      e = q.pop_front();
      if (sample !== e) begin failures++; $display("got %0d want %0d", sample, e); end
    end
  end

  initial begin
    rst_n = 0; byte_valid = 0; byte_data = 0;
    idle(3);
    rst_n = 1;
    idle(1);
    for (int t = 0; t < 100; t++) begin
      s = 16'($urandom);
      if (t == 0) s = -16'sd16384;
      q.push_back(s);
      put(s[7:0]);
      idle($urandom_range(0, 30));    // within the gap
      put(s[15:8]);
      idle($urandom_range(0, 80));
      if (t == 50) begin                                 // lost high byte
        put(8'h77);
        idle(GAP + 5);
      end
    end
    idle(5);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d samples lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
