// tb_uart_rx - sends random bytes as 8N1 frames at 32 clocks per bit with
// small timing skew, one frame with a low stop bit and one start-bit glitch;
// checks each byte, the frame error and that nothing else comes out.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, rxd, valid, frame_err;
  logic [7:0] data;
  logic [7:0] q [$];
  logic [7:0] e, b;
  int checks = 0, failures = 0, nerr = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst_n(rst_n), .rxd(rxd), .data(data),
                                     .valid(valid), .frame_err(frame_err));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the line changes 1 time unit after a clock edge
  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic send(logic [7:0] bt, bit stop, int cpb);
    rxd = 0; idle(cpb);
    for (int i = 0; i < 8; i++) begin rxd = bt[i]; idle(cpb); end
    rxd = stop; idle(cpb);
    rxd = 1;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected byte %h", data); end
      else begin
        e = q.pop_front();
        if (data !== e) begin failures++; $display("got %h want %h", data, e); end
      end
    end
    if (frame_err) nerr++;
  end

  initial begin
    rst_n = 0; rxd = 1;
    idle(3);
    rst_n = 1;
    idle(5);
    for (int t = 0; t < 60; t++) begin
      b = 8'($urandom);
      q.push_back(b);
      send(b, 1'b1, CPB - 1 + (t % 3));      // 31..33 clocks per bit
      idle($urandom_range(0, 20));
    end
    send(8'h5a, 1'b0, CPB);                  // bad stop bit: no byte
    idle(3 * CPB);
    rxd = 0; idle(3); rxd = 1;   // glitch shorter than half a bit
    idle(3 * CPB);
    q.push_back(8'hc3);
    send(8'hc3, 1'b1, CPB);
    idle(3 * CPB);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("%0d bytes lost", q.size()); end
    if (nerr != 1) begin failures++; $display("%0d frame errors, want 1", nerr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
