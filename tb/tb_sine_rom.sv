// tb_sine_rom - checks all 1,024 table entries against round(16384*sin) and
// the one-clock read latency.
module tb_sine_rom;
  import ga_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0] addr;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  sine_rom dut (.clk(clk), .addr(addr), .data(data));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      addr <= 10'(i);
      @(posedge clk);   // address taken at this edge
      #1;
      checks++;
      if (int'(data) != sin_ref(i)) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %0d want %0d", i, data, sin_ref(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
