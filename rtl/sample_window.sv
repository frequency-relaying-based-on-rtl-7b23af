// sample_window - the sliding window of the last N samples.
//
// The cost function compares a candidate sinusoid with the most recent N
// samples u[n], u[n-1] .. u[n-N+1]. Each new sample enters at position 0 and
// the oldest drops out of position N-1, so win[k] = u[n-k]. full goes high
// once N samples have arrived since reset. The sliding window and N = 15
// follow the method; the shift-register form is this design's.
//
// Interface: sample/sample_valid in; win/full change at the clock edge that
// takes a sample.
module sample_window
  import ga_pkg::*;
#(
  parameter int N = 15
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [SAMPLE_W-1:0] sample,
  input  logic                       sample_valid,
  output logic signed [SAMPLE_W-1:0] win [N],
  output logic                       full
);

  logic [$clog2(N+1)-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) win[k] <= '0;
      count <= '0;
    end else if (sample_valid) begin
      win[0] <= sample;
      for (int k = 1; k < N; k++) win[k] <= win[k-1];
      if (32'(count) < N) count <= count + 1'b1;
    end
  end

  assign full = (32'(count) == N);

endmodule
