// output_filter - 2nd-order Butterworth low-pass on the frequency estimate.
//
// The raw GA estimate jitters from window to window, so it is smoothed by a
// second-order Butterworth low-pass with a 5 Hz cutoff, run once per
// estimate (every 1.3 ms, fs = 769.2 Hz). The filter type, order and cutoff
// follow the method. The realisation is this design's: direct form I on the
// deviation x = f - 60 Hz (Q8.24 Hz), with bilinear-transform coefficients in
// Q2.30,
//   K = tan(pi*5/769.23), g = 1/(1 + sqrt(2)*K + K^2),
//   b0 = b2 = K^2*g, b1 = 2*b0, a1 = 2*(K^2 - 1)*g, a2 = (1 - sqrt(2)*K + K^2)*g,
//   y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] - a1*y[n-1] - a2*y[n-2].
// The state starts at 60 Hz. DC gain is 1 to within one part in 10^6.
//
// Interface: in_valid/in_hz (unsigned Q8.24 Hz); out_valid/out_hz one clock
// later.
module output_filter #(
  parameter longint B0 = 435116,        // round(b0 * 2^30)
  parameter longint A1 = -2085483541,   // round(a1 * 2^30)
  parameter longint A2 = 1013482182     // round(a2 * 2^30)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_hz,
  output logic        out_valid,
  output logic [31:0] out_hz
);

  localparam logic [31:0] F0 = 32'd60 << 24;

  logic signed [32:0] x0, x1, x2, y1, y2;
  logic signed [63:0] acc;
  logic signed [32:0] y0;

  assign x0 = $signed({1'b0, in_hz}) - $signed({1'b0, F0});

  always_comb begin
    acc = 64'(B0) * 64'(x0) + 64'(2 * B0) * 64'(x1) + 64'(B0) * 64'(x2)
        - 64'(A1) * 64'(y1) - 64'(A2) * 64'(y2);
    y0  = 33'(acc >>> 30);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
      out_valid <= 1'b0;
      out_hz    <= F0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x0; x2 <= x1;
        y1 <= y0; y2 <= y1;
        out_hz <= 32'($signed({1'b0, F0}) + y0);
      end
    end
  end

endmodule
