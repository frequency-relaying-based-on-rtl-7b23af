// mutation - the +/-1 mutation of one W-bit parameter.
//
// With probability MUT_RATE/256 (the draw r below MUT_RATE) the parameter is
// moved by one code step, up when sgn is 0 and down when sgn is 1; otherwise
// it passes unchanged. Adding or subtracting 1 at a given rate is the
// method's; the rate (26/256, about 10 %) and the edge rule (clamp when WRAP
// is 0, wrap modulo 2^W when WRAP is 1) are this design's choices.
//
// Purely combinational.
module mutation #(
  parameter int       W        = 8,
  parameter bit       WRAP     = 1'b0,
  parameter bit [7:0] MUT_RATE = 8'd26
) (
  input  logic [W-1:0] x,
  input  logic [7:0]   r,
  input  logic         sgn,
  output logic [W-1:0] y
);

  always_comb begin
    y = x;
    if (r < MUT_RATE) begin
      if (sgn) y = (!WRAP && x == '0) ? x : x - 1'b1;
      else     y = (!WRAP && x == '1) ? x : x + 1'b1;
    end
  end

endmodule
