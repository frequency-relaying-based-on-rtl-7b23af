// crossover - the five-point crossover of one W-bit parameter.
//
// From the two parent values x1 and x2 the block forms their mean
// m = (x1 + x2) >> 1 and their distance d = |x1 - x2|, and returns one of
// the five points m - d, x1, m, x2, m + d, each with probability close to
// 1/5. The five points and the equal chances are the method's; the choice is
// floor(r * 5 / 256) for an 8-bit random number r (52 of 256 values pick
// m - d, 51 each of the others), which is this design's.
// Points outside [0, 2^W - 1] are clamped when WRAP is 0 (amplitude,
// frequency) and wrap modulo 2^W when WRAP is 1 (phase, a circular
// quantity); both rules are this design's choice.
//
// Purely combinational.
module crossover #(
  parameter int W    = 8,
  parameter bit WRAP = 1'b0
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [7:0]   r,
  output logic [W-1:0] y
);

  logic [W:0]   sum;
  logic [W-1:0] m, d;
  logic [W:0]   hi;      // m + d with carry
  logic [W:0]   lo;      // m - d with borrow
  logic [2:0]   pick;
  logic [10:0]  r5;

  always_comb begin
    sum  = {1'b0, x1} + {1'b0, x2};
    m    = sum[W:1];
    d    = (x1 > x2) ? x1 - x2 : x2 - x1;
    hi   = {1'b0, m} + {1'b0, d};
    lo   = {1'b0, m} - {1'b0, d};
    r5   = {3'b0, r} * 11'd5;
    pick = r5[10:8];
    unique case (pick)
      3'd0:    y = (!WRAP && lo[W]) ? '0 : lo[W-1:0];
      3'd1:    y = x1;
      3'd2:    y = m;
      3'd3:    y = x2;
      default: y = (!WRAP && hi[W]) ? '1 : hi[W-1:0];
    endcase
  end

endmodule
