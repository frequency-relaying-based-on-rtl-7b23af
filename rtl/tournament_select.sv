// tournament_select - two binary tournaments that pick the two parents.
//
// Four members a, b, c, d, drawn at random from the current population, meet
// in pairs: parent 1 is the better of {a, b}, parent 2 the better of {c, d}.
// This is the tournament of the method. "Better" means the lower cost (the
// window error sum), which orders members the same way as the
// method's "higher fitness". On equal cost a (resp. c) wins; that tie rule is
// this design's choice.
//
// Purely combinational.
module tournament_select
  import ga_pkg::*;
(
  input  member_t a,
  input  member_t b,
  input  member_t c,
  input  member_t d,
  output member_t p1,
  output member_t p2
);

  always_comb begin
    p1 = (b.cost < a.cost) ? b : a;
    p2 = (d.cost < c.cost) ? d : c;
  end

endmodule
