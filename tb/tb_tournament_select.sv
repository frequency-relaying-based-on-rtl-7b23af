// tb_tournament_select - random quadruples; p1 must be the lower-cost of
// {a,b} (a on a tie), p2 the lower-cost of {c,d}.
module tb_tournament_select;
  import ga_pkg::*;
  member_t a, b, c, d, p1, p2;
  int checks = 0, failures = 0;

  tournament_select dut (.a(a), .b(b), .c(c), .d(d), .p1(p1), .p2(p2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic member_t rnd_member(int cmax);
    member_t m;
    m.ind  = indiv_t'({$urandom, $urandom});
    m.cost = COST_W'($urandom_range(cmax));
    return m;
  endfunction

  initial begin
    member_t w1, w2;
    for (int t = 0; t < 2000; t++) begin
      a = rnd_member(t < 1000 ? 20 : 1 << 20);
      b = rnd_member(t < 1000 ? 20 : 1 << 20);
      c = rnd_member(t < 1000 ? 20 : 1 << 20);
      d = rnd_member(t < 1000 ? 20 : 1 << 20);
      #1;
      if (b.cost < a.cost) w1 = b; else w1 = a;
      if (d.cost < c.cost) w2 = d; else w2 = c;
      checks += 2;
      if (p1 !== w1) begin failures++; $display("p1 wrong: a=%0d b=%0d", a.cost, b.cost); end
      if (p2 !== w2) begin failures++; $display("p2 wrong: c=%0d d=%0d", c.cost, d.cost); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
