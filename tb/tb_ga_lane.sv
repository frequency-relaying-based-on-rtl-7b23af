// tb_ga_lane - drives one lane with a fixed random population and random
// words, one slot per clock, first in the initial-generation mode and then
// in breeding mode. Each child and its cost are recomputed by the reference
// (draw indices, tournaments, crossover, mutation, the window cost); the
// 7-clock latency is checked too.
module tb_ga_lane;
  import ga_pkg::*;
  import ga_ref_pkg::*;
  localparam int POP = 30, N = 15, NS = 120;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, init, issue, out_valid, busy;
  logic [4:0] issue_tag, out_tag;
  rnd_t rnd;
  logic [4:0] rd_idx [4];
  member_t rd_data [4];
  member_t out_member;
  logic signed [15:0] win [N];
  member_t pop [POP];
  int u [];
  rnd_t words [NS];
  bit   mode  [NS];
  int   icyc  [NS];
  int cyc = 0, nout = 0, checks = 0, failures = 0;

  ga_lane #(.POP(POP), .N(N)) dut (.clk(clk), .rst_n(rst_n), .init(init), .win(win),
    .issue(issue), .issue_tag(issue_tag), .rnd(rnd), .rd_idx(rd_idx), .rd_data(rd_data),
    .out_valid(out_valid), .out_member(out_member), .out_tag(out_tag), .busy(busy));

  for (genvar j = 0; j < 4; j++) begin : g_rd
    assign rd_data[j] = pop[rd_idx[j]];
  end

  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic member_t expected(int s);
    rnd_t w = words[s];
    member_t c [4], p1, p2;
    indiv_t ch;
    if (mode[s]) ch = indiv_t'(w[IND_W-1:0]);
    else begin
      for (int j = 0; j < 4; j++) c[j] = pop[(int'(w.sel[j]) * POP) >> 8];
      p1 = (c[1].cost < c[0].cost) ? c[1] : c[0];
      p2 = (c[3].cost < c[2].cost) ? c[3] : c[2];
      ch.a  = NA'(mut_ref(xo_ref(p1.ind.a,  p2.ind.a,  w.xo[0], NA, 0), w.mut[0], w.sgn[0], NA, 0, 26));
      ch.f  = NF'(mut_ref(xo_ref(p1.ind.f,  p2.ind.f,  w.xo[1], NF, 0), w.mut[1], w.sgn[1], NF, 0, 26));
      ch.th = NT'(mut_ref(xo_ref(p1.ind.th, p2.ind.th, w.xo[2], NT, 1), w.mut[2], w.sgn[2], NT, 1, 26));
    end
    return '{ind: ch, cost: COST_W'(cost_ref(ch, N, u))};
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    member_t e;
    int s;
    s = nout;
    e = expected(s);
    checks += 2;
    if (out_member !== e || int'(out_tag) != s % POP) begin
      failures++;
      $display("slot %0d: got %h/%0d want %h/%0d", s, out_member.ind, out_member.cost, e.ind, e.cost);
    end
    // out_valid rises 7 edges after the issuing edge and is seen at the 8th
    if (cyc - icyc[s] != 8) begin failures++; $display("slot %0d latency %0d", s, cyc - icyc[s]); end
    nout++;
  end

  // the random word arrives one clock after issue, as from the ROM
  int widx = 0;
  always @(posedge clk) if (issue) begin rnd <= words[widx]; widx++; end

  initial begin
    u = new[N];
    for (int k = 0; k < N; k++) begin
      u[k] = int'($floor(16384.0 * 0.95 * $sin(2.0 * 3.14159265358979 * 59.2 * k * 1.3e-3 + 4.0) + 0.5));
      win[k] = 16'(u[k]);
    end
    for (int i = 0; i < POP; i++) pop[i] = member_t'({$urandom, $urandom, $urandom});
    for (int i = 0; i < 5; i++) pop[i].cost = 24'd1000;   // force some ties
    for (int s = 0; s < NS; s++) begin
      words[s] = rnd_t'({$urandom, $urandom, $urandom});
      mode[s]  = (s < 30);
    end
    rst_n = 0; init = 1; issue = 0; issue_tag = 0; rnd = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      if (s == 30) begin      // change mode only between drained runs
        issue <= 0;
        repeat (10) @(posedge clk);
        init <= 0;
      end
      issue <= 1; issue_tag <= 5'(s % POP); icyc[s] = cyc + 1;
      @(posedge clk);
    end
    issue <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (nout != NS || busy) begin failures++; $display("%0d results of %0d", nout, NS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
