// ga_lane - the circuit that produces one new individual per clock.
//
// The method speeds the GA up by building p copies of the circuit that makes
// one offspring; this is that circuit, as a pipeline that takes a new slot
// every clock:
//   L0  the slot is issued; the random table reads this lane's word.
//   L1  four members a, b, c, d are drawn from the current population
//       (index = (r * POP) >> 8) and two tournaments give parents p1, p2.
//   L2  five-point crossover and +/-1 mutation of A, f and theta give the
//       child; in the initial generation the child is the random word's low
//       44 bits instead (a random individual).
//   F   fitness_unit evaluates the child's cost in 4 more clocks.
// The stage order and operators are the method's; the pipeline cut and the
// random-word fields are this design's choices.
//
// Interface: issue/issue_tag at L0 (rnd must arrive one clock later, as from
// random_rom), rd_idx/rd_data to the population memory, out_valid/out_member/
// out_tag LAT = 7 clocks after issue. busy is high while any stage holds a
// slot. win must stay constant while busy.
module ga_lane
  import ga_pkg::*;
#(
  parameter int       POP      = 30,
  parameter int       N        = 15,
  parameter bit [7:0] MUT_RATE = 8'd26,
  localparam int      IW       = $clog2(POP)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       init,
  input  logic signed [SAMPLE_W-1:0] win [N],
  input  logic                       issue,
  input  logic [IW-1:0]              issue_tag,
  input  rnd_t                       rnd,
  output logic [IW-1:0]              rd_idx  [4],
  input  member_t                    rd_data [4],
  output logic                       out_valid,
  output member_t                    out_member,
  output logic [IW-1:0]              out_tag,
  output logic                       busy
);

  // L0: slot waits for its random word
  logic          v0;
  logic [IW-1:0] t0;
  always_ff @(posedge clk) begin
    if (!rst_n) v0 <= 1'b0;
    else        v0 <= issue;
    t0 <= issue_tag;
  end

  // L1: selection
  member_t p1, p2;
  for (genvar j = 0; j < 4; j++) begin : g_draw
    logic [15:0] scaled;
    assign scaled    = rnd.sel[j] * 16'(POP);
    assign rd_idx[j] = IW'(scaled[15:8]);
  end

  tournament_select u_sel (
    .a(rd_data[0]), .b(rd_data[1]), .c(rd_data[2]), .d(rd_data[3]),
    .p1(p1), .p2(p2)
  );

  logic          v1;
  logic [IW-1:0] t1;
  indiv_t        p1_q, p2_q;
  rnd_t          rnd_q;
  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= v0;
    t1    <= t0;
    p1_q  <= p1.ind;
    p2_q  <= p2.ind;
    rnd_q <= rnd;
  end

  // L2: crossover and mutation
  indiv_t xo, mu, child;

  crossover #(.W(NA), .WRAP(1'b0)) u_xo_a (.x1(p1_q.a),  .x2(p2_q.a),  .r(rnd_q.xo[0]), .y(xo.a));
  crossover #(.W(NF), .WRAP(1'b0)) u_xo_f (.x1(p1_q.f),  .x2(p2_q.f),  .r(rnd_q.xo[1]), .y(xo.f));
  crossover #(.W(NT), .WRAP(1'b1)) u_xo_t (.x1(p1_q.th), .x2(p2_q.th), .r(rnd_q.xo[2]), .y(xo.th));

  mutation #(.W(NA), .WRAP(1'b0), .MUT_RATE(MUT_RATE)) u_mu_a (.x(xo.a),  .r(rnd_q.mut[0]), .sgn(rnd_q.sgn[0]), .y(mu.a));
  mutation #(.W(NF), .WRAP(1'b0), .MUT_RATE(MUT_RATE)) u_mu_f (.x(xo.f),  .r(rnd_q.mut[1]), .sgn(rnd_q.sgn[1]), .y(mu.f));
  mutation #(.W(NT), .WRAP(1'b1), .MUT_RATE(MUT_RATE)) u_mu_t (.x(xo.th), .r(rnd_q.mut[2]), .sgn(rnd_q.sgn[2]), .y(mu.th));

  assign child = init ? indiv_t'(rnd_q[IND_W-1:0]) : mu;

  logic          v2;
  logic [IW-1:0] t2;
  indiv_t        child_q;
  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    t2      <= t1;
    child_q <= child;
  end

  // F: cost of the child
  logic              fv;
  indiv_t            find;
  logic [COST_W-1:0] fcost;
  logic              fbusy;
  fitness_unit #(.N(N), .TAGW(IW)) u_fit (
    .clk(clk), .rst_n(rst_n), .win(win),
    .in_valid(v2), .in_ind(child_q), .in_tag(t2),
    .out_valid(fv), .out_ind(find), .out_tag(out_tag), .out_cost(fcost), .busy(fbusy)
  );

  assign out_valid  = fv;
  assign out_member = '{ind: find, cost: fcost};
  assign busy       = v0 | v1 | v2 | fbusy;

endmodule
