// tb_ga_core - full GA runs (30 individuals, 300 generations, 2 lanes) on
// windows of clean sinusoids of known amplitude, frequency and phase.
// Checks per run: the reported cost equals the window cost for the reported
// individual; the frequency is within 0.2 % of the true one; the elite cost
// never rises from one generation to the next; the run takes exactly one
// start clock, ceil(POP/P) + 9 clocks for the initial population and
// ceil((POP-1)/P) + 9 clocks per generation (7,225 clocks at the defaults);
// a start while busy is ignored.
module tb_ga_core;
  import ga_pkg::*;
  import ga_ref_pkg::*;
  localparam int POP = 30, NGEN = 300, P = 2, N = 15;
  localparam int GEN_CLKS  = (POP - 1 + P - 1) / P + 9;   // breeding generation
  localparam int INIT_CLKS = (POP + P - 1) / P + 9;       // initial population
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  logic signed [15:0] win [N];
  logic [7:0] rng_start;
  member_t best;
  logic [15:0] gens;
  int u [];
  int cyc = 0, checks = 0, failures = 0;
  int elite_rises = 0;
  logic [COST_W-1:0] last_elite;

  ga_core #(.POP(POP), .NGEN(NGEN), .P(P), .N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .win(win), .rng_start(rng_start), .busy(busy), .done(done), .best(best), .gens(gens));

  always @(posedge clk) cyc++;

  // elite cost must not rise while a run breeds (gens > 0)
  always @(posedge clk) if (rst_n && busy && gens > 0) begin
    if (dut.best_cur.cost > last_elite) begin elite_rises++; $display("rise at %0d gens=%0d %0d>%0d", cyc, gens, dut.best_cur.cost, last_elite); end
    last_elite = dut.best_cur.cost;
  end else last_elite = '1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real a, real f, real th, int seed);
    int t0, t1;
    real fhz;
    longint w;
    u = new[N];
    for (int k = 0; k < N; k++) begin
      u[k] = int'($floor(16384.0 * a * $sin(2.0 * 3.14159265358979 * f * k * 1.3e-3 + th) + 0.5));
      win[k] = 16'(u[k]);
    end
    rng_start <= 8'(seed);
    start <= 1; @(posedge clk); t0 = cyc; start <= 0;
    repeat (5) @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;      // must be ignored
    while (!done) @(posedge clk);
    t1 = cyc;
    #1;
    fhz = 58.0 + 4.0 * real'(best.ind.f) / 16777216.0;
    w = cost_ref(best.ind, N, u);
    $display("run f=%.3f a=%.2f: best f=%.4f A=%.4f th=%.3f cost=%0d (%0d clocks)", f, a, fhz,
             0.75 + real'(best.ind.a) / 1024.0, real'(best.ind.th) * 6.283185307 / 4096.0, best.cost, t1 - t0);
    checks += 4;
    if (longint'(best.cost) != w) begin failures++; $display("cost %0d, the window cost gives %0d", best.cost, w); end
    if (fhz - f > 0.002 * 60.0 || f - fhz > 0.002 * 60.0) begin failures++; $display("frequency off"); end
    if (t1 - t0 != INIT_CLKS + NGEN * GEN_CLKS + 1) begin failures++; $display("run took %0d clocks", t1 - t0); end
    if (gens != 16'(NGEN)) begin failures++; $display("gens %0d", gens); end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    rst_n = 0; start = 0; rng_start = 0;
    for (int k = 0; k < N; k++) win[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(1.0, 60.0, 4.1888, 0);
    run(0.9, 59.3, 1.0, 77);
    run(0.8, 61.6, 5.5, 200);
    checks++;
    if (elite_rises != 0) begin failures++; $display("elite cost rose %0d times", elite_rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
