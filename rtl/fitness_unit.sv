// fitness_unit - pipelined cost of one candidate sinusoid per clock.
//
// For an individual {A, f, theta} and the window u[n-k], k = 0..N-1, it
// computes the window cost
//     e = sum_k | u[n-k] - A * sin(2*pi*f*k*T + theta) |,
// evaluating all N terms side by side. The phase is carried in turns with
// 32 fraction bits so that wrapping by whole periods is free:
//     step    = STEP_BASE + ((f_code * STEP_SPAN) >> 24)    (= f*T turns)
//     phase_k = k*step + (t_code << 20)                     (mod 1 turn)
// and the top 10 bits of phase_k address a 1,024-point sine table. k*step is a
// multiply by a constant, built from shifts and adds, the way the method
// derives the k = 6 term by shifting the k = 3 term. Each term then needs one
// amplitude multiply: N + 1 multipliers per unit. The sine table, the cost
// function and the shift-and-add idea follow the method; the fixed-point
// formats, the fully parallel arrangement and the pipeline are this design's.
//
// Interface: in_valid/in_ind/in_tag enter together; out_valid/out_ind/
// out_cost/out_tag leave LAT = 4 clocks later. One individual per clock, no
// stall. win must stay constant while individuals are in flight; busy is
// high while any stage holds one.
module fitness_unit
  import ga_pkg::*;
#(
  parameter int N    = 15,
  parameter int TAGW = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [SAMPLE_W-1:0] win [N],
  input  logic                       in_valid,
  input  indiv_t                     in_ind,
  input  logic [TAGW-1:0]            in_tag,
  output logic                       out_valid,
  output indiv_t                     out_ind,
  output logic [TAGW-1:0]            out_tag,
  output logic [COST_W-1:0]          out_cost,
  output logic                       busy
);

  localparam int LAT = 4;
  localparam logic [31:0] BASE = 32'(STEP_BASE);
  localparam logic [24:0] SPAN = 25'(STEP_SPAN);

  // valid / individual / tag travel alongside the datapath
  logic            v_q   [LAT];
  indiv_t          ind_q [LAT];
  logic [TAGW-1:0] tag_q [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) for (int s = 0; s < LAT; s++) v_q[s] <= 1'b0;
    else begin
      v_q[0] <= in_valid;
      for (int s = 1; s < LAT; s++) v_q[s] <= v_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    ind_q[0] <= in_ind;
    tag_q[0] <= in_tag;
    for (int s = 1; s < LAT; s++) begin
      ind_q[s] <= ind_q[s-1];
      tag_q[s] <= tag_q[s-1];
    end
  end

  // Stage 1: per-sample phase step of this frequency
  logic [48:0] f_prod;
  logic [31:0] step_q;
  assign f_prod = {25'd0, in_ind.f} * {24'd0, SPAN};
  always_ff @(posedge clk) step_q <= BASE + 32'(f_prod[48:24]);

  // Stage 2: phase of every term, sine table read (registered in the ROM)
  logic signed [SIN_W-1:0] sin_q [N];
  for (genvar k = 0; k < N; k++) begin : g_term
    logic [31:0] phase;
    assign phase = 32'(k) * step_q + {ind_q[0].th, 20'd0};
    sine_rom #(.AW(LUT_AW), .DW(SIN_W)) u_sin (
      .clk (clk),
      .addr(phase[31:32-LUT_AW]),
      .data(sin_q[k])
    );
  end

  // Stage 3: model value A*sin and absolute error per term
  logic [SAMPLE_W:0] err_q [N];
  logic signed [11:0] amp;
  assign amp = $signed({2'b00, 2'b11, ind_q[1].a});  // 768 + a_code
  for (genvar k = 0; k < N; k++) begin : g_err
    logic signed [27:0] prod;
    logic signed [17:0] model, diff;
    assign prod  = amp * sin_q[k];
    assign model = 18'(prod >>> 10);
    assign diff  = 18'(win[k]) - model;
    always_ff @(posedge clk) err_q[k] <= diff[17] ? 17'(-diff) : 17'(diff);
  end

  // Stage 4: sum of the N errors
  logic [COST_W-1:0] cost_q, sum_d;
  always_comb begin
    automatic logic [COST_W-1:0] acc = '0;
    for (int k = 0; k < N; k++) acc += COST_W'(err_q[k]);
    sum_d = acc;
  end
  always_ff @(posedge clk) cost_q <= sum_d;

  assign out_cost  = cost_q;
  always_comb begin
    busy = 1'b0;
    for (int s = 0; s < LAT; s++) busy |= v_q[s];
  end
  assign out_valid = v_q[LAT-1];
  assign out_ind   = ind_q[LAT-1];
  assign out_tag   = tag_q[LAT-1];

endmodule
