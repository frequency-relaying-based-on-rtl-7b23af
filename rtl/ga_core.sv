// ga_core - the genetic algorithm for one data window.
//
// On start the core latches the window, loads the random-table start
// position and builds a random initial population of POP individuals, each
// scored with the window cost e = sum_k |u[n-k] - A*sin(2*pi*f*k*T + theta)|.
// It then runs NGEN generations. In each
// generation slot 0 of the next population receives the best member of the
// current one (elitism) and P parallel lanes breed the other POP-1 slots by
// tournament selection, five-point crossover and +/-1 mutation, one slot per
// lane per clock. When all offspring are written the banks swap. After NGEN
// generations the best member is reported. Two populations, elitism in the
// first slot, p parallel offspring circuits, POP = 30, NGEN = 300 and the
// 15-sample window follow the method; the controller's timing is this
// design's.
//
// Timing: a generation takes ceil((POP-1)/P) issue clocks plus the 7-clock
// lane pipeline and one swap clock (24 clocks at POP = 30, P = 2); a whole run
// takes about (NGEN + 1) * that, ~7,300 clocks, i.e. 0.29 ms at 25 MHz, well
// inside the 1.3 ms sampling interval.
//
// The random table is read as one endless ring: the first run after reset
// starts at position rng_start and every later run continues where the
// previous one stopped, so successive windows see different random numbers.
//
// Interface: start (one clock, ignored while busy) with win valid, and
// rng_start for the first run after reset; busy while running; done pulses for one clock with best valid (best
// holds until the next run ends). gens counts completed generations.
module ga_core
  import ga_pkg::*;
#(
  parameter int       POP      = 30,
  parameter int       NGEN     = 300,
  parameter int       P        = 2,
  parameter int       N        = 15,
  parameter bit [7:0] MUT_RATE = 8'd26,
  localparam int      IW       = $clog2(POP)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic signed [SAMPLE_W-1:0] win [N],
  input  logic [7:0]                 rng_start,
  output logic                       busy,
  output logic                       done,
  output member_t                    best,
  output logic [15:0]                gens
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN, S_SWAP} state_t;
  state_t state;

  logic signed [SAMPLE_W-1:0] win_q [N];
  logic          init;         // building the initial population
  logic [7:0]    cnt;          // issue clock within the generation
  member_t       best_cur;     // best of the current population (elite)
  member_t       best_next;    // best written so far into the next one
  logic          first_issue;
  logic          seeded;       // random-table pointer loaded since reset

  // lane and memory wiring
  logic          lane_issue [P];
  logic [IW-1:0] lane_tag   [P];
  logic          lane_busy  [P];
  logic          lane_ov    [P];
  member_t       lane_om    [P];
  logic [IW-1:0] lane_ot    [P];
  logic [IW-1:0] rd_idx     [4*P];
  member_t       rd_data    [4*P];
  logic          wr_en      [P+1];
  logic [IW-1:0] wr_idx     [P+1];
  member_t       wr_data    [P+1];
  logic [RND_W-1:0] rnd_word [P];
  logic          cur_bank;
  logic          any_busy;

  localparam int BASE_INIT = 0;
  localparam int BASE_GEN  = 1;

  // slot numbers of this issue clock
  logic [7:0] base;
  assign base = init ? 8'(BASE_INIT) : 8'(BASE_GEN);
  logic last_issue;
  assign last_issue = (32'(base) + (32'(cnt) + 1) * P) >= POP;

  for (genvar i = 0; i < P; i++) begin : g_slot
    logic [31:0] slot;
    assign slot          = 32'(base) + 32'(cnt) * P + i;
    assign lane_issue[i] = (state == S_ISSUE) && (slot < POP);
    assign lane_tag[i]   = IW'(slot);
  end

  random_rom #(.DEPTH(256), .W(RND_W), .NPORT(P)) u_rnd (
    .clk(clk), .rst_n(rst_n),
    .load(state == S_IDLE && start && !seeded), .start_addr(rng_start),
    .advance(state == S_ISSUE), .word(rnd_word)
  );

  for (genvar i = 0; i < P; i++) begin : g_lane
    logic [IW-1:0] ri [4];
    member_t       rdat [4];
    for (genvar j = 0; j < 4; j++) begin : g_port
      assign rd_idx[4*i+j] = ri[j];
      assign rdat[j]       = rd_data[4*i+j];
    end
    ga_lane #(.POP(POP), .N(N), .MUT_RATE(MUT_RATE)) u_lane (
      .clk(clk), .rst_n(rst_n), .init(init), .win(win_q),
      .issue(lane_issue[i]), .issue_tag(lane_tag[i]), .rnd(rnd_t'(rnd_word[i])),
      .rd_idx(ri), .rd_data(rdat),
      .out_valid(lane_ov[i]), .out_member(lane_om[i]), .out_tag(lane_ot[i]),
      .busy(lane_busy[i])
    );
    assign wr_en[i]   = lane_ov[i];
    assign wr_idx[i]  = lane_ot[i];
    assign wr_data[i] = lane_om[i];
  end

  // elite port
  assign wr_en[P]   = (state == S_ISSUE) && first_issue && !init;
  assign wr_idx[P]  = '0;
  assign wr_data[P] = best_cur;

  population_mem #(.POP(POP), .NRD(4*P), .NWR(P+1)) u_pop (
    .clk(clk), .rst_n(rst_n), .swap(state == S_SWAP),
    .rd_idx(rd_idx), .rd_data(rd_data),
    .wr_en(wr_en), .wr_idx(wr_idx), .wr_data(wr_data),
    .cur_bank(cur_bank)
  );

  always_comb begin
    any_busy = 1'b0;
    for (int i = 0; i < P; i++) any_busy |= lane_busy[i];
  end

  // best member written into the next population
  member_t best_upd;
  always_comb begin
    best_upd = best_next;
    for (int w = 0; w <= P; w++)
      if (wr_en[w] && wr_data[w].cost < best_upd.cost) best_upd = wr_data[w];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      init        <= 1'b0;
      cnt         <= '0;
      first_issue <= 1'b0;
      seeded      <= 1'b0;
      done        <= 1'b0;
      gens        <= '0;
      best        <= '0;
      best_cur    <= '0;
      best_next   <= '{ind: '0, cost: '1};
      for (int k = 0; k < N; k++) win_q[k] <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) best_next <= best_upd;
      unique case (state)
        S_IDLE: if (start) begin
          for (int k = 0; k < N; k++) win_q[k] <= win[k];
          init        <= 1'b1;
          seeded      <= 1'b1;
          cnt         <= '0;
          first_issue <= 1'b1;
          gens        <= '0;
          best_next   <= '{ind: '0, cost: '1};
          state       <= S_ISSUE;
        end
        S_ISSUE: begin
          first_issue <= 1'b0;
          cnt         <= cnt + 1'b1;
          if (last_issue) state <= S_DRAIN;
        end
        S_DRAIN: if (!any_busy) state <= S_SWAP;
        S_SWAP: begin
          best_cur    <= best_next;
          best_next   <= '{ind: '0, cost: '1};
          cnt         <= '0;
          first_issue <= 1'b1;
          init        <= 1'b0;
          if (!init) gens <= gens + 1'b1;
          if (!init && 32'(gens) + 1 == NGEN) begin
            best  <= best_next;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Rules of the schedule: lanes never write the elite slot outside the
  // initial generation, and no two write ports hit the same slot.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < P; i++) begin
        assert (!(wr_en[i] && !init && wr_idx[i] == '0))
          else $error("lane %0d overwrote the elite slot", i);
        for (int j = i + 1; j <= P; j++)
          assert (!(wr_en[i] && wr_en[j] && wr_idx[i] == wr_idx[j]))
            else $error("write ports %0d and %0d collide", i, j);
      end
    end
  end

endmodule
