// freq_relay_top - GA frequency relay: serial samples in, frequency out.
//
// A PC sends the normalised voltage signal, one sample every 1.3 ms, over a
// serial line. Each sample enters a 15-sample sliding window. Once the window
// is full, every new sample starts a genetic-algorithm run (30 individuals,
// 300 generations, 2 parallel offspring lanes) that fits
// A*sin(2*pi*f*k*T + theta) to the window. The best individual gives the
// frequency estimate, which a 5 Hz Butterworth low-pass then smooths. The
// chain and all the sizes follow the method; the serial framing, the output
// formats and the overrun rule (a sample that arrives while the GA is still
// running enters the window but starts no run) are this design's.
//
// Interface: uart_rxd (8N1, CLKS_PER_BIT clocks per bit); rng_start picks
// the starting position in the random table for the first run after reset. est_* pulse/hold
// the GA result of each run (est_freq_hz in unsigned Q8.24 Hz); filt_* the
// smoothed frequency one clock later. overrun pulses for a skipped run.
// Timing: one run takes about 7,300 clocks (0.29 ms at 25 MHz).
module freq_relay_top
  import ga_pkg::*;
#(
  parameter int       N            = 15,
  parameter int       POP          = 30,
  parameter int       NGEN         = 300,
  parameter int       P            = 2,
  parameter bit [7:0] MUT_RATE     = 8'd26,
  parameter int       CLKS_PER_BIT = 217,
  parameter int       GAP_CLKS     = 8192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         uart_rxd,
  input  logic [7:0]   rng_start,
  output logic         est_valid,
  output logic [31:0]  est_freq_hz,
  output indiv_t       est_best,
  output logic [COST_W-1:0] est_cost,
  output logic         filt_valid,
  output logic [31:0]  filt_freq_hz,
  output logic         busy,
  output logic         overrun,
  output logic         frame_err
);

  logic [7:0]                 rx_byte;
  logic                       rx_valid;
  logic signed [SAMPLE_W-1:0] sample;
  logic                       sample_valid;
  logic signed [SAMPLE_W-1:0] win [N];
  logic                       win_full;
  logic                       ga_done;
  member_t                    ga_best;
  logic [15:0]                ga_gens;
  logic                       run_req;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk), .rst_n(rst_n), .rxd(uart_rxd),
    .data(rx_byte), .valid(rx_valid), .frame_err(frame_err)
  );

  sample_rx #(.GAP_CLKS(GAP_CLKS)) u_srx (
    .clk(clk), .rst_n(rst_n), .byte_data(rx_byte), .byte_valid(rx_valid),
    .sample(sample), .sample_valid(sample_valid)
  );

  sample_window #(.N(N)) u_win (
    .clk(clk), .rst_n(rst_n), .sample(sample), .sample_valid(sample_valid),
    .win(win), .full(win_full)
  );

  // a run is requested in the clock after a sample entered a full window
  always_ff @(posedge clk) begin
    if (!rst_n) run_req <= 1'b0;
    else        run_req <= sample_valid;
  end

  ga_core #(.POP(POP), .NGEN(NGEN), .P(P), .N(N), .MUT_RATE(MUT_RATE)) u_ga (
    .clk(clk), .rst_n(rst_n), .start(run_req && win_full && !busy),
    .win(win), .rng_start(rng_start),
    .busy(busy), .done(ga_done), .best(ga_best), .gens(ga_gens)
  );

  assign overrun = run_req && win_full && busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      est_valid   <= 1'b0;
      est_freq_hz <= 32'd60 << 24;
      est_best    <= '0;
      est_cost    <= '0;
    end else begin
      est_valid <= ga_done;
      if (ga_done) begin
        est_freq_hz <= f_code_to_hz(ga_best.ind.f);
        est_best    <= ga_best.ind;
        est_cost    <= ga_best.cost;
      end
    end
  end

  output_filter u_filt (
    .clk(clk), .rst_n(rst_n), .in_valid(est_valid), .in_hz(est_freq_hz),
    .out_valid(filt_valid), .out_hz(filt_freq_hz)
  );

endmodule
