// tb_fitness_unit - streams random individuals, one per clock, over a fixed
// window and checks each cost against the reference model of the window cost,
// the tag order and the 4-clock latency.
module tb_fitness_unit;
  import ga_pkg::*;
  import ga_ref_pkg::*;
  localparam int N = 15;
  localparam int NT = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid, busy;
  indiv_t in_ind, out_ind;
  logic [7:0] in_tag, out_tag;
  logic [COST_W-1:0] out_cost;
  logic signed [15:0] win [N];
  int u [];
  indiv_t sent [NT];
  int sent_cyc [NT];
  int cyc = 0, nout = 0;
  int checks = 0, failures = 0;

  fitness_unit #(.N(N), .TAGW(8)) dut (
    .clk(clk), .rst_n(rst_n), .win(win), .in_valid(in_valid), .in_ind(in_ind), .in_tag(in_tag),
    .out_valid(out_valid), .out_ind(out_ind), .out_tag(out_tag), .out_cost(out_cost), .busy(busy));

  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window: 0.9 pu, 60.3 Hz, 1.1 rad, sampled at 1.3 ms, plus a small offset
  initial begin
    u = new[N];
    for (int k = 0; k < N; k++) begin
      u[k] = int'($floor(16384.0 * (0.9 * $sin(2.0 * 3.14159265358979 * 60.3 * k * 1.3e-3 + 1.1) + 0.01 * (k % 3)) + 0.5));
      win[k] = 16'(u[k]);
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint w;
    w = cost_ref(sent[out_tag], N, u);
    checks += 3;
    if (out_ind !== sent[out_tag]) begin failures++; $display("individual mismatch tag %0d", out_tag); end
    if (longint'(out_cost) != w) begin failures++; $display("tag %0d cost %0d want %0d", out_tag, out_cost, w); end
    // out_valid rises 4 edges after the sampling edge and is seen at the 5th
    if (cyc - sent_cyc[out_tag] != 5 || int'(out_tag) != nout) begin
      failures++; $display("tag %0d latency %0d", out_tag, cyc - sent_cyc[out_tag]);
    end
    nout++;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_ind = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      indiv_t x;
      x = indiv_t'({$urandom, $urandom});
      if (t == 0) x = '{a: 8'd154, f: 24'(int'((60.3 - 58.0) / 4.0 * 16777216.0)), th: 12'(int'(1.1 / 6.283185307 * 4096.0))};
      sent[t] = x;
      sent_cyc[t] = cyc + 1;   // the edge that samples it
      in_valid <= 1; in_ind <= x; in_tag <= 8'(t);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NT || busy) begin failures++; $display("%0d results of %0d", nout, NT); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
