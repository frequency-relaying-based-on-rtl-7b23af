// population_mem - the current and the next population, as two banks.
//
// The GA keeps only two populations: the one offspring are bred from
// (current) and the one they are written into (next). After a generation the
// roles swap, so no copying is needed. Holding exactly two populations is the
// method's memory saving; keeping them in registers, so that every lane can
// read four members in the same clock, is this design's choice.
//
// Interface: NRD combinational read ports on the current bank (rd_idx ->
// rd_data in the same clock); NWR write ports on the next bank, written at
// the clock edge (port order decides if two ports hit one slot, higher port
// wins). swap exchanges the banks at the clock edge. POP members of
// {individual, cost} per bank.
module population_mem
  import ga_pkg::*;
#(
  parameter int POP = 30,
  parameter int NRD = 8,
  parameter int NWR = 3,
  localparam int IW = $clog2(POP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic [IW-1:0] rd_idx  [NRD],
  output member_t       rd_data [NRD],
  input  logic          wr_en   [NWR],
  input  logic [IW-1:0] wr_idx  [NWR],
  input  member_t       wr_data [NWR],
  output logic          cur_bank
);

  member_t mem [2][POP];

  always_ff @(posedge clk) begin
    if (!rst_n)    cur_bank <= 1'b0;
    else if (swap) cur_bank <= ~cur_bank;
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < NWR; w++)
      if (wr_en[w]) mem[~cur_bank][wr_idx[w]] <= wr_data[w];
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_data[r] = mem[cur_bank][rd_idx[r]];
  end

endmodule
