// random_rom - circular table of random words, read NPORT words at a time.
//
// The GA draws all of its random numbers (tournament picks, crossover choices,
// mutation draws) from a ROM filled off-line rather than from a generator
// circuit. The table is read as a ring: the pointer wraps at DEPTH, so the
// table supplies numbers for any number of generations, and loading a
// different start position gives a different GA run. Both points follow the
// method; the depth (256), the width (96 bits, one word per new individual)
// and the contents (random_table.hex, a fixed-seed pseudo-random sequence)
// are this design's choices.
//
// Interface: load copies start_addr into the pointer. advance reads words
// ptr, ptr+1 .. ptr+NPORT-1 (mod DEPTH) onto word[0..NPORT-1] at the next
// clock edge and moves the pointer on by NPORT. word holds its value when
// advance is low.
module random_rom #(
  parameter int DEPTH = 256,
  parameter int W     = 96,
  parameter int NPORT = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [$clog2(DEPTH)-1:0] start_addr,
  input  logic                     advance,
  output logic [W-1:0]             word [NPORT]
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  table_q [DEPTH];
  logic [AW-1:0] ptr;

  initial $readmemh("rtl/random_table.hex", table_q);

  always_ff @(posedge clk) begin
    if (!rst_n)       ptr <= '0;
    else if (load)    ptr <= start_addr;
    else if (advance) ptr <= AW'((32'(ptr) + NPORT) % DEPTH);
  end

  for (genvar i = 0; i < NPORT; i++) begin : g_port
    logic [AW-1:0] a;
    assign a = AW'((32'(ptr) + i) % DEPTH);
    always_ff @(posedge clk) if (advance) word[i] <= table_q[a];
  end

endmodule
