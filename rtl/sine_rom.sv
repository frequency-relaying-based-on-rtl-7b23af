// sine_rom - 1,024-point sine look-up table with a registered read port.
//
// The cost function needs sin() for every window sample of every candidate,
// so the sine is not computed but read from a table filled ahead of time, as
// the method prescribes (1,024 points over one period). Entry i holds
// round(16384 * sin(2*pi*i/1024)) as a signed Q1.14 number; the table file
// sine_lut.hex lists the 1,024 entries as 4-digit hex words. The word width
// is this design's choice.
//
// Timing: data is valid one clock after addr (a block-RAM style read).
module sine_rom #(
  parameter int AW = 10,
  parameter int DW = 16
) (
  input  logic                 clk,
  input  logic [AW-1:0]        addr,
  output logic signed [DW-1:0] data
);

  logic signed [DW-1:0] table_q [1 << AW];

  initial $readmemh("rtl/sine_lut.hex", table_q);

  always_ff @(posedge clk) data <= table_q[addr];

endmodule
