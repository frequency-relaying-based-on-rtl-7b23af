// ga_pkg - types and constants shared by the GA frequency estimator.
//
// An individual is one candidate sinusoid A*sin(2*pi*f*k*T + theta), coded as
// three unsigned integers packed MSB to LSB as amplitude | frequency | phase
// with 8, 24 and 12 bits. The widths, the ranges (A in [0.75, 1.0] pu, f in
// [58, 62] Hz, theta in [0, 2*pi)) and the 1.3 ms sampling interval follow the
// method. The exact code-to-value maps are this design's choice:
//   A     = 0.75 + a_code/1024 pu   (amplitude factor 768 + a_code, Q0.10)
//   f     = 58 + 4*f_code/2^24 Hz   (Q8.24 Hz value = (58<<24) + (f_code<<2))
//   theta = 2*pi*t_code/4096 rad
// Samples and sine values are signed 16-bit Q2.14 numbers (1.0 pu = 16384).
// The cost of an individual is the sum of absolute errors over the window,
//   e = sum_k |u[n-k] - A*sin(2*pi*f*k*T + theta)|;
// a lower cost is a fitter individual.
package ga_pkg;

  localparam int NA = 8;   // amplitude bits
  localparam int NF = 24;  // frequency bits
  localparam int NT = 12;  // phase bits
  localparam int IND_W = NA + NF + NT;

  localparam int SAMPLE_W = 16;   // Q2.14 samples
  localparam int SIN_W    = 16;   // Q1.14 sine table words
  localparam int LUT_AW   = 10;   // 1,024-point sine table
  localparam int COST_W   = 24;   // sum of up to 15 errors of < 2^17 each
  localparam int RND_W    = 96;   // one random-table word per new individual

  typedef struct packed {
    logic [NA-1:0] a;
    logic [NF-1:0] f;
    logic [NT-1:0] th;
  } indiv_t;

  typedef struct packed {
    indiv_t            ind;
    logic [COST_W-1:0] cost;
  } member_t;

  // Fields of one random-table word. sel: tournament draws a,b,c,d;
  // xo: crossover choice per parameter; mut: mutation draw per parameter;
  // sgn: mutation direction per parameter (1 = subtract). Index 0 is A,
  // 1 is f, 2 is theta. The low IND_W bits double as a random individual.
  typedef struct packed {
    logic [12:0]      spare;
    logic [2:0]       sgn;
    logic [2:0][7:0]  mut;
    logic [2:0][7:0]  xo;
    logic [3:0][7:0]  sel;
  } rnd_t;

  // Sampling interval and the phase step constants derived from it, in
  // turns with 32 fraction bits: STEP_BASE = 58 Hz * T, STEP_SPAN = 4 Hz * T.
  localparam real T_SAMPLE_S = 1.3e-3;
  localparam longint unsigned STEP_BASE = longint'(58.0 * T_SAMPLE_S * 4294967296.0);
  localparam longint unsigned STEP_SPAN = longint'(4.0 * T_SAMPLE_S * 4294967296.0);

  // Frequency code to Hz in unsigned Q8.24: 58 + 4*code/2^24.
  function automatic logic [31:0] f_code_to_hz(logic [NF-1:0] code);
    return (32'd58 << 24) + {6'd0, code, 2'b00};
  endfunction

endpackage
