// sample_rx - turns pairs of received bytes into voltage samples.
//
// Each sample is a signed 16-bit Q2.14 value (1.0 pu = 16384) sent as two
// bytes, low byte first. If the high byte does not follow the low byte
// within GAP_CLKS clocks the low byte is discarded, so the pairing recovers
// after a lost byte as soon as the sender pauses between samples (it pauses
// 1.3 ms, the sampling interval). Sending samples from a PC over a serial
// port is the method's set-up; the byte format and the gap rule are this
// design's choices.
//
// Interface: byte_data/byte_valid from uart_rx; sample/sample_valid pulse for
// one clock when the high byte arrives.
module sample_rx
  import ga_pkg::*;
#(
  parameter int GAP_CLKS = 8192
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 byte_data,
  input  logic                       byte_valid,
  output logic signed [SAMPLE_W-1:0] sample,
  output logic                       sample_valid
);

  localparam int GW = $clog2(GAP_CLKS + 1);

  logic          have_lo;
  logic [7:0]    lo;
  logic [GW-1:0] gap;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_lo      <= 1'b0;
      lo           <= '0;
      gap          <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (byte_valid) begin
        if (have_lo) begin
          sample       <= $signed({byte_data, lo});
          sample_valid <= 1'b1;
          have_lo      <= 1'b0;
        end else begin
          lo      <= byte_data;
          have_lo <= 1'b1;
          gap     <= GW'(GAP_CLKS);
        end
      end else if (have_lo) begin
        if (gap == 0) have_lo <= 1'b0;
        else          gap     <= gap - 1'b1;
      end
    end
  end

endmodule
