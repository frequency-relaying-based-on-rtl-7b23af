// uart_rx - serial-port receiver, 8 data bits, no parity, one stop bit.
//
// The relay takes its voltage samples from a PC over a serial port. The line
// is synchronised with two flip-flops; a falling edge starts a frame, the
// start bit is re-checked at its middle, and each data bit (LSB first) is
// sampled at the middle of its bit time. A frame whose stop bit is low is
// dropped and flagged. The serial link is the method's; the frame format and
// the bit rate (CLKS_PER_BIT = 217: 115,200 baud from 25 MHz) are this
// design's choices.
//
// Interface: data/valid - valid pulses for one clock when a byte is complete,
// at the middle of its stop bit. frame_err pulses for a bad stop bit.
module uart_rx #(
  parameter int CLKS_PER_BIT = 217
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_t;
  rstate_t       st;
  logic [1:0]    sync;
  logic [CW-1:0] tick;
  logic [2:0]    nbit;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= R_IDLE;
      tick      <= '0;
      nbit      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (st)
        R_IDLE: if (!sync[1]) begin
          st   <= R_START;
          tick <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        R_START:
          if (tick != 0) tick <= tick - 1'b1;
          else if (sync[1]) st <= R_IDLE;          // glitch, not a start bit
          else begin
            st   <= R_DATA;
            tick <= CW'(CLKS_PER_BIT - 1);
            nbit <= '0;
          end
        R_DATA:
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            shreg <= {sync[1], shreg[7:1]};
            tick  <= CW'(CLKS_PER_BIT - 1);
            if (nbit == 3'd7) st <= R_STOP;
            nbit <= nbit + 1'b1;
          end
        R_STOP:
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            st <= R_IDLE;
            if (sync[1]) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
