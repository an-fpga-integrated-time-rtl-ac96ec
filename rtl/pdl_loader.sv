// Serial loader for the programmable delay line's control word.
//
// The delay line is programmed over three wires: serial data, a serial
// clock and a load strobe. The three-wire bus is part of the converter's
// specification; the frame is this design's choice, since the delay
// line's own data sheet is the authority on it: the Y_WIDTH bits of the
// word are shifted out most significant bit first, each bit set on sdata
// while sclk is low and taken by the delay line on the rising edge of
// sclk; after the last bit sload is held high for one half-period to copy
// the shift register into the delay setting.
//
// Timing: each half-period of sclk lasts HALF clk cycles, so a load takes
// (2 * Y_WIDTH + 1) * HALF cycles from the load pulse to the done pulse.
// Interface: clk, rst_n (synchronous, active low), load (pulse, word is
// taken in that cycle), word, sdata/sclk/sload (registered outputs to the
// delay line), busy, done (one-cycle pulse at the end of the load).
module pdl_loader #(
  parameter int unsigned Y_WIDTH = tdc_pkg::Y_WIDTH,
  parameter int unsigned HALF    = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [Y_WIDTH-1:0] word,
  output logic               sdata,
  output logic               sclk,
  output logic               sload,
  output logic               busy,
  output logic               done
);
  typedef enum logic [1:0] {L_IDLE, L_LOW, L_HIGH, L_STROBE} lstate_t;

  localparam int unsigned HW = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int unsigned BW = (Y_WIDTH > 1) ? $clog2(Y_WIDTH) : 1;

  lstate_t            state;
  logic [Y_WIDTH-1:0] shreg;
  logic [BW-1:0]      bits_left;
  logic [HW-1:0]      tick;
  logic               tick_end;

  assign tick_end = (tick == HW'(HALF - 1));
  assign busy     = (state != L_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= L_IDLE;
      shreg     <= '0;
      bits_left <= '0;
      tick      <= '0;
      sdata     <= 1'b0;
      sclk      <= 1'b0;
      sload     <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      tick <= tick_end ? '0 : tick + 1'b1;
      unique case (state)
        L_IDLE: begin
          tick <= '0;
          if (load) begin
            state     <= L_LOW;
            shreg     <= word << 1;
            sdata     <= word[Y_WIDTH-1];
            bits_left <= BW'(Y_WIDTH - 1);
          end
        end
        L_LOW: if (tick_end) begin
          state <= L_HIGH;
          sclk  <= 1'b1;
        end
        L_HIGH: if (tick_end) begin
          sclk <= 1'b0;
          if (bits_left == '0) begin
            state <= L_STROBE;
            sload <= 1'b1;
          end else begin
            state     <= L_LOW;
            sdata     <= shreg[Y_WIDTH-1];
            shreg     <= shreg << 1;
            bits_left <= bits_left - 1'b1;
          end
        end
        L_STROBE: if (tick_end) begin
          state <= L_IDLE;
          sload <= 1'b0;
          done  <= 1'b1;
        end
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule
