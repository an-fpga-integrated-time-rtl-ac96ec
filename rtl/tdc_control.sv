// Control circuit of the ring-oscillator TDC.
//
// Runs one resolution measurement. The method is the converter's own:
// program the delay line with control word Y1, measure the divided ring
// period X1 with the PMC, program it with Y2, measure X2, then hand X1 and
// X2 to the resolution calculator, which forms B = 2(Y1-Y2)D/(X1-X2).
// The sequencing details are this design's choices:
//   * the ring is stopped (EN low, so the LUT holds LO high) while the
//     delay line is reprogrammed, so no runt pulse from a half-changed
//     delay reaches the frequency divider;
//   * when EN is raised the PMC is cleared, so the first measured period
//     starts at a divided edge produced with the new delay, and the first
//     PMC result after that is taken.
//
// Sequence after a start pulse (clk cycles):
//   LOAD1  shift Y1 into the delay line       (2*Y_WIDTH+1)*HALF cycles
//   RUN1   EN = 1, wait for the PMC result     about 2*D*T1/TCLK cycles
//   LOAD2  EN = 0, shift Y2                   (2*Y_WIDTH+1)*HALF cycles
//   RUN2   EN = 1, wait for the PMC result     about 2*D*T2/TCLK cycles
//   then x_valid pulses for one cycle with x1 and x2 stable, and the
//   circuit returns to idle with EN low.
//
// Interface: clk, rst_n (synchronous, active low), start (pulse, ignored
// while busy), y1/y2 (control words), q/q_valid (from the PMC), en (to the
// LUT), pmc_clear (to the PMC), pdl_sdata/pdl_sclk/pdl_sload (three-wire
// bus to the delay line), x1/x2/x_valid (to the resolution calculator),
// busy.
module tdc_control #(
  parameter int unsigned Y_WIDTH = tdc_pkg::Y_WIDTH,
  parameter int unsigned Q_WIDTH = tdc_pkg::Q_WIDTH,
  parameter int unsigned HALF    = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [Y_WIDTH-1:0] y1,
  input  logic [Y_WIDTH-1:0] y2,
  input  logic [Q_WIDTH-1:0] q,
  input  logic               q_valid,
  output logic               en,
  output logic               pmc_clear,
  output logic               pdl_sdata,
  output logic               pdl_sclk,
  output logic               pdl_sload,
  output logic [Q_WIDTH-1:0] x1,
  output logic [Q_WIDTH-1:0] x2,
  output logic               x_valid,
  output logic               busy
);
  typedef enum logic [2:0] {
    C_IDLE, C_LOAD1, C_RUN1, C_LOAD2, C_RUN2, C_DONE
  } cstate_t;

  cstate_t            state;
  logic               ld_load;
  logic [Y_WIDTH-1:0] ld_word;
  logic               ld_busy;
  logic               ld_done;

  pdl_loader #(.Y_WIDTH(Y_WIDTH), .HALF(HALF)) u_loader (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (ld_load),
    .word  (ld_word),
    .sdata (pdl_sdata),
    .sclk  (pdl_sclk),
    .sload (pdl_sload),
    .busy  (ld_busy),
    .done  (ld_done)
  );

  assign busy = (state != C_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      en        <= 1'b0;
      pmc_clear <= 1'b0;
      ld_load   <= 1'b0;
      ld_word   <= '0;
      x1        <= '0;
      x2        <= '0;
      x_valid   <= 1'b0;
    end else begin
      ld_load   <= 1'b0;
      pmc_clear <= 1'b0;
      x_valid   <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          state   <= C_LOAD1;
          ld_load <= 1'b1;
          ld_word <= y1;
        end
        C_LOAD1: if (ld_done) begin
          state     <= C_RUN1;
          en        <= 1'b1;
          pmc_clear <= 1'b1;
        end
        C_RUN1: if (q_valid && !pmc_clear) begin
          x1      <= q;
          en      <= 1'b0;
          state   <= C_LOAD2;
          ld_load <= 1'b1;
          ld_word <= y2;
        end
        C_LOAD2: if (ld_done) begin
          state     <= C_RUN2;
          en        <= 1'b1;
          pmc_clear <= 1'b1;
        end
        C_RUN2: if (q_valid && !pmc_clear) begin
          x2    <= q;
          en    <= 1'b0;
          state <= C_DONE;
        end
        C_DONE: begin
          x_valid <= 1'b1;
          state   <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // The loader is only started from idle.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld_load |-> !ld_busy);
  // The ring never runs while the delay line is being reprogrammed.
  a_ring_stopped: assert property (@(posedge clk) disable iff (!rst_n) ld_busy |-> !en);
endmodule
