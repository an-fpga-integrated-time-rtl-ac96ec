// Ring-oscillator time-to-digital converter for measuring the step size
// of a programmable delay line (FPGA part).
//
// The delay line under test is placed in a ring oscillator: the LUT output
// LO leaves on ro_out, runs through the external delay line and comes back
// on ro_in as LI. With control word Y the ring period is
// T = 2(Y*dT + t1 + t2). The frequency divider stretches the period to
// T0 = D*T, the PMC counts reference-clock cycles over one divided period
// (X = D*T/TCLK), and measuring at two control words Y1 and Y2 cancels the
// fixed delays t1 and t2:
//   dT = TCLK / B,   B = 2(Y1 - Y2) D / (X1 - X2).
// Block structure, the LUT's truth table, D = 10000, Y1 = 1000, Y2 = 500
// and the 30-bit period count follow the converter's specification; the
// synchroniser, the serial frame of the three-wire delay-line bus, the
// measurement sequence and the divider that evaluates B are this design's
// choices (see the sub-modules).
//
// Clocks: clk is the reference clock CLK; the frequency divider is
// clocked by LO itself. The only crossing, DO into the clk domain, goes
// through the PMC's synchroniser. rst_n is synchronous to clk and also
// resets the divider asynchronously; release it while the ring is stopped
// (EN is low after reset, so it is). The divider needs the asynchronous
// form because its clock LO does not run while the ring is stopped; lint
// tools report rst_n as used both ways, which is intended.
//
// Interface: start (pulse) runs one measurement; b/b_valid/b_err give
// the result, x1/x2 the two period counts, q/q_valid every PMC result.
// A measurement takes roughly 2*D*(T1 + T2)/TCLK clk cycles plus two
// delay-line loads of (2*Y_WIDTH+1)*HALF cycles and B_WIDTH + 2 cycles of
// division.
module ro_tdc_top #(
  parameter int unsigned D           = tdc_pkg::DIV_RATIO,
  parameter int unsigned Q_WIDTH     = tdc_pkg::Q_WIDTH,
  parameter int unsigned Y_WIDTH     = tdc_pkg::Y_WIDTH,
  parameter int unsigned B_WIDTH     = tdc_pkg::B_WIDTH,
  parameter int unsigned Y1          = tdc_pkg::Y1_DEFAULT,
  parameter int unsigned Y2          = tdc_pkg::Y2_DEFAULT,
  parameter int unsigned HALF        = 4,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  // ring oscillator pins (through the output and input pad buffers)
  output logic               ro_out,
  input  logic               ro_in,
  // three-wire control bus of the delay line
  output logic               pdl_sdata,
  output logic               pdl_sclk,
  output logic               pdl_sload,
  // results
  output logic [Q_WIDTH-1:0] q,
  output logic               q_valid,
  output logic [Q_WIDTH-1:0] x1,
  output logic [Q_WIDTH-1:0] x2,
  output logic [B_WIDTH-1:0] b,
  output logic               b_valid,
  output logic               b_err,
  output logic               busy
);
  logic en;
  logic lo;
  logic do_s;
  logic pmc_clear;
  logic x_valid;
  logic ctl_busy;
  logic calc_busy;

  ro_lut u_lut (
    .en (en),
    .li (ro_in),
    .lo (lo)
  );

  assign ro_out = lo;

  freq_divider #(.D(D)) u_fd (
    .lo    (lo),
    .rst_n (rst_n),
    .do_o  (do_s)
  );

  pmc #(.Q_WIDTH(Q_WIDTH), .SYNC_STAGES(SYNC_STAGES)) u_pmc (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (pmc_clear),
    .do_i    (do_s),
    .q       (q),
    .q_valid (q_valid)
  );

  tdc_control #(.Y_WIDTH(Y_WIDTH), .Q_WIDTH(Q_WIDTH), .HALF(HALF)) u_ctl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start && !calc_busy),
    .y1        (Y_WIDTH'(Y1)),
    .y2        (Y_WIDTH'(Y2)),
    .q         (q),
    .q_valid   (q_valid),
    .en        (en),
    .pmc_clear (pmc_clear),
    .pdl_sdata (pdl_sdata),
    .pdl_sclk  (pdl_sclk),
    .pdl_sload (pdl_sload),
    .x1        (x1),
    .x2        (x2),
    .x_valid   (x_valid),
    .busy      (ctl_busy)
  );

  resolution_calc #(
    .Q_WIDTH(Q_WIDTH), .Y_WIDTH(Y_WIDTH), .B_WIDTH(B_WIDTH), .D(D)
  ) u_calc (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (x_valid),
    .x1      (x1),
    .x2      (x2),
    .y1      (Y_WIDTH'(Y1)),
    .y2      (Y_WIDTH'(Y2)),
    .b       (b),
    .b_valid (b_valid),
    .err     (b_err),
    .busy    (calc_busy)
  );

  assign busy = ctl_busy || calc_busy;

  initial begin
    assert (Y1 < (1 << Y_WIDTH) && Y2 < (1 << Y_WIDTH))
      else $error("ro_tdc_top: control words do not fit in Y_WIDTH bits");
  end
endmodule
