// Frequency divider (FD).
//
// Slows the ring-oscillator signal LO, whose period is a few nanoseconds,
// down to a period of D ring periods (T0 = D x T, microseconds for
// D = 10000) so that a reference-clock counter can measure it with fine
// relative resolution. The divide ratio D comes from the converter's
// specification; how the division is done is this design's choice: a
// modulo-D counter clocked by the rising edge of LO, with DO high for the
// first ceil(D/2) counts and low for the rest. DO therefore rises on the
// LO rising edge that wraps the counter, exactly once every D periods of
// LO, and has close to 50 % duty cycle. The first LO rising edge after
// reset is such a wrapping edge.
//
// Interface: lo (ring oscillator output, used as this block's clock),
// rst_n (asynchronous, active-low reset, released while the ring is
// stopped), do_o (divided output, registered in the LO domain).
module freq_divider #(
  parameter int unsigned D = tdc_pkg::DIV_RATIO
) (
  input  logic lo,
  input  logic rst_n,
  output logic do_o
);
  localparam int unsigned CW   = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned HIGH = (D + 1) / 2;

  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_next;

  assign cnt_next = (cnt == CW'(D - 1)) ? '0 : cnt + 1'b1;

  // Reset parks the counter on its last (low) state, so the first LO
  // rising edge after reset starts a full DO period.
  always_ff @(posedge lo or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(D - 1);
      do_o <= 1'b0;
    end else begin
      cnt  <= cnt_next;
      do_o <= (cnt_next < CW'(HIGH));
    end
  end

  initial begin
    assert (D >= 2) else $error("freq_divider: D must be at least 2");
  end
endmodule
