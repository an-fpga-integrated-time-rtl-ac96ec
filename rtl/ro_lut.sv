// Ring-oscillator LUT.
//
// The two-input look-up table that closes the ring oscillator. Its output
// LO leaves the FPGA through an output buffer, passes the external
// programmable delay line and returns through an input buffer as LI. The
// truth table is the converter's own: LO is low only when both EN and LI
// are high, so the table is an inverting (NAND) stage. With EN high the
// loop has one inversion and oscillates with period 2(t0 + t1 + t2);
// with EN low LO is held high and the ring stops.
//
// Interface: en (enable from the control circuit), li (ring input from
// the input buffer), lo (ring output to the output buffer and the
// frequency divider). Purely combinational; the loop is closed outside
// the FPGA, so there is no combinational loop inside this design.
module ro_lut (
  input  logic en,
  input  logic li,
  output logic lo
);
  always_comb begin
    unique case ({en, li})
      2'b00:   lo = 1'b1;
      2'b01:   lo = 1'b1;
      2'b10:   lo = 1'b1;
      default: lo = 1'b0;
    endcase
  end
endmodule
