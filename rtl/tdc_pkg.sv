// Shared constants of the ring-oscillator time-to-digital converter.
//
// The converter measures the step size of a programmable delay line (PDL)
// by placing the PDL in a ring oscillator, dividing the ring frequency by
// D and counting reference-clock cycles over one divided period. The
// numbers below are the configuration the converter was built with:
// D = 10000, control words Y1 = 1000 and Y2 = 500, and a 30-bit period
// count Q. The 10-bit control-word width and the result widths are this
// design's own choices, sized so that Y1 = 1000 fits and the output code
// B = 2(Y1-Y2)D/(X1-X2) cannot overflow.
package tdc_pkg;
  localparam int unsigned DIV_RATIO   = 10000; // D, divide ratio of the FD
  localparam int unsigned Q_WIDTH     = 30;    // width of the PMC count Q
  localparam int unsigned Y_WIDTH     = 10;    // width of a PDL control word
  localparam int unsigned Y1_DEFAULT  = 1000;  // first control word
  localparam int unsigned Y2_DEFAULT  = 500;   // second control word
  localparam int unsigned B_WIDTH     = 32;    // width of the output code B
endpackage
