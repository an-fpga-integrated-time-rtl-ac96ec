// Behavioural model of the external programmable delay line, for
// simulation only (not synthesizable).
//
// Delays din to dout by t_fixed + Y * step, where Y is the control word
// last loaded over the three-wire bus. The fixed part stands for the
// line's own minimum delay plus the FPGA pad buffers and board traces
// around the ring (t1 + t2 of the ring-period formula); the variable part
// is the quantity the converter measures. The bus is modelled as a
// Y_WIDTH-bit shift register clocked on the rising edge of sclk, most
// significant bit first, copied to the delay setting on the rising edge of
// sload, which matches the loader in the design. Edges are transported
// without pulse swallowing. Both delays are given in nanoseconds as real
// inputs so that a testbench can change them between runs.
`timescale 1ns / 1fs
module pdl_model #(
  parameter int unsigned Y_WIDTH = 10
) (
  input  logic               din,
  output logic               dout,
  input  logic               sdata,
  input  logic               sclk,
  input  logic               sload,
  input  real                t_fixed_ns,
  input  real                step_ns,
  output logic [Y_WIDTH-1:0] y,
  output int unsigned        loads
);
  logic [Y_WIDTH-1:0] shreg;
  realtime            dly;

  initial begin
    dout  = 1'b1;
    y     = '0;
    shreg = '0;
    loads = 0;
  end

  always @(posedge sclk) shreg <= {shreg[Y_WIDTH-2:0], sdata};

  always @(posedge sload) begin
    y     <= shreg;
    loads <= loads + 1;
  end

  always_comb dly = t_fixed_ns + real'(y) * step_ns;

  always @(din) dout <= #(dly) din;
endmodule
