// Design-space sweep of the whole converter at default parameters.
//
// The output code should follow B = TCLK / dT. This testbench sweeps the
// reference clock period over 5, 7, 8, 9, 10 and 15 ns and the delay-line
// step over 4.0 to 5.0 ps in 0.2 ps steps. Each point gets one
// measurement through the behavioural delay-line model, with a fixed loop
// delay of 3.5 ns. The measured B must lie within the quantisation bound
// around TCLK / dT. X1 - X2 = 1e7 / B is known only to +/-2 counts, so B
// is known only to +/-(2 B^2 / 1e7), plus 1 for truncation.
`timescale 1ns / 1fs
module tb_ro_tdc_sweep;
  localparam real TCLK_NS[6] = '{5.0, 7.0, 8.0, 9.0, 10.0, 15.0};
  localparam int  N_STEP     = 6;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        ro_out, ro_in;
  logic        sdata, sclk, sload;
  logic [29:0] q, x1, x2;
  logic        q_valid, b_valid, b_err, busy;
  logic [31:0] b;
  logic [9:0]  pdl_y;
  int unsigned pdl_loads;
  real         tclk_ns = 8.0;
  real         step_ns = 0.0045;
  int          checks = 0, failures = 0;

  ro_tdc_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ro_out(ro_out), .ro_in(ro_in),
    .pdl_sdata(sdata), .pdl_sclk(sclk), .pdl_sload(sload),
    .q(q), .q_valid(q_valid), .x1(x1), .x2(x2), .b(b), .b_valid(b_valid),
    .b_err(b_err), .busy(busy)
  );

  pdl_model #(.Y_WIDTH(10)) u_pdl (
    .din(ro_out), .dout(ro_in), .sdata(sdata), .sclk(sclk), .sload(sload),
    .t_fixed_ns(3.5), .step_ns(step_ns), .y(pdl_y), .loads(pdl_loads)
  );

  always #(tclk_ns / 2.0) clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 6; c++) begin
      for (int s = 0; s < N_STEP; s++) begin
        real b_ideal, tol;
        rst_n = 1'b0;
        tclk_ns = TCLK_NS[c];
        step_ns = 0.0040 + 0.0002 * real'(s);
        repeat (4) @(posedge clk);
        @(negedge clk) rst_n = 1'b1;
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        @(posedge b_valid);
        @(negedge clk);
        b_ideal = tclk_ns / step_ns;
        tol = 2.0 * b_ideal * b_ideal / 1.0e7 + 1.0;
        checks++;
        if (b_err || real'(b) < b_ideal - tol || real'(b) > b_ideal + tol) begin
          failures++;
          $display("FAIL TCLK %0.1f ns, step %0.1f ps: B=%0d err=%0b, expected %0.1f +/- %0.1f",
                   tclk_ns, 1000.0 * step_ns, b, b_err, b_ideal, tol);
        end else begin
          $display("TCLK %4.1f ns  step %0.1f ps  B=%0d  (TCLK/step %0.1f)",
                   tclk_ns, 1000.0 * step_ns, b, b_ideal);
        end
        wait (!busy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
