// Testbench for tdc_control. The PMC is replaced by the testbench, which
// answers each run of the ring (EN high) with a period count after a
// delay; the delay line's bus is decoded by the behavioural delay-line
// model. Checks: the words loaded are Y1 then Y2; EN stays low whenever
// the bus is active; EN rises exactly (2*Y_WIDTH+1)*HALF + 2 cycles after
// start, with a PMC clear in the same cycle; a PMC result that arrives
// while the ring is stopped is ignored; x1 and x2 hold the counts given
// for the first and second run; x_valid pulses once per measurement.
`timescale 1ns / 1ps
module tb_tdc_control;
  localparam int unsigned YW   = 10;
  localparam int unsigned HALF = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [9:0]  y1, y2;
  logic [29:0] q = '0;
  logic        q_valid = 1'b0;
  logic        en, pmc_clear, sdata, sclk, sload, x_valid, busy;
  logic [29:0] x1, x2;
  logic [9:0]  pdl_y;
  int unsigned pdl_loads;
  logic        pdl_dout;
  int          checks = 0, failures = 0;

  tdc_control dut (
    .clk(clk), .rst_n(rst_n), .start(start), .y1(y1), .y2(y2), .q(q), .q_valid(q_valid),
    .en(en), .pmc_clear(pmc_clear), .pdl_sdata(sdata), .pdl_sclk(sclk), .pdl_sload(sload),
    .x1(x1), .x2(x2), .x_valid(x_valid), .busy(busy)
  );

  pdl_model #(.Y_WIDTH(YW)) u_pdl (
    .din(1'b0), .dout(pdl_dout), .sdata(sdata), .sclk(sclk), .sload(sload),
    .t_fixed_ns(1.0), .step_ns(0.005), .y(pdl_y), .loads(pdl_loads)
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // EN must be low while the bus moves
  logic sclk_d = 1'b0, sload_d = 1'b0;
  int   bus_edges = 0;
  always @(posedge clk) begin
    sclk_d  <= sclk;
    sload_d <= sload;
    if (rst_n && (sclk != sclk_d || sload != sload_d)) begin
      bus_edges++;
      if (en) fail("EN high while the delay line is being loaded");
    end
  end

  int xv_count = 0;
  always @(posedge clk) if (x_valid) xv_count++;

  // one measurement with the given words and answers
  task automatic measure(input int unsigned w1, input int unsigned w2,
                         input int unsigned a1, input int unsigned a2);
    int unsigned loads0, cyc;
    int          xv0;
    loads0 = pdl_loads;
    xv0 = xv_count;
    @(negedge clk);
    y1 = 10'(w1); y2 = 10'(w2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // run 1
    cyc = 0;  // rising edges after the one that took start
    while (!en) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != (2 * YW + 1) * HALF + 2) fail($sformatf("EN rose %0d cycles after start", cyc));
    checks++;
    if (!pmc_clear) fail("no PMC clear when EN rose");
    checks++;
    if (pdl_y != 10'(w1) || pdl_loads != loads0 + 1) fail($sformatf("first word %0d, expected %0d", pdl_y, w1));
    repeat (200) @(negedge clk);
    q = 30'(a1); q_valid = 1'b1;
    @(negedge clk);
    q_valid = 1'b0;
    checks++;
    if (en) fail("EN still high after the first result");
    // a stray result while stopped must be ignored
    repeat (10) @(negedge clk);
    q = 30'h3fff_ffff; q_valid = 1'b1;
    @(negedge clk);
    q_valid = 1'b0;
    // run 2
    while (!en) @(negedge clk);
    checks++;
    if (pdl_y != 10'(w2) || pdl_loads != loads0 + 2) fail($sformatf("second word %0d, expected %0d", pdl_y, w2));
    repeat (150) @(negedge clk);
    q = 30'(a2); q_valid = 1'b1;
    @(negedge clk);
    q_valid = 1'b0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (x1 != 30'(a1) || x2 != 30'(a2)) fail($sformatf("x1=%0d x2=%0d expected %0d %0d", x1, x2, a1, a2));
    checks++;
    if (xv_count != xv0 + 1) fail("x_valid did not pulse exactly once");
    checks++;
    if (en) fail("EN high after the measurement");
  endtask

  initial begin
    y1 = '0; y2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(1000, 500, 22736, 16682);
    measure(17, 1023, 1234, 56789);
    for (int i = 0; i < 5; i++)
      measure($urandom_range(1023, 0), $urandom_range(1023, 0),
              $urandom_range(1 << 29, 1), $urandom_range(1 << 29, 1));
    checks++;
    if (bus_edges == 0) fail("bus never moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
