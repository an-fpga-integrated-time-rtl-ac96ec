// End-to-end testbench for ro_tdc_top at its default parameters
// (D = 10000, Y1 = 1000, Y2 = 500, 30-bit counts).
//
// The ring is closed through the behavioural delay-line model. Four boards
// are simulated, one per delay line of the reported measurements: each
// has its own reference clock period TCLK and a delay-line step chosen as
// TCLK / B for the output code B reported for it (1650, 1773, 1786,
// 1726), plus a board-specific fixed loop delay that the method must
// cancel. Each board is measured MEAS_PER_BOARD = 100 times, as in the
// reported experiment, and the spread of B is printed.
//
// Checks per measurement: the ring period equals 2(Y*step + fixed); X1
// and X2 are within 2 counts of D*T/TCLK; b equals
// floor(2(Y1-Y2)D/(X1-X2)) of the reported x1, x2; b is within 2 of the
// reported code; err stays low. Throughout: LO is high whenever EN is low,
// DO rises exactly every D rising edges of LO while the ring runs. The
// mechanisms (ring running, ring stopped, divided edges, delay-line loads,
// PMC clears, PMC results, B results) are counted and each must occur.
`timescale 1ns / 1fs
module tb_ro_tdc_top;
  localparam int unsigned D  = 10000;
  localparam int unsigned Y1 = 1000;
  localparam int unsigned Y2 = 500;
  localparam int unsigned MEAS_PER_BOARD = 100;

  // per board: TCLK (ns), reported B, fixed loop delay t1 + t2 (ns)
  localparam real TCLK_NS [4] = '{7.532, 7.940, 7.890, 7.782};
  localparam int  B_REP   [4] = '{1650, 1773, 1786, 1726};
  localparam real FIXED_NS[4] = '{3.30, 3.55, 3.42, 3.61};

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
  real         tclk_ns = 7.532;
  real         fixed_ns = 3.3;
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
    .t_fixed_ns(fixed_ns), .step_ns(step_ns), .y(pdl_y), .loads(pdl_loads)
  );

  always #(tclk_ns / 2.0) clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---- mechanism counters and continuous checks ----
  int n_ring_runs = 0, n_ring_stops = 0, n_do_rises = 0, n_clears = 0;
  int n_pmc = 0, n_b = 0;
  int lo_rises_since_do = -1;
  realtime lo_last_rise = 0.0;
  realtime lo_period = 0.0;

  always @(posedge dut.en) n_ring_runs++;
  always @(negedge dut.en) n_ring_stops++;
  always @(posedge clk) begin
    if (rst_n && dut.pmc_clear) n_clears++;
    if (rst_n && q_valid) n_pmc++;
  end

  // every LO rising edge clocks the divider, including the one made when
  // EN falls while LO is low
  always @(posedge ro_out) begin
    if (rst_n && lo_rises_since_do >= 0) lo_rises_since_do++;
    if (dut.en) begin
      if (lo_last_rise > 0.0) lo_period = $realtime - lo_last_rise;
      lo_last_rise = $realtime;
    end
  end

  always @(posedge dut.do_s) begin
    n_do_rises++;
    if (lo_rises_since_do >= 0) begin
      checks++;
      if (lo_rises_since_do != D) fail($sformatf("DO period %0d LO edges", lo_rises_since_do));
    end
    lo_rises_since_do = 0;
  end

  // LO must be high while the ring is disabled
  always @(negedge ro_out) if (!dut.en && rst_n) fail("LO fell while EN low");
  always @(negedge dut.en) lo_last_rise = 0.0;

  // per-board statistics
  logic [31:0] b_min, b_max;
  real         b_sum;

  // ---- one measurement ----
  task automatic measure(int brd);
    real t1_ns, t2_ns, x1_exp, x2_exp, per_exp;
    longint unsigned b_exp;
    int v;
    t1_ns = 2.0 * (real'(Y1) * step_ns + fixed_ns);
    t2_ns = 2.0 * (real'(Y2) * step_ns + fixed_ns);
    x1_exp = real'(D) * t1_ns / tclk_ns;
    x2_exp = real'(D) * t2_ns / tclk_ns;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    // ring period while running with Y1
    wait (dut.en);
    repeat (5) @(posedge ro_out);
    #0.001;
    checks++;
    per_exp = t1_ns;
    if (lo_period < per_exp - 0.001 || lo_period > per_exp + 0.001)
      fail($sformatf("ring period %0.4f ns with Y1, expected %0.4f", lo_period, per_exp));
    wait (!dut.en);
    wait (dut.en);
    repeat (5) @(posedge ro_out);
    #0.001;
    checks++;
    per_exp = t2_ns;
    if (lo_period < per_exp - 0.001 || lo_period > per_exp + 0.001)
      fail($sformatf("ring period %0.4f ns with Y2, expected %0.4f", lo_period, per_exp));
    @(posedge b_valid);
    @(negedge clk);
    n_b++;
    checks++;
    if (b_err) fail("b_err set");
    checks++;
    if (real'(x1) < x1_exp - 2.0 || real'(x1) > x1_exp + 2.0)
      fail($sformatf("x1=%0d expected %0.2f", x1, x1_exp));
    checks++;
    if (real'(x2) < x2_exp - 2.0 || real'(x2) > x2_exp + 2.0)
      fail($sformatf("x2=%0d expected %0.2f", x2, x2_exp));
    b_exp = (x1 > x2) ? 64'(2 * D) * 64'(Y1 - Y2) / 64'(x1 - x2) : 0;
    checks++;
    if (64'(b) != b_exp) fail($sformatf("b=%0d, expected %0d from x1, x2", b, b_exp));
    v = int'(b) - B_REP[brd];
    checks++;
    if (v < -2 || v > 2) fail($sformatf("board %0d: b=%0d, reported %0d", brd + 1, b, B_REP[brd]));
    if (b < b_min) b_min = b;
    if (b > b_max) b_max = b;
    b_sum += real'(b);
    wait (!busy);
  endtask

  initial begin
    for (int brd = 0; brd < 4; brd++) begin
      rst_n = 1'b0;
      tclk_ns  = TCLK_NS[brd];
      fixed_ns = FIXED_NS[brd];
      step_ns  = TCLK_NS[brd] / real'(B_REP[brd]);
      lo_rises_since_do = -1;
      repeat (5) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      b_min = '1; b_max = '0; b_sum = 0.0;
      for (int m = 0; m < MEAS_PER_BOARD; m++) measure(brd);
      $display("board %0d: TCLK %0.3f ns, %0d measurements, B min %0d max %0d mean %0.2f (reported %0d), step %0.3f ps",
               brd + 1, tclk_ns, MEAS_PER_BOARD, b_min, b_max, b_sum / real'(MEAS_PER_BOARD),
               B_REP[brd], 1000.0 * tclk_ns * real'(MEAS_PER_BOARD) / b_sum);
    end
    checks++;
    if (pdl_loads != 2 * 4 * MEAS_PER_BOARD) fail($sformatf("%0d delay-line loads", pdl_loads));
    $display("mechanisms: ring started %0d, ring stopped %0d, DO edges %0d, PDL loads %0d, PMC clears %0d, PMC results %0d, B results %0d",
             n_ring_runs, n_ring_stops, n_do_rises, pdl_loads, n_clears, n_pmc, n_b);
    checks++; if (n_ring_runs == 0) fail("ring never ran");
    checks++; if (n_ring_stops == 0) fail("ring never stopped");
    checks++; if (n_do_rises == 0) fail("no divided edge");
    checks++; if (pdl_loads == 0) fail("delay line never loaded");
    checks++; if (n_clears == 0) fail("PMC never cleared");
    checks++; if (n_pmc == 0) fail("no PMC result");
    checks++; if (n_b == 0) fail("no B result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
