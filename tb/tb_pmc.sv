// Testbench for pmc: a 100 MHz reference clock measures a DO signal
// generated asynchronously in the testbench.
//   1. DO period exactly 1000 clock periods, edges in mid-cycle: every
//      result must be 1000.
//   2. DO period 1234.37 clock periods: every result must be 1234 or 1235
//      and their mean within 0.05 of 1234.37.
//   3. After clear, no result may appear until two DO rising edges have
//      been seen, and each result must follow a DO edge within
//      SYNC_STAGES + 2 clock cycles.
`timescale 1ns / 1ps
module tb_pmc;
  localparam realtime TCLK = 10.0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clear = 1'b0;
  logic        do_i = 1'b0;
  logic [29:0] q;
  logic        q_valid;
  int          checks = 0, failures = 0;

  pmc dut (.clk(clk), .rst_n(rst_n), .clear(clear), .do_i(do_i), .q(q), .q_valid(q_valid));

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DO generator: period do_per while do_run is set
  realtime do_per = 0.0;
  bit      do_run = 1'b0;
  int      do_rises = 0;
  realtime last_rise = 0.0;
  always begin
    wait (do_run);
    do_i = 1'b1;
    do_rises++;
    last_rise = $realtime;
    #(do_per / 2);
    do_i = 1'b0;
    #(do_per / 2);
  end

  // results
  int unsigned res[$];
  always @(posedge clk) begin
    if (q_valid) begin
      res.push_back(q);
      checks++;
      if ($realtime - last_rise > TCLK * 4.0 + 1.0) begin
        failures++;
        $display("FAIL result %0.1f ns after the DO edge", $realtime - last_rise);
      end
    end
  end

  task automatic pulse_clear();
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1: exact multiple, edges at mid-cycle
    do_per = 1000.0 * TCLK;
    @(posedge clk);
    #(TCLK / 2);
    do_run = 1'b1;
    wait (res.size() == 0 && do_rises == 1);
    checks++;
    if (res.size() != 0) begin
      failures++;
      $display("FAIL result after the first DO edge");
    end
    wait (res.size() >= 5);
    foreach (res[i]) begin
      checks++;
      if (res[i] != 1000) begin
        failures++;
        $display("FAIL exact period: q=%0d expected 1000", res[i]);
      end
    end
    do_run = 1'b0;
    #(do_per);

    // 2: fractional period
    res.delete();
    pulse_clear();
    do_per = 1234.37 * TCLK;
    do_rises = 0;
    do_run = 1'b1;
    wait (do_rises == 2);
    #(TCLK * 10);
    checks++;
    if (res.size() != 1) begin
      failures++;
      $display("FAIL %0d results after two DO edges, expected 1", res.size());
    end
    wait (res.size() >= 40);
    begin
      real sum = 0.0;
      foreach (res[i]) begin
        sum += real'(res[i]);
        checks++;
        if (res[i] != 1234 && res[i] != 1235) begin
          failures++;
          $display("FAIL fractional period: q=%0d", res[i]);
        end
      end
      checks++;
      if (sum / real'(res.size()) < 1234.32 || sum / real'(res.size()) > 1234.42) begin
        failures++;
        $display("FAIL mean %0.3f expected 1234.37", sum / real'(res.size()));
      end
    end
    do_run = 1'b0;

    // 3: clear while running discards the partial period
    #(do_per * 0.3);
    res.delete();
    do_rises = 0;
    pulse_clear();
    do_run = 1'b1;
    wait (do_rises == 1);
    #(do_per * 0.9);
    checks++;
    if (res.size() != 0) begin
      failures++;
      $display("FAIL result before the second edge after clear");
    end
    wait (res.size() == 1);
    checks++;
    if (res[0] != 1234 && res[0] != 1235) begin
      failures++;
      $display("FAIL first result after clear q=%0d", res[0]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
