// Testbench for freq_divider: clocks two dividers (D = 10000, the default,
// and an odd D = 7) with a free-running LO and checks that DO rises
// exactly once every D LO cycles, stays high ceil(D/2) cycles, and that
// it rises on the first LO edge after reset.
`timescale 1ns / 1ps
module tb_freq_divider;
  localparam int unsigned DA = 10000;
  localparam int unsigned DB = 7;

  logic lo = 1'b0;
  logic rst_n;
  logic do_a, do_b;
  int   checks = 0, failures = 0;

  freq_divider dut_a (.lo(lo), .rst_n(rst_n), .do_o(do_a));
  freq_divider #(.D(DB)) dut_b (.lo(lo), .rst_n(rst_n), .do_o(do_b));

  always #5 lo = ~lo;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per divider: count LO rising edges since reset, remember where DO rose
  // and fell, and compare spacings with D.
  int unsigned n_lo = 0;
  int unsigned rise_a[$], fall_a[$], rise_b[$], fall_b[$];
  logic pa = 1'b0, pb = 1'b0;

  always @(posedge lo) begin
    if (rst_n) begin
      n_lo <= n_lo + 1;
    end
  end
  // sample just before the next LO edge
  always @(negedge lo) begin
    if (rst_n) begin
      if (do_a && !pa) rise_a.push_back(n_lo);
      if (!do_a && pa) fall_a.push_back(n_lo);
      if (do_b && !pb) rise_b.push_back(n_lo);
      if (!do_b && pb) fall_b.push_back(n_lo);
      pa <= do_a;
      pb <= do_b;
    end
  end

  task automatic check_eq(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    #23;
    checks++;
    if (do_a !== 1'b0 || do_b !== 1'b0) begin
      failures++;
      $display("FAIL DO not low in reset");
    end
    rst_n = 1'b1;
    wait (n_lo >= 3 * DA + 2);
    @(negedge lo);
    #1;
    check_eq("rises D=10000", rise_a.size(), (n_lo - 1) / DA + 1);
    for (int i = 0; i < rise_a.size(); i++)
      check_eq("rise position D=10000", rise_a[i], i * DA + 1);
    for (int i = 0; i < fall_a.size(); i++)
      check_eq("high time D=10000", fall_a[i] - rise_a[i], (DA + 1) / 2);
    check_eq("rises D=7", rise_b.size(), (n_lo - 1) / DB + 1);
    for (int i = 0; i < rise_b.size(); i++)
      check_eq("rise position D=7", rise_b[i], i * DB + 1);
    for (int i = 0; i < fall_b.size() && i < rise_b.size(); i++)
      check_eq("high time D=7", fall_b[i] - rise_b[i], (DB + 1) / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
