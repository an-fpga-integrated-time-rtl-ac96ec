// Testbench for resolution_calc: compares b with
// floor(2 |Y1-Y2| D / |X1-X2|) computed in the testbench, for the
// converter's operating point (Y1 = 1000, Y2 = 500, D = 10000), for the
// four measured output codes 1650, 1773, 1786 and 1726, for random
// operands, and for the error cases (X1 = X2, signs that disagree). It
// also checks that b_valid comes exactly B_WIDTH + 2 cycles after start.
`timescale 1ns / 1ps
module tb_resolution_calc;
  localparam int unsigned D  = 10000;
  localparam int unsigned BW = 32;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [29:0] x1, x2;
  logic [9:0]  y1, y2;
  logic [31:0] b;
  logic        b_valid, err, busy;
  int          checks = 0, failures = 0;

  resolution_calc dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x1(x1), .x2(x2), .y1(y1), .y2(y2),
    .b(b), .b_valid(b_valid), .err(err), .busy(busy)
  );

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned a1, input int unsigned a2,
                     input int unsigned w1, input int unsigned w2);
    longint unsigned num, den, exp_b;
    bit              exp_err;
    int              lat;
    num = 2 * longint'(w1 > w2 ? w1 - w2 : w2 - w1) * D;
    den = longint'(a1 > a2 ? a1 - a2 : a2 - a1);
    exp_err = (a1 == a2) || ((a1 > a2) != (w1 > w2));
    exp_b = exp_err ? 0 : num / den;
    @(negedge clk);
    x1 = 30'(a1); x2 = 30'(a2); y1 = 10'(w1); y2 = 10'(w2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;  // rising edges after the one that took start
    while (!b_valid) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (err !== exp_err || b !== 32'(exp_b)) begin
      failures++;
      $display("FAIL x1=%0d x2=%0d y1=%0d y2=%0d: b=%0d err=%0b expected b=%0d err=%0b",
               a1, a2, w1, w2, b, err, exp_b, exp_err);
    end
    checks++;
    if (lat != BW + 2) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", lat, BW + 2);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // operating point: X1 - X2 chosen so that B lands on each measured code
    run(28000, 28000 - 6061, 1000, 500);   // 1e7 / 6061 = 1649
    run(30000, 30000 - 6060, 1000, 500);   // 1650
    run(30000, 30000 - 5640, 1000, 500);   // 1773
    run(30000, 30000 - 5599, 1000, 500);   // 1786
    run(30000, 30000 - 5793, 1000, 500);   // 1726
    run(22000, 28000, 500, 1000);          // both differences negative
    run(25000, 25000, 1000, 500);          // X1 = X2
    run(26000, 25000, 500, 1000);          // signs disagree
    run(1, 0, 1023, 0);                    // largest quotient
    for (int i = 0; i < 200; i++) begin
      int unsigned a1, a2, w1, w2;
      a1 = $urandom_range(100000, 1);
      a2 = $urandom_range(100000, 1);
      w1 = $urandom_range(1023, 0);
      w2 = $urandom_range(1023, 0);
      run(a1, a2, w1, w2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
