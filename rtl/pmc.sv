// Period measurement circuit (PMC).
//
// Turns the period T0 of the divided ring signal DO into a number by
// counting reference-clock cycles between two consecutive rising edges of
// DO: Q = X = T0 / TCLK. The counter, the reference clock CLK and the
// 30-bit result Q follow the converter's specification. Synchronising DO
// into the CLK domain (SYNC_STAGES flip-flops followed by an edge
// detector), the arming rule and the saturation of the counter are this
// design's choices.
//
// Operation: a pulse on clear disarms the circuit. The first synchronised
// rising edge of DO after that arms it and restarts the counter at 1; at
// every later rising edge the count reached so far is copied to q, q_valid
// pulses for one cycle and the counter restarts. If the edges arrive in
// CLK cycles n and n + X, q = X. The synchroniser adds the same latency to
// both edges, so it shifts the count by no more than the +/-1 cycle
// quantisation that any counter-based measurement has. The counter stops
// at its largest value rather than wrapping.
//
// Interface: clk, rst_n (synchronous to clk, active low), clear (pulse),
// do_i (asynchronous divided signal), q (last period in CLK cycles),
// q_valid (one-cycle pulse when q is updated).
module pmc #(
  parameter int unsigned Q_WIDTH     = tdc_pkg::Q_WIDTH,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               do_i,
  output logic [Q_WIDTH-1:0] q,
  output logic               q_valid
);
  logic [SYNC_STAGES-1:0] sync;
  logic                   do_prev;
  logic                   rise;
  logic                   armed;
  logic [Q_WIDTH-1:0]     cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync    <= '0;
      do_prev <= 1'b0;
    end else begin
      sync    <= {sync[SYNC_STAGES-2:0], do_i};
      do_prev <= sync[SYNC_STAGES-1];
    end
  end

  assign rise = sync[SYNC_STAGES-1] & ~do_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      cnt     <= '0;
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= 1'b0;
      if (clear) begin
        armed <= 1'b0;
        cnt   <= '0;
      end else if (rise) begin
        armed <= 1'b1;
        cnt   <= Q_WIDTH'(1);
        if (armed) begin
          q       <= cnt;
          q_valid <= 1'b1;
        end
      end else if (armed && cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial begin
    assert (SYNC_STAGES >= 2) else $error("pmc: SYNC_STAGES must be at least 2");
  end
endmodule
