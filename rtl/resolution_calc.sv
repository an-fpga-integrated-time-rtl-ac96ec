// Resolution calculator.
//
// Forms the converter's digital output code from the two period counts:
//   B = 2 (Y1 - Y2) D / (X1 - X2),
// so that the delay-line step is dT = TCLK / B and the equivalent
// resolution of the converter is TCLK / 2D. The formula is the
// converter's; the way it is evaluated is this design's choice: a
// restoring divider producing one quotient bit per clock, with the
// quotient truncated towards zero. Both differences are taken as
// magnitudes, so Y1 < Y2 works as well as Y1 > Y2, but their signs must
// agree and X1 - X2 must not be zero; otherwise err is raised and b is 0.
//
// Timing: b and b_valid appear B_WIDTH + 2 cycles after the start pulse
// (one cycle to form the operands, B_WIDTH divide steps, one to output).
// Interface: clk, rst_n (synchronous, active low), start (pulse, operands
// taken that cycle; ignored while busy), x1, x2, y1, y2, b, b_valid
// (one-cycle pulse), err (valid with b_valid), busy.
module resolution_calc #(
  parameter int unsigned Q_WIDTH = tdc_pkg::Q_WIDTH,
  parameter int unsigned Y_WIDTH = tdc_pkg::Y_WIDTH,
  parameter int unsigned B_WIDTH = tdc_pkg::B_WIDTH,
  parameter int unsigned D       = tdc_pkg::DIV_RATIO
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [Q_WIDTH-1:0] x1,
  input  logic [Q_WIDTH-1:0] x2,
  input  logic [Y_WIDTH-1:0] y1,
  input  logic [Y_WIDTH-1:0] y2,
  output logic [B_WIDTH-1:0] b,
  output logic               b_valid,
  output logic               err,
  output logic               busy
);
  typedef enum logic [1:0] {R_IDLE, R_PREP, R_DIV, R_OUT} rstate_t;

  localparam int unsigned SW = (B_WIDTH > 1) ? $clog2(B_WIDTH + 1) : 1;

  rstate_t            state;
  logic [Q_WIDTH-1:0] dx_r;    // |X1 - X2|, the divisor
  logic [Y_WIDTH-1:0] dy_r;    // |Y1 - Y2|
  logic               bad_r;   // signs disagree or divisor zero
  logic [B_WIDTH-1:0] num;     // dividend, shifted out MSB first
  logic [B_WIDTH-1:0] quo;
  logic [Q_WIDTH-1:0] rem;     // remainder, always below the divisor
  logic [Q_WIDTH:0]   rem_sh;
  logic [SW-1:0]      steps;
  logic [63:0]        num_full;

  assign busy     = (state != R_IDLE);
  assign num_full = 64'(dy_r) * 64'(2 * D);
  assign rem_sh   = {rem, num[B_WIDTH-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= R_IDLE;
      dx_r    <= '0;
      dy_r    <= '0;
      bad_r   <= 1'b0;
      num     <= '0;
      quo     <= '0;
      rem     <= '0;
      steps   <= '0;
      b       <= '0;
      b_valid <= 1'b0;
      err     <= 1'b0;
    end else begin
      b_valid <= 1'b0;
      unique case (state)
        R_IDLE: if (start) begin
          dx_r  <= (x1 >= x2) ? x1 - x2 : x2 - x1;
          dy_r  <= (y1 >= y2) ? y1 - y2 : y2 - y1;
          bad_r <= (x1 == x2) || ((x1 > x2) != (y1 > y2));
          state <= R_PREP;
        end
        R_PREP: begin
          num   <= B_WIDTH'(num_full);
          quo   <= '0;
          rem   <= '0;
          steps <= SW'(B_WIDTH);
          bad_r <= bad_r || (num_full >> B_WIDTH) != 64'd0;
          state <= R_DIV;
        end
        R_DIV: begin
          if (rem_sh >= {1'b0, dx_r}) begin
            rem <= Q_WIDTH'(rem_sh - {1'b0, dx_r});
            quo <= {quo[B_WIDTH-2:0], 1'b1};
          end else begin
            rem <= rem_sh[Q_WIDTH-1:0];
            quo <= {quo[B_WIDTH-2:0], 1'b0};
          end
          num   <= num << 1;
          steps <= steps - 1'b1;
          if (steps == SW'(1)) state <= R_OUT;
        end
        R_OUT: begin
          b       <= bad_r ? '0 : quo;
          err     <= bad_r;
          b_valid <= 1'b1;
          state   <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
