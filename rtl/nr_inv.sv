// nr_inv: floating-point Newton-Raphson inverter, one iteration per cycle.
//
// Computes y = 1/x for a real floating-point x. Because the mantissa m of a
// normalised number lies in [1,2), 1/m lies in (0.5,1], so the iteration
// only needs to work on the mantissa in fixed point; the exponent is simply
// negated and the sign kept. The start value uses a two-choice selection
// that splits the solution range (0.5,1] into two equal halves:
// y0 = 0.875 for m < 4/3 and y0 = 0.625 otherwise. Each cycle computes
// y(n+1) = 2*y(n) - y(n)^2 * m in F fractional bits.
//
// Timing: hold `act` high while the instruction sits in EX1. The unit counts
// iterations internally; in the NITER-th cycle of `act` the last iteration
// is computed combinationally, `last` is high and `y` is valid. x must stay
// stable while `act` is high. x = 0 saturates to the largest magnitude, an
// exponent out of range flushes to zero.
// The iteration, the start-value scheme and four iterations follow the
// document; the fixed-point width and the handling of zero are this design's.
module nr_inv
  import napcore_pkg::*;
#(
  parameter int unsigned NITER = NR_ITER,
  parameter int unsigned F     = MW + 6     // fractional bits of the iterate
) (
  input  logic clk,
  input  logic rst_n,
  input  logic act,
  input  fp_t  x,
  output fp_t  y,
  output logic last
);
  localparam int unsigned YW = F + 2;                     // value < 2
  localparam logic [MW-1:0] THR = MW'(((1 << MW) + 2) / 3); // 4/3 - 1 in mantissa units
  localparam logic [YW-1:0] Y0_LO = YW'((7 << F) / 8);    // 0.875
  localparam logic [YW-1:0] Y0_HI = YW'((5 << F) / 8);    // 0.625

  logic [$clog2(NITER+1)-1:0] cnt;
  logic [YW-1:0] yq, cur, nxt;
  logic [2*YW-1:0] sq;
  logic [YW+MW:0]  sqm;
  logic [YW-1:0]   sqt, sqmt;
  logic signed [EW+2:0] e;

  always_comb begin
    cur  = (cnt == '0) ? ((x.man < THR) ? Y0_LO : Y0_HI) : yq;
    sq   = cur * cur;                         // 2F fractional bits
    sqt  = YW'(sq >> F);
    sqm  = sqt * {1'b1, x.man};               // F + MW fractional bits
    sqmt = YW'(sqm >> MW);
    nxt  = (cur << 1) - sqmt;
  end

  assign last = act && (cnt == ($bits(cnt))'(NITER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      yq  <= '0;
    end else if (act) begin
      yq  <= nxt;
      cnt <= last ? '0 : cnt + 1'b1;
    end
  end

  // convert the fixed-point result back to floating point
  always_comb begin
    y     = FP_ZERO;
    y.sgn = x.sgn;
    e     = $signed((EW+3)'(2 * BIAS)) - $signed({3'b000, x.exp});
    if (x.exp == '0) begin
      y.exp = '1;
      y.man = '1;
    end else if (nxt[F]) begin                // 1/m == 1
      if (e <= 0) y = FP_ZERO;
      else begin
        y.exp = e[EW-1:0];
        y.man = nxt[F-1 -: MW];
      end
    end else if (nxt[F-1]) begin              // 1/m in [0.5, 1)
      if (e - 1 <= 0) y = FP_ZERO;
      else begin
        y.exp = EW'(e - 1);
        y.man = nxt[F-2 -: MW];
      end
    end else begin                            // truncation left it just below 0.5
      if (e - 2 <= 0) y = FP_ZERO;
      else begin
        y.exp = EW'(e - 2);
        y.man = nxt[F-3 -: MW];
      end
    end
  end
endmodule
