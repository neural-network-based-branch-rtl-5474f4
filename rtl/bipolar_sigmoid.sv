// bipolar_sigmoid: the activation function of the multilayer perceptron.
//
//   f(x)  = 2 / (1 + exp(-x)) - 1  = tanh(x/2),   range (-1, 1)
//   df(x) = f'(x) = (1 + f(x)) * (1 - f(x)) / 2
//
// Input and outputs are Q16.16. f is odd, so it is evaluated on |x| and the
// sign restored. On |x| it is a piecewise-linear interpolation between the
// exact values at |x| = 0, 0.5, 1, 1.5, 2, 2.5, 3, 4, 5, 6 and 8, and held at
// f(8) beyond. Every segment is 0.5, 1 or 2 wide, so the interpolation needs
// one multiply by the segment's rise and a shift. The knots are
// round(65536 * tanh(x/2)). The largest error against the exact function is
// about 0.007. df is computed from f, as back-propagation uses it.
// Purely combinational.
//
// The bipolar sigmoid is the design's activation; the piecewise-linear
// approximation and the fixed-point format are this implementation's choices.
module bipolar_sigmoid
  import nbp_pkg::*;
(
  input  q16_t x,
  output q16_t f,
  output q16_t df
);

  localparam int NSEG = 10;
  // Knot positions (Q16.16), values (Q16.16) and log2 of each segment width.
  localparam int KX [NSEG+1] = '{0, 32768, 65536, 98304, 131072, 163840,
                                 196608, 262144, 327680, 393216, 524288};
  localparam int KY [NSEG+1] = '{0, 16051, 30285, 41625, 49912, 55593,
                                 59320, 63179, 64659, 65212, 65492};
  localparam int KS [NSEG]   = '{15, 15, 15, 15, 15, 15, 16, 16, 16, 17};

  logic        neg;
  logic [31:0] ax;      // |x|, 32 bits so that |Q_MIN| fits
  logic [31:0] fa;      // f(|x|)
  logic [63:0] span;

  always_comb begin
    neg  = x[31];
    ax   = neg ? (~x + 32'd1) : x;
    fa   = 32'(KY[NSEG]);
    span = '0;
    for (int s = NSEG - 1; s >= 0; s--) begin
      if (ax < 32'(KX[s+1]) && ax >= 32'(KX[s])) begin
        span = 64'(ax - 32'(KX[s])) * 64'(KY[s+1] - KY[s]);
        fa   = 32'(KY[s]) + 32'(span >> KS[s]);
      end
    end
    f  = neg ? -q16_t'(fa) : q16_t'(fa);
    df = q_mul(Q_ONE + f, Q_ONE - f) >>> 1;
  end

endmodule
