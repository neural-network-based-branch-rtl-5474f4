// mlp_predictor: multilayer perceptron (MLP) branch predictor.
//
// One network, shared by all branches, replaces the pattern history table.
// Its N_IN inputs are the A_BITS low bits of the branch address followed by
// K history bits, each applied as +1 (bit set / taken) or -1. It has one hidden
// layer of N_HID = N_IN/2 neurons and one output neuron; every neuron has a
// bias and uses the bipolar sigmoid activation. The branch is predicted taken
// when the output neuron's net input is above zero.
//
//   net_h[j] = b_h[j] + sum_i w_ih[j][i] * x_i       h[j] = f(net_h[j])
//   net_o    = b_o    + sum_j w_ho[j]    * h[j]      o    = f(net_o)
//
// Training is one step of back-propagation (gradient descent on (t-o)^2/2,
// target t = +1 taken / -1 not taken, learning rate 2**-ETA_SHIFT), applied
// only when the prediction was wrong:
//   d_o    = (t - o) * f'(net_o)
//   d_h[j] = d_o * w_ho[j] * f'(net_h[j])          (using the old w_ho)
//   w_ho[j] += eta * d_o * h[j],   b_o += eta * d_o
//   w_ih[j][i] += eta * d_h[j] * x_i,   b_h[j] += eta * d_h[j]
// All weights are 32-bit Q16.16 numbers with saturating arithmetic.
//
// Interface and timing: as slp_predictor. `pc` and `hist` give `net_o`, `o`
// and `pred_taken` combinationally in the same cycle. Holding them at the
// values used for the prediction and raising `train_en` with the outcome on
// `taken` updates all weights at that clock edge if the prediction was wrong.
// Reset loads every weight with a small fixed pseudo-random value (within
// +/-0.125): with all-zero weights the hidden neurons would stay identical and
// never learn.
//
// Inputs from the address and history, one hidden layer with half as many
// neurons as inputs, the bipolar sigmoid, 4-byte weights and the defaults
// (8 address bits, 13 history bits, 10 hidden neurons, the G(A)mlp-8K
// configuration) follow the design. Training only on a misprediction follows
// the design's rule for the neural predictors. The fixed-point format, the
// learning rate and the initial weights are this implementation's choices.
module mlp_predictor
  import nbp_pkg::*;
#(
  parameter int unsigned PC_W      = 32,
  parameter int unsigned A_BITS    = 8,
  parameter int unsigned K         = 13,
  parameter int unsigned ETA_SHIFT = 2,
  localparam int unsigned N_IN     = A_BITS + K,
  localparam int unsigned N_HID    = N_IN / 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] pc,
  input  logic [K-1:0]    hist,
  output q16_t            net_o,
  output q16_t            o,
  output logic            pred_taken,
  input  logic            train_en,
  input  logic            taken,
  output logic            mispredict
);

  // Weight index 0 is the bias of each neuron.
  q16_t w_ih [N_HID][N_IN+1];
  q16_t w_ho [N_HID+1];

  logic [N_IN-1:0] xv;
  q16_t net_h [N_HID];
  q16_t h     [N_HID];
  q16_t dh    [N_HID];
  q16_t d_out;

  assign xv = {hist, pc[A_BITS-1:0]};

  // ---------------------------------------------------------------- forward
  always_comb begin
    for (int j = 0; j < int'(N_HID); j++) begin
      logic signed [63:0] acc;
      acc = 64'(w_ih[j][0]);
      for (int i = 0; i < int'(N_IN); i++)
        acc = xv[i] ? acc + 64'(w_ih[j][i+1]) : acc - 64'(w_ih[j][i+1]);
      net_h[j] = q_sat(acc);
    end
  end

  for (genvar j = 0; j < int'(N_HID); j++) begin : g_hidden
    bipolar_sigmoid u_act (.x(net_h[j]), .f(h[j]), .df(dh[j]));
  end

  always_comb begin
    logic signed [63:0] acc;
    acc = 64'(w_ho[0]);
    for (int j = 0; j < int'(N_HID); j++)
      acc = acc + 64'(q_mul(w_ho[j+1], h[j]));
    net_o = q_sat(acc);
  end

  bipolar_sigmoid u_out_act (.x(net_o), .f(o), .df(d_out));

  assign pred_taken = (net_o > 0);
  assign mispredict = train_en && (pred_taken != taken);

  // ------------------------------------------------------- back-propagation
  q16_t del_o;
  q16_t del_h  [N_HID];
  q16_t w_ih_n [N_HID][N_IN+1];
  q16_t w_ho_n [N_HID+1];

  always_comb begin
    q16_t t;
    t     = taken ? Q_ONE : -Q_ONE;
    del_o = q_mul(q_add(t, -o), d_out);
    w_ho_n[0] = q_add(w_ho[0], del_o >>> ETA_SHIFT);
    for (int j = 0; j < int'(N_HID); j++) begin
      del_h[j]     = q_mul(q_mul(del_o, w_ho[j+1]), dh[j]);
      w_ho_n[j+1]  = q_add(w_ho[j+1], q_mul(del_o, h[j]) >>> ETA_SHIFT);
      w_ih_n[j][0] = q_add(w_ih[j][0], del_h[j] >>> ETA_SHIFT);
      for (int i = 0; i < int'(N_IN); i++)
        w_ih_n[j][i+1] = xv[i] ? q_add(w_ih[j][i+1],   del_h[j] >>> ETA_SHIFT)
                               : q_add(w_ih[j][i+1], -(del_h[j] >>> ETA_SHIFT));
    end
  end

  // Fixed pseudo-random start value for weight i of neuron j (j = N_HID is
  // the output neuron): a multiplicative hash of the position, top 14 bits
  // kept as a signed Q16.16 number.
  function automatic q16_t init_w(input int j, input int i);
    logic [31:0] hv;
    hv = 32'((j * 64 + i + 1)) * 32'h9E37_79B1;
    hv = hv ^ (hv >> 15);
    return q16_t'($signed(hv[31:18]));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(N_HID); j++)
        for (int i = 0; i <= int'(N_IN); i++)
          w_ih[j][i] <= init_w(j, i);
      for (int j = 0; j <= int'(N_HID); j++)
        w_ho[j] <= init_w(int'(N_HID), j);
    end else if (mispredict) begin
      w_ih <= w_ih_n;
      w_ho <= w_ho_n;
    end
  end

endmodule
