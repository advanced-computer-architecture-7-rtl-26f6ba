// perceptron_predictor: perceptron branch direction predictor.
//
// A table of NUM_PERC perceptrons is indexed by the branch PC (word address
// bits). Each perceptron is a row of HIST_LEN+1 signed W_BITS-bit weights
// w0..wn (with the default n = 28 and 8-bit weights: 29 x 8 = 232 bits). The
// output of the selected perceptron is
//     y = w0 + sum_{i=1..n} x_i * w_i
// where x_i is +1 for a taken and -1 for a not-taken bit of the global branch
// history (bit i-1 of the history register, bit 0 the most recent branch).
// The prediction is taken when y >= 0.
//
// Training: a branch is trained when its outcome t (+1/-1) disagrees with the
// sign of y or when |y| <= THETA, with THETA = floor(1.93 n + 14) (68 for
// n = 28); then every weight moves by t * x_i (w0 by t). Weights saturate at
// the limits of W_BITS-bit two's complement.
//
// Ports: the prediction (pred_pc -> pred_taken, pred_y) is combinational
// from the current global history. hist_valid/hist_taken shift the global
// history like the fetch stage of gshare; hist_restore loads it with
// hist_restore_value instead (repair after a misprediction). The training port takes the PC, the
// history the prediction used (ghist at prediction time, carried down the
// pipeline) and the outcome; the module recomputes y from them and updates the
// row at the rising clock edge. upd_trained reports whether the branch being
// updated meets the training rule. Reset (active low, synchronous) clears all
// weights and the history.
//
// The model, n = 28, the 8-bit weights, the training rule and the threshold
// formula follow the reference description. The table size, the PC bits used
// as index, the saturation, the history bit order and recomputing y at update
// time are choices of this design.
module perceptron_predictor #(
  parameter int unsigned NUM_PERC = 256,
  parameter int unsigned HIST_LEN = 28,
  parameter int unsigned W_BITS   = 8,
  parameter int unsigned PC_W     = 32,
  parameter int          THETA    = (193 * HIST_LEN + 1400) / 100,
  localparam int unsigned IDX_W   = $clog2(NUM_PERC),
  localparam int unsigned NW      = HIST_LEN + 1,
  localparam int unsigned Y_W     = W_BITS + $clog2(NW) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // prediction
  input  logic [PC_W-1:0]      pred_pc,
  output logic                 pred_taken,
  output logic signed [Y_W-1:0] pred_y,
  // global history
  input  logic                 hist_valid,
  input  logic                 hist_taken,
  output logic [HIST_LEN-1:0]  ghist,
  input  logic                 hist_restore,
  input  logic [HIST_LEN-1:0]  hist_restore_value,
  // training
  input  logic                 upd_valid,
  input  logic [PC_W-1:0]      upd_pc,
  input  logic [HIST_LEN-1:0]  upd_hist,
  input  logic                 upd_taken,
  output logic                 upd_trained
);
  typedef logic signed [W_BITS-1:0] weight_t;
  typedef logic [NW*W_BITS-1:0]     row_t;

  localparam weight_t WMAX = weight_t'((2 ** (W_BITS - 1)) - 1);
  localparam weight_t WMIN = weight_t'(-(2 ** (W_BITS - 1)));

  row_t table_q [NUM_PERC];

  function automatic weight_t wsel(input row_t r, input int unsigned i);
    return weight_t'(r[i*W_BITS +: W_BITS]);
  endfunction

  function automatic logic signed [Y_W-1:0] dot(input row_t r, input logic [HIST_LEN-1:0] h);
    logic signed [Y_W-1:0] acc;
    acc = Y_W'(wsel(r, 0));
    for (int unsigned i = 1; i < NW; i++) begin
      if (h[i-1]) acc = acc + Y_W'(wsel(r, i));
      else        acc = acc - Y_W'(wsel(r, i));
    end
    return acc;
  endfunction

  function automatic weight_t step(input weight_t w, input logic up);
    if (up) return (w == WMAX) ? w : w + weight_t'(1);
    else    return (w == WMIN) ? w : w - weight_t'(1);
  endfunction

  logic [IDX_W-1:0]      pidx, uidx;
  row_t                  urow, unew;
  logic signed [Y_W-1:0] uy;
  logic                  umag_low, usign_wrong;

  assign pidx       = pred_pc[IDX_W+1:2];
  assign pred_y     = dot(table_q[pidx], ghist);
  assign pred_taken = (pred_y >= 0);

  assign uidx        = upd_pc[IDX_W+1:2];
  assign urow        = table_q[uidx];
  assign uy          = dot(urow, upd_hist);
  assign usign_wrong = ((uy >= 0) != upd_taken);
  assign umag_low    = (uy <= Y_W'(THETA)) && (uy >= -Y_W'(THETA));
  assign upd_trained = usign_wrong || umag_low;

  // w_i += t * x_i: up when the outcome agrees with the history bit
  always_comb begin
    unew[0 +: W_BITS] = step(wsel(urow, 0), upd_taken);
    for (int unsigned i = 1; i < NW; i++)
      unew[i*W_BITS +: W_BITS] = step(wsel(urow, i), upd_taken == upd_hist[i-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ghist <= '0;
    else if (hist_restore) ghist <= hist_restore_value;
    else if (hist_valid) ghist <= {ghist[HIST_LEN-2:0], hist_taken};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_PERC; i++) table_q[i] <= '0;
    end else if (upd_valid && upd_trained) begin
      table_q[uidx] <= unew;
    end
  end
endmodule
