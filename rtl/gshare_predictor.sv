// gshare_predictor: gshare branch direction predictor.
//
// A pattern history table (PHT) of 2^PHT_BITS two-bit saturating counters is
// indexed by the exclusive OR of the branch PC (word address bits
// PC[PHT_BITS+1:2]) and the global branch history register (BHR). The
// prediction is the most significant bit of the selected counter (1 = taken).
//
// Updates follow the two-stage scheme of gshare:
//   * fetch (IF) side: hist_valid shifts the BHR one bit left and puts
//     hist_taken in its least significant bit. The fetch stage drives this
//     with the direction it follows for the branch (normally the prediction);
//   * write-back (WB) side: upd_valid trains the counter that was used for the
//     prediction, named by the index pred_idx returned with the prediction
//     and carried down the pipeline, exactly like a bimodal two-bit counter
//     (increment on taken, decrement on not taken, saturating at 0 and 3).
//
// Timing: the prediction is combinational from pred_pc and the current BHR.
// Both updates take effect at the rising clock edge. Reset (active low,
// synchronous) clears the BHR; the counters are then set to 1 (weakly not
// taken) one entry per clock, like a table kept in RAM, and ready rises after
// 2^PHT_BITS cycles. Predictions and updates must wait for ready.
// The table size, history length, index bits and reset state are choices of
// this design; the index function, prediction bit and update points follow
// the reference description.
module gshare_predictor #(
  parameter int unsigned PHT_BITS = 12,
  parameter int unsigned HIST_LEN = 12,
  parameter int unsigned PC_W     = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // prediction (IF)
  input  logic [PC_W-1:0]     pred_pc,
  output logic                pred_taken,
  output logic [PHT_BITS-1:0] pred_idx,
  // history update (IF)
  input  logic                hist_valid,
  input  logic                hist_taken,
  output logic [HIST_LEN-1:0] bhr,
  // counter update (WB)
  input  logic                upd_valid,
  input  logic [PHT_BITS-1:0] upd_idx,
  input  logic                upd_taken,
  output logic                ready
);
  localparam int unsigned ENTRIES = 2 ** PHT_BITS;

  logic [1:0]          pht [ENTRIES];
  logic [PHT_BITS-1:0] hist_ext;

  // history folded to the index width (zero-extended or truncated)
  always_comb begin
    hist_ext = '0;
    for (int unsigned i = 0; i < HIST_LEN; i++) hist_ext[i % PHT_BITS] ^= bhr[i];
  end

  assign pred_idx   = pred_pc[PHT_BITS+1:2] ^ hist_ext;
  assign pred_taken = pht[pred_idx][1];

  always_ff @(posedge clk) begin
    if (!rst_n) bhr <= '0;
    else if (hist_valid) bhr <= {bhr[HIST_LEN-2:0], hist_taken};
  end

  // After reset the table is swept one entry per cycle; updates are ignored
  // until ready is high (ENTRIES cycles after reset is released).
  logic [PHT_BITS:0] sweep;
  assign ready = sweep[PHT_BITS];

  always_ff @(posedge clk) begin
    if (!rst_n) sweep <= '0;
    else if (!ready) sweep <= sweep + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!ready) begin
      pht[sweep[PHT_BITS-1:0]] <= 2'b01;
    end else if (upd_valid) begin
      if (upd_taken && pht[upd_idx] != 2'b11)       pht[upd_idx] <= pht[upd_idx] + 2'd1;
      else if (!upd_taken && pht[upd_idx] != 2'b00) pht[upd_idx] <= pht[upd_idx] - 2'd1;
    end
  end
endmodule
