// prophet_critic: prophet/critic hybrid branch predictor with a fetch
// target queue.
//
// What it does: a branch source (the branch-address side of the front end)
// offers one branch per cycle, with its PC. The prophet, a perceptron
// predictor, predicts it at once and the branch enters the fetch target
// queue (FTQ) at the tail. The critic, a tagged gshare table, looks at each
// queued branch only after the prophet has predicted FUTURE branches from it
// onward, so its branch outcome register (BOR) holds the final outcomes of
// older branches followed by the prophet's "future" predictions for that
// branch and the ones after it. If the critic's entry for (PC, BOR) is
// present and disagrees with the prophet, the critic overrides: the branch's
// prediction is flipped, all younger queue entries (built on the wrong
// guess) are dropped, the prophet history is repaired and the branch source
// is told to restart with the next branch. Only critiqued entries can leave
// the queue at the head towards instruction fetch.
//
// How it works:
//   * Queue: FTQ_DEPTH entries in a circular buffer (head, count). crit_cnt
//     counts the critiqued entries at the head; the entry at head+crit_cnt
//     is critiqued in the cycle count >= crit_cnt + FUTURE holds.
//   * BOR of the critiqued branch = {critic history (CRIT_HIST final
//     outcomes of older branches), prophet prediction of this branch,
//     prophet predictions of the next FUTURE-1 branches}.
//   * Critic index = PC[2 +: CRIT_IDX] xor BOR; tag = PC[2 +: CRIT_TAG];
//     each entry has a valid bit, the tag and a 2-bit counter (MSB =
//     prediction). 4096 x (1 + 13 + 2) bits = 8 KB with the defaults.
//   * Resolve (in program order, from the back end): the prophet is trained
//     with the history it used; the critic counter is trained on a tag hit,
//     and an entry is allocated on a miss when the prophet was wrong. A
//     final misprediction empties the queue and repairs both histories.
//   * Priority in one cycle: misprediction > critic override > new branch.
//
// Interface:
//   br_valid/br_pc/br_ready/br_id : branch offered by the source; br_id is
//       the sequence number the source must supply next.
//   redirect_valid/redirect_id   : the source must restart at redirect_id
//       (asserted for an override and for a misprediction).
//   crit_override                : a critic override happens this cycle.
//   f_valid/f_ready/f_*          : oldest critiqued branch towards fetch;
//       f_phist and f_bor are carried down the pipeline and returned with
//       the resolve.
//   res_*                        : resolved branch, in order.
//   ready                        : the critic is usable (fixed 1 cycle
//       after reset, kept for symmetry with the other predictors).
// Timing: prophet lookup, critique and override decision are combinational
// and take effect at the next rising edge. Reset: synchronous, active low.
//
// From the reference: the prophet/critic split, the critic acting only
// after seeing future prophet predictions, 4 future bits, the 12-entry
// queue of the figure (branches A..L), and the 8KB perceptron prophet with
// an 8KB tagged gshare critic. This design's own choices: the history
// length of the critic, the index and tag functions, the allocation and
// training policy, in-order resolve with carried history, the restart
// protocol with sequence numbers and 256 perceptrons (7.25 KB) as prophet.
module prophet_critic #(
  parameter int unsigned FTQ_DEPTH = 12,
  parameter int unsigned FUTURE    = 4,
  parameter int unsigned CRIT_HIST = 8,
  parameter int unsigned CRIT_IDX  = 12,
  parameter int unsigned CRIT_TAG  = 13,
  parameter int unsigned NUM_PERC  = 256,
  parameter int unsigned HIST_LEN  = 28,
  parameter int unsigned PC_W      = 32,
  parameter int unsigned ID_W      = 16,
  localparam int unsigned BOR_W    = CRIT_HIST + FUTURE,
  localparam int unsigned PTR_W    = $clog2(FTQ_DEPTH),
  localparam int unsigned CNT_W    = $clog2(FTQ_DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  // branch source
  input  logic                 br_valid,
  input  logic [PC_W-1:0]      br_pc,
  output logic                 br_ready,
  output logic [ID_W-1:0]      br_id,
  output logic                 redirect_valid,
  output logic [ID_W-1:0]      redirect_id,
  output logic                 crit_override,
  // towards fetch
  output logic                 f_valid,
  input  logic                 f_ready,
  output logic [ID_W-1:0]      f_id,
  output logic [PC_W-1:0]      f_pc,
  output logic                 f_pred,
  output logic                 f_prophet_pred,
  output logic [HIST_LEN-1:0]  f_phist,
  output logic [BOR_W-1:0]     f_bor,
  // resolve
  input  logic                 res_valid,
  input  logic [ID_W-1:0]      res_id,
  input  logic [PC_W-1:0]      res_pc,
  input  logic [HIST_LEN-1:0]  res_phist,
  input  logic [BOR_W-1:0]     res_bor,
  input  logic                 res_prophet_pred,
  input  logic                 res_pred,
  input  logic                 res_taken,
  output logic                 mispredict,
  output logic [CNT_W-1:0]     ftq_count
);
  localparam int unsigned ENTRIES = 2 ** CRIT_IDX;

  typedef struct packed {
    logic [ID_W-1:0]     id;
    logic [PC_W-1:0]     pc;
    logic [HIST_LEN-1:0] phist;
    logic                ppred;
    logic                fpred;
    logic [BOR_W-1:0]    bor;
  } ent_t;

  ent_t             ftq [FTQ_DEPTH];
  logic [PTR_W-1:0] head;
  logic [CNT_W-1:0] count, crit_cnt;
  logic [ID_W-1:0]  next_id;
  logic [CRIT_HIST-1:0] chist;

  logic [1:0]          c_ctr [ENTRIES];
  logic [CRIT_TAG-1:0] c_tag [ENTRIES];
  logic [ENTRIES-1:0]  c_valid;

  function automatic logic [PTR_W-1:0] wrap(input int unsigned x);
    return PTR_W'(x % FTQ_DEPTH);
  endfunction

  function automatic logic [CRIT_IDX-1:0] cindex(input logic [PC_W-1:0] pc,
                                                 input logic [BOR_W-1:0] bor);
    return pc[2 +: CRIT_IDX] ^ CRIT_IDX'(bor);
  endfunction

  // ---------------- prophet ----------------
  logic                p_pred;
  logic [HIST_LEN-1:0] p_ghist;
  logic                p_restore;
  logic [HIST_LEN-1:0] p_restore_val;
  logic                push;

  perceptron_predictor #(
    .NUM_PERC(NUM_PERC), .HIST_LEN(HIST_LEN), .PC_W(PC_W)
  ) u_prophet (
    .clk, .rst_n,
    .pred_pc(br_pc), .pred_taken(p_pred), .pred_y(),
    .hist_valid(push), .hist_taken(p_pred), .ghist(p_ghist),
    .hist_restore(p_restore), .hist_restore_value(p_restore_val),
    .upd_valid(res_valid), .upd_pc(res_pc), .upd_hist(res_phist),
    .upd_taken(res_taken), .upd_trained()
  );

  // ---------------- critique ----------------
  logic [PTR_W-1:0]    cpos;
  logic                crit_go, c_hit, c_pred;
  logic [FUTURE-1:0]   fut;
  logic [BOR_W-1:0]    bor;
  logic [CRIT_IDX-1:0] cidx;
  logic                final_pred;
  ent_t                ce;

  assign cpos    = wrap(int'(head) + int'(crit_cnt));
  assign ce      = ftq[cpos];
  assign crit_go = ready && (int'(count) >= int'(crit_cnt) + int'(FUTURE));

  always_comb begin
    for (int unsigned j = 0; j < FUTURE; j++)
      fut[FUTURE-1-j] = ftq[wrap(int'(cpos) + int'(j))].ppred;
  end

  assign bor        = {chist, fut};
  assign cidx       = cindex(ce.pc, bor);
  assign c_hit      = c_valid[cidx] && (c_tag[cidx] == ce.pc[2 +: CRIT_TAG]);
  assign c_pred     = c_ctr[cidx][1];
  assign mispredict = res_valid && (res_pred != res_taken);
  assign crit_override   = crit_go && c_hit && (c_pred != ce.ppred) && !mispredict;
  assign final_pred = crit_override ? c_pred : ce.ppred;

  // ---------------- source and fetch handshake ----------------
  logic pop;
  assign br_ready  = ready && (int'(count) < FTQ_DEPTH) && !crit_override && !mispredict;
  assign push      = br_valid && br_ready;
  assign br_id     = next_id;
  assign f_valid   = (crit_cnt != '0);
  assign pop       = f_valid && f_ready && !mispredict;
  assign ftq_count = count;

  assign f_id           = ftq[head].id;
  assign f_pc           = ftq[head].pc;
  assign f_pred         = ftq[head].fpred;
  assign f_prophet_pred = ftq[head].ppred;
  assign f_phist        = ftq[head].phist;
  assign f_bor          = ftq[head].bor;

  assign redirect_valid = mispredict || crit_override;
  assign redirect_id    = mispredict ? res_id + 1'b1 : ce.id + 1'b1;

  assign p_restore     = mispredict || crit_override;
  assign p_restore_val = mispredict ? {res_phist[HIST_LEN-2:0], res_taken}
                                    : {ce.phist[HIST_LEN-2:0], final_pred};

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) ready <= 1'b0;
    else        ready <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head     <= '0;
      count    <= '0;
      crit_cnt <= '0;
      next_id  <= '0;
      chist    <= '0;
    end else if (mispredict) begin
      count    <= '0;
      crit_cnt <= '0;
      next_id  <= res_id + 1'b1;
      chist    <= {res_bor[BOR_W-2 -: CRIT_HIST-1], res_taken};
    end else begin
      head <= pop ? wrap(int'(head) + 1) : head;
      if (crit_override) begin
        count   <= CNT_W'(int'(crit_cnt) + 1 - int'(pop));
        next_id <= ce.id + 1'b1;
      end else begin
        count   <= CNT_W'(int'(count) + int'(push) - int'(pop));
        if (push) next_id <= next_id + 1'b1;
      end
      crit_cnt <= CNT_W'(int'(crit_cnt) + int'(crit_go) - int'(pop));
      if (crit_go) chist <= {chist[CRIT_HIST-2:0], final_pred};
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      ftq[wrap(int'(head) + int'(count))] <= '{id: next_id, pc: br_pc,
          phist: p_ghist, ppred: p_pred, fpred: p_pred, bor: '0};
    end
    if (crit_go && !mispredict) begin
      ftq[cpos].fpred <= final_pred;
      ftq[cpos].bor   <= bor;
    end
  end

  // ---------------- critic training ----------------
  logic [CRIT_IDX-1:0] ridx;
  logic                r_hit;
  assign ridx  = cindex(res_pc, res_bor);
  assign r_hit = c_valid[ridx] && (c_tag[ridx] == res_pc[2 +: CRIT_TAG]);

  always_ff @(posedge clk) begin
    if (!rst_n) c_valid <= '0;
    else if (res_valid && !r_hit && (res_prophet_pred != res_taken))
      c_valid[ridx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (res_valid) begin
      if (r_hit) begin
        if (res_taken && c_ctr[ridx] != 2'b11)  c_ctr[ridx] <= c_ctr[ridx] + 2'b01;
        if (!res_taken && c_ctr[ridx] != 2'b00) c_ctr[ridx] <= c_ctr[ridx] - 2'b01;
      end else if (res_prophet_pred != res_taken) begin
        c_tag[ridx] <= res_pc[2 +: CRIT_TAG];
        c_ctr[ridx] <= res_taken ? 2'b10 : 2'b01;
      end
    end
  end

  // The queue never holds more than FTQ_DEPTH entries and resolves come in
  // order, one sequence number after the other.
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= FTQ_DEPTH)
    else $error("prophet_critic: queue overflow");
  assert property (@(posedge clk) disable iff (!rst_n) crit_cnt <= count)
    else $error("prophet_critic: more critiqued entries than entries");
endmodule
