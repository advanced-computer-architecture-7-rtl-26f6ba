// tb_prophet_critic: self-checking test of the prophet/critic hybrid.
//
// The test plays a branch source, a fetch unit and an in-order back end
// around the predictor. The correct-path branch stream is a repeating group
// of five static branches: b0 always taken, b1 and b2 random, b3 = b1 xor b2
// and b4 alternating. The xor branch cannot be learnt by a perceptron from a
// linear combination of history bits, so only the critic can get it right.
//
// What is checked:
//   * the source is asked for consecutive sequence numbers and restarts
//     exactly at redirect_id after an override or a misprediction;
//   * branches reach fetch in order and only after the prophet has predicted
//     FUTURE branches from them onward;
//   * the back end resolves 0, 1, 2, ... in order; at each resolve the
//     prophet history and the critic history carried with the branch equal
//     the true outcomes of the older branches, and the BOR holds the
//     branch's own prophet prediction in its first future bit;
//   * over the second half of the run the final prediction of the xor branch
//     is right far more often than the prophet's, with correct overrides.
// Fetch stalls and back-end delays are random. Counted: pushes, overrides
// (right and wrong), final mispredictions, cycles with the queue full.
// Ends with a TB_RESULT line; a watchdog bounds the run.
module tb_prophet_critic;
  localparam int N      = 6000;
  localparam int FUTURE = 4;
  localparam int CHIST  = 8;
  localparam int PHIST  = 28;
  localparam int BOR_W  = CHIST + FUTURE;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready;
  logic br_valid, br_ready;
  logic [31:0] br_pc;
  logic [15:0] br_id;
  logic redirect_valid;
  logic [15:0] redirect_id;
  logic crit_override;
  logic f_valid, f_ready, f_pred, f_prophet_pred;
  logic [15:0] f_id;
  logic [31:0] f_pc;
  logic [PHIST-1:0] f_phist;
  logic [BOR_W-1:0] f_bor;
  logic res_valid, res_prophet_pred, res_pred, res_taken, mispredict;
  logic [15:0] res_id;
  logic [31:0] res_pc;
  logic [PHIST-1:0] res_phist;
  logic [BOR_W-1:0] res_bor;
  logic [3:0] ftq_count;

  int checks = 0, failures = 0;
  int n_push = 0, n_ovr = 0, n_ovr_right = 0, n_ovr_wrong = 0, n_misp = 0, n_full = 0;
  int x_total = 0, x_final_ok = 0, x_prophet_ok = 0;

  prophet_critic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit        outcome [N + 64];
  logic [31:0] pc_of [N + 64];

  function automatic logic [PHIST-1:0] true_hist(input int id, input int len);
    logic [PHIST-1:0] h = '0;
    for (int i = 0; i < len; i++)
      if (id - 1 - i >= 0) h[i] = outcome[id - 1 - i];
    return h;
  endfunction

  typedef struct {
    int          id;
    logic [31:0] pc;
    logic [PHIST-1:0] phist;
    logic [BOR_W-1:0] bor;
    bit          ppred, fpred;
    int          due;
  } rec_t;

  rec_t pipe[$];
  int   exp_src, exp_fetch, exp_res, max_pushed, cyc;

  initial begin
    for (int i = 0; i < N + 64; i++) begin
      pc_of[i] = 32'h0000_0400 + 32'((i % 5) * 12);
      case (i % 5)
        0: outcome[i] = 1'b1;
        1, 2: outcome[i] = 1'($urandom_range(1));
        3: outcome[i] = outcome[i-1] ^ outcome[i-2];
        default: outcome[i] = 1'((i / 5) % 2);
      endcase
    end
    br_valid = 0; br_pc = '0; f_ready = 0;
    res_valid = 0; res_id = '0; res_pc = '0; res_phist = '0; res_bor = '0;
    res_prophet_pred = 0; res_pred = 0; res_taken = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    exp_src = 0; exp_fetch = 0; exp_res = 0; max_pushed = -1; cyc = 0;

    while (exp_res < N) begin
      @(negedge clk);
      cyc++;
      // inputs of this cycle
      br_valid = (int'(br_id) < N + 40);
      br_pc    = pc_of[int'(br_id) % (N + 64)];
      f_ready  = ($urandom_range(3) != 0);
      res_valid = (pipe.size() != 0) && (pipe[0].due <= cyc);
      if (res_valid) begin
        res_id = 16'(pipe[0].id); res_pc = pipe[0].pc; res_phist = pipe[0].phist;
        res_bor = pipe[0].bor; res_prophet_pred = pipe[0].ppred;
        res_pred = pipe[0].fpred; res_taken = outcome[pipe[0].id];
      end
      #1;
      check(ready, "ready after reset");
      check(int'(br_id) == exp_src, "source sequence number");
      if (int'(ftq_count) == 12) n_full++;

      if (res_valid) begin
        automatic int id = pipe[0].id;
        check(id == exp_res, "resolve order");
        check(res_phist == true_hist(id, PHIST), "prophet history at resolve");
        check(res_bor[BOR_W-1 -: CHIST] == CHIST'(true_hist(id, CHIST)), "critic history at resolve");
        check(res_bor[FUTURE-1] == res_prophet_pred, "first future bit is own prophet prediction");
        check(mispredict == (res_pred != res_taken), "mispredict flag");
        if (res_pred != res_prophet_pred) begin
          if (res_pred == res_taken) n_ovr_right++; else n_ovr_wrong++;
        end
        if (id % 5 == 3 && id >= N / 2) begin
          x_total++;
          if (res_pred == res_taken) x_final_ok++;
          if (res_prophet_pred == res_taken) x_prophet_ok++;
        end
        void'(pipe.pop_front());
        exp_res++;
      end

      if (mispredict) begin
        n_misp++;
        check(redirect_valid && int'(redirect_id) == exp_res, "redirect after misprediction");
        pipe.delete();
        exp_fetch = exp_res;
        exp_src   = exp_res;
      end else begin
        if (f_valid && f_ready) begin
          automatic rec_t r;
          check(int'(f_id) == exp_fetch, "fetch order");
          check(f_pc == pc_of[int'(f_id)], "fetch pc");
          check(max_pushed >= int'(f_id) + FUTURE - 1, "critique waited for future branches");
          r.id = int'(f_id); r.pc = f_pc; r.phist = f_phist; r.bor = f_bor;
          r.ppred = f_prophet_pred; r.fpred = f_pred;
          r.due = cyc + 1 + int'($urandom_range(5));
          pipe.push_back(r);
          exp_fetch++;
        end
        if (crit_override) begin
          n_ovr++;
          check(redirect_valid, "override redirects the source");
          check(!br_ready, "no new branch in an override cycle");
          exp_src = int'(redirect_id);
        end else if (br_valid && br_ready) begin
          n_push++;
          if (exp_src > max_pushed) max_pushed = exp_src;
          exp_src++;
        end
      end
    end

    $display("pushes=%0d overrides=%0d (right %0d, wrong %0d) final mispredictions=%0d queue-full cycles=%0d cycles=%0d",
             n_push, n_ovr, n_ovr_right, n_ovr_wrong, n_misp, n_full, cyc);
    $display("xor branch, second half: %0d instances, final right %0d, prophet right %0d",
             x_total, x_final_ok, x_prophet_ok);
    check(n_ovr > 0 && n_ovr_right > n_ovr_wrong, "critic overrides help");
    check(n_full > 0, "queue reached full");
    check(x_final_ok * 100 >= x_total * 90, "xor branch mostly right after training");
    check(x_final_ok > x_prophet_ok + x_total / 5, "critic beats prophet on xor branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
