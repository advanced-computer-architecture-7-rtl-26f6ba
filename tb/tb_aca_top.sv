// tb_aca_top: end-to-end test of aca_top at its default sizes.
//
// Six independent streams run in parallel, one per part of the top:
//   * pipeline: the test program of rv_prog_pkg runs on the six-stage
//     pipeline; every retired PC and value is compared with the
//     instruction-set model, and so are the final registers;
//   * rename: random 2-wide groups renamed by the stage and by a sequential
//     reference model (map array, free-tag queue, valid bits); all outputs are
//     compared one cycle after acceptance. Tag release is held back in
//     stretches so the 128-tag free buffer runs out and the stage stalls;
//   * gshare: after its reset sweep, a loop branch (taken 3 times, then not
//     taken) trained at write-back; the index must be PC XOR history and the
//     loop must be predicted without a miss once warm;
//   * perceptron: a branch that repeats the outcome five branches back,
//     mixed with random branches, must be predicted without a miss once
//     trained;
//   * prophet/critic: a branch stream whose fourth branch is the xor of the
//     two before it runs through the queue with random fetch stalls and an
//     in-order back end; resolve order, carried histories and restart
//     points are checked, and the critic must fix the xor branch;
//   * pattern matching: a branch stream with period 7 must be predicted
//     without a miss once the 64-bit history holds it, and the vote, the
//     longest and selected lengths are checked on it.
// Mechanisms counted (each must occur): pipeline load-use stall, redirect
// and both forwarding paths; rename stall, intra-group bypass,
// tag release, valid-bit clear, source read from the logical registers,
// gshare counter update, perceptron training on a wrong sign and on low |y|,
// critic override, final misprediction recovery, a full queue and a
// pattern-matching vote with both counts non-zero.
module tb_aca_top;
  localparam int unsigned W = 2, LW = 5, TW = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic          rn_in_valid [W], rn_in_has_dst [W];
  logic [LW-1:0] rn_in_dst [W], rn_in_src1 [W], rn_in_src2 [W];
  logic          rn_in_ready, rn_in_hold = 1'b0;
  logic          rn_out_valid [W], rn_out_dst_en [W], rn_out_src1_renamed [W], rn_out_src2_renamed [W];
  logic [TW-1:0] rn_out_dst_tag [W], rn_out_src1_tag [W], rn_out_src2_tag [W];
  logic          rn_free_valid [W], rn_clr_valid [W];
  logic [TW-1:0] rn_free_tag [W], rn_clr_tag [W];
  logic [LW-1:0] rn_clr_log [W];
  logic [7:0]    rn_free_count;

  logic [31:0] gs_pred_pc;
  logic        gs_pred_taken, gs_hist_valid, gs_hist_taken, gs_upd_valid, gs_upd_taken, gs_ready;
  logic [11:0] gs_pred_idx, gs_bhr, gs_upd_idx;

  logic [31:0]       pc_pred_pc, pc_upd_pc;
  logic              pc_pred_taken, pc_hist_valid, pc_hist_taken, pc_upd_valid, pc_upd_taken, pc_upd_trained;
  logic signed [13:0] pc_pred_y;
  logic [27:0]       pc_ghist, pc_upd_hist;

  logic        pcr_ready, pcr_br_valid = 1'b0, pcr_br_ready, pcr_redirect_valid, pcr_override;
  logic [31:0] pcr_br_pc = '0, pcr_f_pc, pcr_res_pc = '0;
  logic [15:0] pcr_br_id, pcr_redirect_id, pcr_f_id, pcr_res_id = '0;
  logic        pcr_f_valid, pcr_f_ready = 1'b0, pcr_f_pred, pcr_f_prophet_pred;
  logic [27:0] pcr_f_phist, pcr_res_phist = '0;
  logic [11:0] pcr_f_bor, pcr_res_bor = '0;
  logic        pcr_res_valid = 1'b0, pcr_res_prophet_pred = 1'b0, pcr_res_pred = 1'b0;
  logic        pcr_res_taken = 1'b0, pcr_mispredict;
  logic [3:0]  pcr_ftq_count;

  logic        pm_hist_valid = 1'b0, pm_hist_taken = 1'b0, pm_pred_taken;
  logic [63:0] pm_hist;
  logic [6:0]  pm_pred_longest, pm_pred_sel_len, pm_pred_ones, pm_pred_zeros;

  logic        pl_prog_we = 1'b0;
  logic [31:0] pl_prog_addr = '0, pl_prog_data = '0;
  logic        pl_retire_valid, pl_retire_dst_en, pl_stall_load_use, pl_stall_no_tag;
  logic        pl_redirect, pl_fwd_ma, pl_fwd_wb;
  logic [31:0] pl_retire_pc, pl_retire_value;
  logic [6:0]  pl_retire_dst_tag;

  aca_top dut (.*);

  import rv_prog_pkg::*;
  int n_pl_retired = 0, n_pl_stall = 0, n_pl_redirect = 0, n_pl_fwd_ma = 0, n_pl_fwd_wb = 0;

  // ----------------------------------------------------------- pipeline
  task automatic pipeline_stream();
    int k;
    k = 0;
    while (k < t_pc.size()) begin
      @(posedge clk);
      #1;
      if (pl_stall_load_use && !pl_redirect) n_pl_stall++;
      if (pl_redirect) n_pl_redirect++;
      if (pl_fwd_ma) n_pl_fwd_ma++;
      if (pl_fwd_wb) n_pl_fwd_wb++;
      if (pl_retire_valid) begin
        check(pl_retire_pc == t_pc[k] && (!t_dst[k] || pl_retire_value == t_val[k]),
              $sformatf("pipeline retire %0d", k));
        k++;
      end
    end
    n_pl_retired = k;
    for (int i = 1; i < 32; i++)
      check(dut.u_pipeline.u_rf.regs[dut.u_pipeline.u_rn.u_map.map[i]] == m_reg[i],
            $sformatf("pipeline x%0d", i));
  endtask

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("pipeline: retired %0d load-use %0d redirects %0d fwd EX/MA %0d fwd WB %0d",
             n_pl_retired, n_pl_stall, n_pl_redirect, n_pl_fwd_ma, n_pl_fwd_wb);
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

  int n_stall = 0, n_bypass = 0, n_free = 0, n_clear = 0, n_unren = 0;
  int n_gs_upd = 0, gs_miss = 0, n_pc_wrong = 0, n_pc_low = 0, pc_miss = 0;

  // ------------------------------------------------------------- rename
  task automatic rename_stream(input int cycles);
    int unsigned m_map [32];
    bit          m_val [32];
    int unsigned m_free [$], m_busy [$];
    bit          ev [W], ede [W], er1 [W], er2 [W];
    int unsigned ed [W], e1 [W], e2 [W];
    bit have;
    have = 0;
    for (int i = 0; i < 32; i++) begin m_map[i] = i; m_val[i] = 1; end
    for (int t = 32; t < 128; t++) m_free.push_back(t);
    for (int t = 1; t < 32; t++) m_busy.push_back(t);
    for (int cyc = 0; cyc < cycles; cyc++) begin
      int need;
      bit hold;
      @(negedge clk);
      hold = ((cyc / 250) % 2 == 1);
      for (int k = 0; k < W; k++) begin
        rn_in_valid[k]   = ($urandom_range(4, 0) != 0);
        rn_in_has_dst[k] = ($urandom_range(5, 0) != 0);
        rn_in_dst[k]     = LW'($urandom_range(15, 0));
        rn_in_src1[k]    = LW'($urandom_range(15, 0));
        rn_in_src2[k]    = LW'($urandom_range(31, 0));
        if (k == 1 && $urandom_range(2, 0) == 0) rn_in_src2[k] = rn_in_dst[0];
        rn_free_valid[k] = 1'b0;
        if (!hold && m_busy.size() > 0 && $urandom_range(1, 0) == 1) begin
          rn_free_valid[k] = 1'b1;
          rn_free_tag[k]   = TW'(m_busy.pop_front());
        end
        rn_clr_valid[k] = ($urandom_range(5, 0) == 0) && (k == 0);
        rn_clr_log[k]   = LW'($urandom_range(15, 0));
        rn_clr_tag[k]   = TW'(m_map[rn_clr_log[k]]);
      end
      if (have)
        for (int k = 0; k < W; k++) begin
          check(rn_out_valid[k] == ev[k], "rename out_valid");
          if (ev[k])
            check(rn_out_dst_en[k] == ede[k] && (!ede[k] || int'(rn_out_dst_tag[k]) == ed[k]) &&
                  int'(rn_out_src1_tag[k]) == e1[k] && rn_out_src1_renamed[k] == er1[k] &&
                  int'(rn_out_src2_tag[k]) == e2[k] && rn_out_src2_renamed[k] == er2[k],
                  $sformatf("rename way %0d", k));
        end
      #1;
      need = 0;
      for (int k = 0; k < W; k++) if (rn_in_valid[k] && rn_in_has_dst[k] && rn_in_dst[k] != 0) need++;
      check(rn_in_ready == (need <= m_free.size()), "rename ready");
      if (need > m_free.size()) n_stall++;
      have = 1;
      for (int k = 0; k < W; k++) begin
        ev[k] = rn_in_ready && rn_in_valid[k];
        ede[k] = 0;
        if (ev[k]) begin
          e1[k] = m_val[rn_in_src1[k]] ? m_map[rn_in_src1[k]] : rn_in_src1[k]; er1[k] = m_val[rn_in_src1[k]];
          e2[k] = m_val[rn_in_src2[k]] ? m_map[rn_in_src2[k]] : rn_in_src2[k]; er2[k] = m_val[rn_in_src2[k]];
          for (int i = 0; i < k; i++) begin
            if (ede[i] && rn_in_dst[i] == rn_in_src1[k]) begin e1[k] = ed[i]; er1[k] = 1; n_bypass++; end
            if (ede[i] && rn_in_dst[i] == rn_in_src2[k]) begin e2[k] = ed[i]; er2[k] = 1; n_bypass++; end
          end
          if (!er1[k] || !er2[k]) n_unren++;
          if (rn_in_has_dst[k] && rn_in_dst[k] != 0) begin
            ede[k] = 1; ed[k] = m_free.pop_front(); m_busy.push_back(ed[k]);
          end
        end
      end
      @(posedge clk);
      if (rn_clr_valid[0] && m_map[rn_clr_log[0]] == rn_clr_tag[0] && m_val[rn_clr_log[0]]) begin
        m_val[rn_clr_log[0]] = 0; n_clear++;
      end
      for (int k = 0; k < W; k++)
        if (ede[k]) begin m_map[rn_in_dst[k]] = ed[k]; m_val[rn_in_dst[k]] = 1; end
      for (int k = 0; k < W; k++) if (rn_free_valid[k]) begin m_free.push_back(rn_free_tag[k]); n_free++; end
    end
    @(negedge clk);
    foreach (rn_in_valid[k]) begin rn_in_valid[k] = 0; rn_free_valid[k] = 0; rn_clr_valid[k] = 0; end
  endtask

  // ------------------------------------------------------------- gshare
  task automatic gshare_stream(input int iters);
    int unsigned hist;
    hist = 0;
    while (!gs_ready) @(posedge clk);
    for (int it = 0; it < iters; it++)
      for (int k = 0; k < 4; k++) begin
        bit t;
        logic [11:0] idx;
        t = (k != 3);
        @(negedge clk);
        gs_pred_pc = 32'h0000_4000;   // one loop-closing branch
        gs_hist_valid = 1; gs_hist_taken = t; gs_upd_valid = 0;
        #1;
        check(gs_pred_idx == (12'(gs_pred_pc >> 2) ^ 12'(hist)), "gshare index");
        if (it >= iters - 20 && gs_pred_taken != t) gs_miss++;
        idx = gs_pred_idx;
        @(posedge clk);
        hist = ((hist << 1) | t) & 12'hFFF;
        @(negedge clk);
        gs_hist_valid = 0; gs_upd_valid = 1; gs_upd_idx = idx; gs_upd_taken = t;
        @(posedge clk);
        n_gs_upd++;
        @(negedge clk);
        gs_upd_valid = 0;
      end
  endtask

  // --------------------------------------------------------- perceptron
  task automatic perceptron_stream(input int n);
    logic [27:0] h;
    h = '0;
    for (int i = 0; i < n; i++) begin
      bit t, learn;
      learn = (i % 3 == 2);
      @(negedge clk);
      pc_pred_pc = learn ? 32'h0000_0080 : {24'h0, 4'($urandom_range(15, 1)), 4'h0};
      t = learn ? h[4] : ($urandom_range(1, 0) == 1);
      pc_upd_pc = pc_pred_pc; pc_upd_hist = h; pc_upd_taken = t; pc_upd_valid = 1;
      pc_hist_valid = 1; pc_hist_taken = t;
      #1;
      check(pc_ghist == h, "perceptron history");
      if (pc_upd_trained) begin
        if (pc_pred_taken != t) n_pc_wrong++; else n_pc_low++;
      end
      if (learn && i > n - 300 && pc_pred_taken != t) pc_miss++;
      @(posedge clk);
      h = {h[26:0], t};
    end
    @(negedge clk);
    pc_upd_valid = 0; pc_hist_valid = 0;
  endtask

  // --------------------------------------------------- pattern matching
  int n_pm_vote = 0, pm_miss = 0;

  task automatic pattern_stream(input int n);
    bit pat [7] = '{1, 1, 0, 1, 0, 0, 1};
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      #1;
      if (i >= 64 + 14) begin
        if (pm_pred_taken != pat[i % 7]) pm_miss++;
        // the newest 63 - 6 bits repeat 7 places back
        check(int'(pm_pred_longest) == 63 - 6 && int'(pm_pred_sel_len) == (63 - 6) / 2,
              "pattern matching lengths");
      end
      if (pm_pred_ones != 0 && pm_pred_zeros != 0) n_pm_vote++;
      pm_hist_valid = 1'b1; pm_hist_taken = pat[i % 7];
      @(posedge clk);
    end
    @(negedge clk);
    pm_hist_valid = 1'b0;
  endtask

  // ----------------------------------------------------- prophet/critic
  int n_pcr_ovr = 0, n_pcr_misp = 0, n_pcr_full = 0, pcr_x_total = 0, pcr_x_ok = 0, pcr_x_prophet = 0;

  typedef struct {
    int          id;
    logic [31:0] pc;
    logic [27:0] phist;
    logic [11:0] bor;
    bit          ppred, fpred;
    int          due;
  } pcr_rec_t;

  task automatic prophet_critic_stream(input int n);
    bit          outc [];
    pcr_rec_t    pipe [$];
    int          exp_src, exp_fetch, exp_res, cyc;
    outc = new[n + 64];
    for (int i = 0; i < n + 64; i++)
      case (i % 5)
        0: outc[i] = 1'b1;
        1, 2: outc[i] = 1'($urandom_range(1));
        3: outc[i] = outc[i-1] ^ outc[i-2];
        default: outc[i] = 1'((i / 5) % 2);
      endcase
    exp_src = 0; exp_fetch = 0; exp_res = 0; cyc = 0;
    while (exp_res < n) begin
      @(negedge clk);
      cyc++;
      pcr_br_valid = (int'(pcr_br_id) < n + 40);
      pcr_br_pc    = 32'h0000_0400 + 32'((int'(pcr_br_id) % 5) * 12);
      pcr_f_ready  = ((cyc % 300) < 270) && ($urandom_range(3) != 0);
      pcr_res_valid = (pipe.size() != 0) && (pipe[0].due <= cyc);
      if (pcr_res_valid) begin
        pcr_res_id = 16'(pipe[0].id); pcr_res_pc = pipe[0].pc; pcr_res_phist = pipe[0].phist;
        pcr_res_bor = pipe[0].bor; pcr_res_prophet_pred = pipe[0].ppred;
        pcr_res_pred = pipe[0].fpred; pcr_res_taken = outc[pipe[0].id];
      end
      #1;
      check(pcr_ready && int'(pcr_br_id) == exp_src, "prophet/critic source sequence number");
      if (pcr_ftq_count == 4'd12) n_pcr_full++;
      if (pcr_res_valid) begin
        automatic int id = pipe[0].id;
        automatic logic [27:0] h = '0;
        for (int i = 0; i < 28; i++) if (id - 1 - i >= 0) h[i] = outc[id - 1 - i];
        check(id == exp_res, "prophet/critic resolve order");
        check(pcr_res_phist == h, "prophet history at resolve");
        check(pcr_res_bor[11:4] == h[7:0], "critic history at resolve");
        if (id % 5 == 3 && id >= n / 2) begin
          pcr_x_total++;
          if (pcr_res_pred == pcr_res_taken) pcr_x_ok++;
          if (pcr_res_prophet_pred == pcr_res_taken) pcr_x_prophet++;
        end
        void'(pipe.pop_front());
        exp_res++;
      end
      if (pcr_mispredict) begin
        n_pcr_misp++;
        check(pcr_redirect_valid && int'(pcr_redirect_id) == exp_res, "prophet/critic restart");
        pipe.delete();
        exp_fetch = exp_res;
        exp_src   = exp_res;
      end else begin
        if (pcr_f_valid && pcr_f_ready) begin
          automatic pcr_rec_t r;
          check(int'(pcr_f_id) == exp_fetch, "prophet/critic fetch order");
          r.id = int'(pcr_f_id); r.pc = pcr_f_pc; r.phist = pcr_f_phist; r.bor = pcr_f_bor;
          r.ppred = pcr_f_prophet_pred; r.fpred = pcr_f_pred;
          r.due = cyc + 1 + int'($urandom_range(5));
          pipe.push_back(r);
          exp_fetch++;
        end
        if (pcr_override) begin
          n_pcr_ovr++;
          exp_src = int'(pcr_redirect_id);
        end else if (pcr_br_valid && pcr_br_ready) begin
          exp_src++;
        end
      end
    end
    @(negedge clk);
    pcr_br_valid = 0; pcr_res_valid = 0; pcr_f_ready = 0;
  endtask

  initial begin
    foreach (rn_in_valid[k]) begin
      rn_in_valid[k] = 0; rn_in_has_dst[k] = 0; rn_in_dst[k] = '0; rn_in_src1[k] = '0; rn_in_src2[k] = '0;
      rn_free_valid[k] = 0; rn_free_tag[k] = '0; rn_clr_valid[k] = 0; rn_clr_log[k] = '0; rn_clr_tag[k] = '0;
    end
    gs_pred_pc = '0; gs_hist_valid = 0; gs_hist_taken = 0; gs_upd_valid = 0; gs_upd_idx = '0; gs_upd_taken = 0;
    pc_pred_pc = '0; pc_upd_pc = '0; pc_hist_valid = 0; pc_hist_taken = 0; pc_upd_valid = 0;
    pc_upd_hist = '0; pc_upd_taken = 0;
    build();
    iss((prog.size() - 1) * 4);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      pl_prog_we = 1'b1; pl_prog_addr = 32'(i * 4); pl_prog_data = prog[i];
    end
    @(negedge clk);
    pl_prog_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    fork
      pipeline_stream();
      rename_stream(6000);
      gshare_stream(200);
      perceptron_stream(6000);
      prophet_critic_stream(4000);
      pattern_stream(300);
    join
    check(gs_miss == 0, $sformatf("gshare missed the warm loop %0d times", gs_miss));
    check(pc_miss == 0, $sformatf("perceptron missed the learnable branch %0d times", pc_miss));
    check(n_stall > 0, "no rename stall");
    check(n_bypass > 0, "no intra-group bypass");
    check(n_free > 0, "no tag release");
    check(n_clear > 0, "no valid-bit clear");
    check(n_unren > 0, "no source read from the logical registers");
    check(n_gs_upd > 0, "no gshare update");
    check(n_pl_retired == t_pc.size(), "pipeline did not finish the program");
    check(n_pl_stall == n_loaduse_exp && n_pl_stall > 0, "pipeline load-use stalls");
    check(n_pl_redirect == n_redirect_exp && n_pl_redirect > 0, "pipeline redirects");
    check(n_pl_fwd_ma > 0 && n_pl_fwd_wb > 0, "a pipeline forwarding path was never used");
    check(n_pc_wrong > 0 && n_pc_low > 0, "a kind of perceptron training never happened");
    check(pm_miss == 0, $sformatf("pattern matching missed the periodic stream %0d times", pm_miss));
    check(n_pm_vote > 0, "no pattern-matching vote with both counts non-zero");
    check(n_pcr_ovr > 0 && n_pcr_misp > 0 && n_pcr_full > 0, "a prophet/critic mechanism never happened");
    check(pcr_x_ok * 100 >= pcr_x_total * 90 && pcr_x_ok > pcr_x_prophet, "critic did not fix the xor branch");
    $display("prophet/critic: overrides %0d mispredictions %0d full-queue cycles %0d xor right %0d of %0d (prophet %0d)",
             n_pcr_ovr, n_pcr_misp, n_pcr_full, pcr_x_ok, pcr_x_total, pcr_x_prophet);
    $display("pattern matching: votes %0d misses %0d", n_pm_vote, pm_miss);
    $display("rename: stalls %0d bypasses %0d releases %0d clears %0d unrenamed %0d",
             n_stall, n_bypass, n_free, n_clear, n_unren);
    $display("gshare: updates %0d warm misses %0d; perceptron: wrong-sign %0d low-|y| %0d misses %0d",
             n_gs_upd, gs_miss, n_pc_wrong, n_pc_low, pc_miss);
    $display("pipeline: retired %0d load-use %0d redirects %0d fwd EX/MA %0d fwd WB %0d",
             n_pl_retired, n_pl_stall, n_pl_redirect, n_pl_fwd_ma, n_pl_fwd_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
