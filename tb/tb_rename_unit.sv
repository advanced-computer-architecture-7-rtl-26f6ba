// tb_rename_unit: self-checking test of the n-way rename stage.
//
// Part 1 renames the four-instruction example stream
//     I0: sub x5,x1,x2   I1: add x9,x5,x4   I2: or x5,x5,x2   I3: and x2,x9,x1
// with free tags p9, p10, ... (FIRST_FREE = 9) at widths 1, 2 and 3 and checks
// the result against the hand-renamed stream
//     sub p9,p1,p2   add p10,p9,p4   or p11,p9,p2   and p12,p10,p1
// Width 1 takes four cycles, width 2 two cycles and width 3 two cycles. In the
// wide cases I1 reads x5 in the same group as I0 writes it, so the intra-group
// bypass must give p9 and not the stale p5.
//
// Part 1b repeats the first step of the valid-bit example: x1 has been written
// back (its valid bit is clear) and x2 still maps to p2, so I0 must become
//     sub p9, x1, p2
//
// Part 2 is a random test of the default 2-way unit. A reference model renames
// every accepted group one instruction at a time, in program order, with a
// plain map array and a queue of free tags; this sequential renaming is what
// the parallel hardware must reproduce. Tags are released at random (oldest
// allocations first), write-back clears are sent at random, and release is
// held back for long stretches so that the free tag buffer runs dry and the
// stage must stall. The test counts stalls, intra-group bypasses, clears that
// took effect, sources read as not renamed and cycles held by a later stage,
// and fails if any never occurs. The same-cycle outputs (now_*), including
// the previous mapping of each destination, are checked as well.
module tb_rename_unit;
  localparam int unsigned LW = 5, TW = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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

  // ---------------------------------------------------------------- example
  // instruction stream: dst, src1, src2 and the expected physical IDs
  int unsigned ex_dst [4] = '{5, 9, 5, 2};
  int unsigned ex_s1  [4] = '{1, 5, 5, 9};
  int unsigned ex_s2  [4] = '{2, 4, 2, 1};
  int unsigned ex_pd  [4] = '{9, 10, 11, 12};
  int unsigned ex_p1  [4] = '{1, 9, 9, 10};
  int unsigned ex_p2  [4] = '{2, 4, 2, 1};

  // one unit per width; index w = width-1
  logic          e_in_valid [3][3], e_in_has_dst [3][3];
  logic [LW-1:0] e_in_dst [3][3], e_in_src1 [3][3], e_in_src2 [3][3];
  logic          e_in_ready [3];
  logic          e_out_valid [3][3], e_out_dst_en [3][3], e_s1r [3][3], e_s2r [3][3];
  logic [TW-1:0] e_out_dst [3][3], e_out_s1 [3][3], e_out_s2 [3][3];
  logic          e_zero_b [3][3];
  logic [TW-1:0] e_zero_t [3][3];
  logic [LW-1:0] e_zero_l [3][3];
  logic [7:0]    e_cnt [3];

  for (genvar w = 0; w < 3; w++) begin : g_ex
    localparam int unsigned N = w + 1;
    logic          iv [N], ih [N], ov [N], od [N], r1 [N], r2 [N], zb [N];
    logic [LW-1:0] id [N], i1 [N], i2 [N], zl [N];
    logic [TW-1:0] pd [N], p1 [N], p2 [N], zt [N];
    always_comb begin
      for (int k = 0; k < int'(N); k++) begin
        iv[k] = e_in_valid[w][k]; ih[k] = e_in_has_dst[w][k];
        id[k] = e_in_dst[w][k];   i1[k] = e_in_src1[w][k]; i2[k] = e_in_src2[w][k];
        zb[k] = 1'b0; zl[k] = '0; zt[k] = '0;
      end
      for (int k = 0; k < 3; k++) begin
        e_out_valid[w][k] = 1'b0; e_out_dst_en[w][k] = 1'b0; e_s1r[w][k] = 1'b0; e_s2r[w][k] = 1'b0;
        e_out_dst[w][k] = '0; e_out_s1[w][k] = '0; e_out_s2[w][k] = '0;
      end
      for (int k = 0; k < int'(N); k++) begin
        e_out_valid[w][k] = ov[k]; e_out_dst_en[w][k] = od[k];
        e_out_dst[w][k] = pd[k]; e_out_s1[w][k] = p1[k]; e_out_s2[w][k] = p2[k];
        e_s1r[w][k] = r1[k]; e_s2r[w][k] = r2[k];
      end
    end
    rename_unit #(.WAYS(N), .FIRST_FREE(9)) u (
      .clk, .rst_n,
      .in_valid(iv), .in_has_dst(ih), .in_dst(id), .in_src1(i1), .in_src2(i2),
      .in_ready(e_in_ready[w]), .in_hold(1'b0),
      .now_dst_en(), .now_dst_tag(), .now_old_tag(), .now_src1_tag(), .now_src2_tag(),
      .out_valid(ov), .out_dst_en(od), .out_dst_tag(pd),
      .out_src1_tag(p1), .out_src1_renamed(r1), .out_src2_tag(p2), .out_src2_renamed(r2),
      .free_valid(zb), .free_tag(zt), .clr_valid(zb), .clr_log(zl), .clr_tag(zt),
      .free_count(e_cnt[w])
    );
  end

  task automatic run_example(input int w);
    int n, next, got;
    n = w + 1;
    next = 0; got = 0;
    while (got < 4) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) e_in_valid[w][k] = 1'b0;
      for (int k = 0; k < n && next < 4; k++) begin
        e_in_valid[w][k] = 1'b1; e_in_has_dst[w][k] = 1'b1;
        e_in_dst[w][k] = LW'(ex_dst[next]); e_in_src1[w][k] = LW'(ex_s1[next]);
        e_in_src2[w][k] = LW'(ex_s2[next]);
        next++;
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < n; k++) begin
        if (e_out_valid[w][k]) begin
          check(int'(e_out_dst[w][k]) == ex_pd[got] && int'(e_out_s1[w][k]) == ex_p1[got] &&
                int'(e_out_s2[w][k]) == ex_p2[got] && e_s1r[w][k] && e_s2r[w][k],
                $sformatf("width %0d I%0d renamed to p%0d,p%0d,p%0d", n, got,
                          e_out_dst[w][k], e_out_s1[w][k], e_out_s2[w][k]));
          got++;
        end
      end
    end
    @(negedge clk);
    for (int k = 0; k < 3; k++) e_in_valid[w][k] = 1'b0;
    // ceil(4/n) groups, each renamed in one cycle
    check(int'(e_cnt[w]) == 128 - 9 - 4, $sformatf("width %0d free count %0d", n, e_cnt[w]));
  endtask

  // --------------------------------------------------- valid-bit example
  logic          v_iv [1], v_ih [1], v_cv [1], v_ov [1], v_od [1], v_r1 [1], v_r2 [1], v_fz [1];
  logic [LW-1:0] v_id [1], v_i1 [1], v_i2 [1], v_cl [1];
  logic [TW-1:0] v_ct [1], v_pd [1], v_p1 [1], v_p2 [1], v_fzt [1];
  logic          v_ready;
  logic [7:0]    v_cnt;
  assign v_fz[0] = 1'b0;
  assign v_fzt[0] = '0;

  rename_unit #(.WAYS(1), .FIRST_FREE(9)) u_vb (
    .clk, .rst_n,
    .in_valid(v_iv), .in_has_dst(v_ih), .in_dst(v_id), .in_src1(v_i1), .in_src2(v_i2),
    .in_ready(v_ready), .in_hold(1'b0),
    .now_dst_en(), .now_dst_tag(), .now_old_tag(), .now_src1_tag(), .now_src2_tag(),
    .out_valid(v_ov), .out_dst_en(v_od), .out_dst_tag(v_pd),
    .out_src1_tag(v_p1), .out_src1_renamed(v_r1), .out_src2_tag(v_p2), .out_src2_renamed(v_r2),
    .free_valid(v_fz), .free_tag(v_fzt), .clr_valid(v_cv), .clr_log(v_cl), .clr_tag(v_ct),
    .free_count(v_cnt)
  );

  task automatic run_valid_bit_example();
    @(negedge clk);
    v_cv[0] = 1'b1; v_cl[0] = LW'(1); v_ct[0] = TW'(1);
    @(negedge clk);
    v_cv[0] = 1'b0;
    v_iv[0] = 1'b1; v_ih[0] = 1'b1; v_id[0] = LW'(5); v_i1[0] = LW'(1); v_i2[0] = LW'(2);
    @(posedge clk);
    #1;
    check(v_ov[0] && v_od[0] && v_pd[0] == TW'(9), "valid-bit example: dst p9");
    check(!v_r1[0] && v_p1[0] == TW'(1), "valid-bit example: src1 stays x1");
    check(v_r2[0] && v_p2[0] == TW'(2), "valid-bit example: src2 p2");
    @(negedge clk);
    v_iv[0] = 1'b0;
  endtask

  // ----------------------------------------------------------- random test
  localparam int unsigned W = 2;
  logic          in_valid [W], in_has_dst [W];
  logic [LW-1:0] in_dst [W], in_src1 [W], in_src2 [W];
  logic          in_ready, in_hold;
  logic          now_dst_en [W];
  logic [TW-1:0] now_dst_tag [W], now_old_tag [W], now_src1_tag [W], now_src2_tag [W];
  logic          out_valid [W], out_dst_en [W], out_src1_renamed [W], out_src2_renamed [W];
  logic [TW-1:0] out_dst_tag [W], out_src1_tag [W], out_src2_tag [W];
  logic          free_valid [W], clr_valid [W];
  logic [TW-1:0] free_tag [W], clr_tag [W];
  logic [LW-1:0] clr_log [W];
  logic [7:0]    free_count;

  rename_unit dut (.*);

  int unsigned m_map [32];
  bit          m_val [32];
  int unsigned m_free [$];
  int unsigned m_busy [$];      // allocated tags, oldest first
  int n_hold = 0;
  int n_stall = 0, n_bypass = 0, n_clear = 0, n_unrenamed = 0, n_x0 = 0;

  task automatic run_random(input int cycles);
    bit          exp_v [W], exp_de [W], exp_r1 [W], exp_r2 [W];
    int unsigned exp_d [W], exp_1 [W], exp_2 [W];
    bit          have_exp;
    have_exp = 0;
    for (int i = 0; i < 32; i++) begin m_map[i] = i; m_val[i] = 1; end
    for (int t = 32; t < 128; t++) m_free.push_back(t);
    for (int t = 1; t < 32; t++) m_busy.push_back(t);
    for (int cyc = 0; cyc < cycles; cyc++) begin
      int need;
      bit hold;
      @(negedge clk);
      hold = ((cyc / 300) % 2 == 1);   // stretches without any release
      for (int k = 0; k < W; k++) begin
        in_valid[k]   = ($urandom_range(4, 0) != 0);
        in_has_dst[k] = ($urandom_range(5, 0) != 0);
        in_dst[k]     = LW'($urandom_range(31, 0) % (($urandom_range(1, 0) == 1) ? 32 : 8));
        in_src1[k]    = LW'($urandom_range(7, 0));
        in_src2[k]    = LW'($urandom_range(31, 0));
        // make the younger way read what the older one writes now and then
        if (k == 1 && $urandom_range(2, 0) == 0) in_src1[k] = in_dst[0];
        free_valid[k] = 1'b0;
        if (!hold && m_busy.size() > 0 && $urandom_range(1, 0) == 1) begin
          free_valid[k] = 1'b1;
          free_tag[k]   = TW'(m_busy.pop_front());
        end
        clr_valid[k] = ($urandom_range(5, 0) == 0);
        clr_log[k]   = LW'($urandom_range(7, 0));
        clr_tag[k]   = ($urandom_range(3, 0) != 0) ? TW'(m_map[clr_log[k]]) : TW'($urandom_range(127, 0));
      end
      if (clr_valid[0] && clr_valid[1] && clr_log[0] == clr_log[1]) clr_valid[1] = 1'b0;
      in_hold = ($urandom_range(9, 0) == 0);
      // outputs of the group accepted in the previous cycle
      if (have_exp)
        for (int k = 0; k < W; k++) begin
          check(out_valid[k] == exp_v[k], $sformatf("way %0d out_valid", k));
          if (exp_v[k]) begin
            check(out_dst_en[k] == exp_de[k] && (!exp_de[k] || int'(out_dst_tag[k]) == exp_d[k]),
                  $sformatf("way %0d dst p%0d vs p%0d", k, out_dst_tag[k], exp_d[k]));
            check(int'(out_src1_tag[k]) == exp_1[k] && out_src1_renamed[k] == exp_r1[k],
                  $sformatf("way %0d src1 %0d/%0d vs %0d/%0d", k, out_src1_tag[k], out_src1_renamed[k], exp_1[k], exp_r1[k]));
            check(int'(out_src2_tag[k]) == exp_2[k] && out_src2_renamed[k] == exp_r2[k],
                  $sformatf("way %0d src2", k));
          end
        end
      #1;
      // reference: sequential renaming
      need = 0;
      for (int k = 0; k < W; k++) if (in_valid[k] && in_has_dst[k] && in_dst[k] != 0) need++;
      check(in_ready == (need <= m_free.size()), $sformatf("in_ready %0d need %0d free %0d", in_ready, need, m_free.size()));
      check(int'(free_count) == m_free.size(), "free_count");
      if (need > m_free.size()) n_stall++;
      if (in_hold) n_hold++;
      have_exp = 1;
      for (int k = 0; k < W; k++) begin
        exp_v[k] = in_ready && !in_hold && in_valid[k];
        exp_de[k] = 0;
        if (exp_v[k]) begin
          exp_1[k] = m_val[in_src1[k]] ? m_map[in_src1[k]] : in_src1[k]; exp_r1[k] = m_val[in_src1[k]];
          exp_2[k] = m_val[in_src2[k]] ? m_map[in_src2[k]] : in_src2[k]; exp_r2[k] = m_val[in_src2[k]];
          // a destination already renamed in this group replaces the table entry
          for (int i = 0; i < k; i++) begin
            if (exp_de[i] && in_dst[i] == in_src1[k]) begin exp_1[k] = exp_d[i]; exp_r1[k] = 1; end
            if (exp_de[i] && in_dst[i] == in_src2[k]) begin exp_2[k] = exp_d[i]; exp_r2[k] = 1; end
          end
          if (!exp_r1[k] || !exp_r2[k]) n_unrenamed++;
          if (k == 1 && exp_de[0] && (in_src1[1] == in_dst[0] || in_src2[1] == in_dst[0])) n_bypass++;
          if (in_has_dst[k] && in_dst[k] == 0) n_x0++;
          if (in_has_dst[k] && in_dst[k] != 0) begin
            int unsigned old;
            old = m_map[in_dst[k]];
            for (int i = 0; i < k; i++) if (exp_de[i] && in_dst[i] == in_dst[k]) old = exp_d[i];
            check(int'(now_old_tag[k]) == old, $sformatf("way %0d previous mapping p%0d vs p%0d", k, now_old_tag[k], old));
            check(now_dst_en[k] && int'(now_dst_tag[k]) == m_free[0], "same-cycle destination tag");
            check(int'(now_src1_tag[k]) == exp_1[k] && int'(now_src2_tag[k]) == exp_2[k], "same-cycle source tags");
            exp_de[k] = 1;
            exp_d[k] = m_free.pop_front();
            m_busy.push_back(exp_d[k]);
          end
        end
      end
      @(posedge clk);
      // map table effect of this edge: clears (against the old map), then writes
      begin
        int unsigned old_map [32];
        for (int i = 0; i < 32; i++) old_map[i] = m_map[i];
        for (int k = 0; k < W; k++)
          if (clr_valid[k] && old_map[clr_log[k]] == clr_tag[k]) begin
            if (m_val[clr_log[k]]) n_clear++;
            m_val[clr_log[k]] = 0;
          end
        for (int k = 0; k < W; k++)
          if (exp_de[k]) begin m_map[in_dst[k]] = exp_d[k]; m_val[in_dst[k]] = 1; end
      end
      for (int k = 0; k < W; k++) if (free_valid[k]) m_free.push_back(free_tag[k]);
    end
  endtask

  initial begin
    v_iv[0] = 0; v_ih[0] = 0; v_id[0] = '0; v_i1[0] = '0; v_i2[0] = '0;
    v_cv[0] = 0; v_cl[0] = '0; v_ct[0] = '0;
    for (int w = 0; w < 3; w++)
      for (int k = 0; k < 3; k++) begin
        e_in_valid[w][k] = 0; e_in_has_dst[w][k] = 0; e_in_dst[w][k] = '0;
        e_in_src1[w][k] = '0; e_in_src2[w][k] = '0;
      end
    for (int k = 0; k < W; k++) begin
      in_hold = 0;
      in_valid[k] = 0; in_has_dst[k] = 0; in_dst[k] = '0; in_src1[k] = '0; in_src2[k] = '0;
      free_valid[k] = 0; free_tag[k] = '0; clr_valid[k] = 0; clr_log[k] = '0; clr_tag[k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 3; w++) run_example(w);
    run_valid_bit_example();
    run_random(8000);
    check(n_stall > 0, "stall never happened");
    check(n_bypass > 0, "intra-group bypass never happened");
    check(n_clear > 0, "valid-bit clear never happened");
    check(n_hold > 0, "hold never happened");
    check(n_unrenamed > 0, "no source was read as not renamed");
    $display("stalls %0d bypasses %0d clears %0d unrenamed-sources %0d x0-dst %0d",
             n_stall, n_bypass, n_clear, n_unrenamed, n_x0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
