// tb_pattern_match_predictor: self-checking test of the pattern-matching
// predictor.
//
// A reference model in the test searches the history the slow way. For
// every candidate length l it compares the newest l bits with every older
// window of l bits, which gives the longest matching length. It then finds
// every occurrence of the selected shorter pattern and counts the bits
// that followed each one. Longest length, selected length, both counts and
// the prediction are compared with the module after every history update.
//
// Streams:
//   * random outcomes;
//   * periodic patterns with periods 2 to 9, where every prediction after
//     the first few periods must be right;
//   * a loop branch pattern (taken 6 times, then not taken).
// Counted:
//   * predictions decided by a real vote (both counts non-zero), as in the
//     example of two zeros against one one;
//   * ties;
//   * cases with no match at all.
// Each must occur. Ends with a TB_RESULT line; a watchdog bounds the run.
module tb_pattern_match_predictor;
  localparam int H = 64;
  localparam int LW = $clog2(H + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic hist_valid = 1'b0, hist_taken = 1'b0;
  logic [H-1:0] hist;
  logic pred_taken;
  logic [LW-1:0] pred_longest, pred_sel_len, pred_ones, pred_zeros;

  int checks = 0, failures = 0;
  int n_vote = 0, n_tie = 0, n_nomatch = 0, n_periodic_miss = 0;

  pattern_match_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  bit m_hist [H];   // m_hist[0] newest

  function automatic bit occurs(input int l, input int d);
    for (int j = 0; j < l; j++)
      if (m_hist[d + j] != m_hist[j]) return 0;
    return 1;
  endfunction

  // compare the module with the model; returns the model's prediction
  task automatic compare(output bit pred);
    int lmax, lsel, ones, zeros, first;
    lmax = 0;
    for (int l = H - 1; l >= 1 && lmax == 0; l--)
      for (int d = 1; d + l <= H; d++)
        if (occurs(l, d)) begin lmax = l; break; end
    lsel = lmax / 2;
    if (lmax > 0 && lsel == 0) lsel = 1;
    ones = 0; zeros = 0; first = -1;
    if (lmax > 0)
      for (int d = 1; d + lsel <= H; d++)
        if (occurs(lsel, d)) begin
          if (m_hist[d-1]) ones++; else zeros++;
          if (first < 0) first = int'(m_hist[d-1]);
        end
    pred = (ones > zeros) ? 1'b1 : (zeros > ones) ? 1'b0 : (first == 1);
    check(int'(pred_longest) == lmax, $sformatf("longest %0d vs %0d", pred_longest, lmax));
    check(int'(pred_sel_len) == lsel, $sformatf("selected length %0d vs %0d", pred_sel_len, lsel));
    check(int'(pred_ones) == ones && int'(pred_zeros) == zeros,
          $sformatf("counts %0d/%0d vs %0d/%0d", pred_ones, pred_zeros, ones, zeros));
    check(pred_taken == pred, "prediction");
    if (lmax == 0) n_nomatch++;
    else if (ones == zeros) n_tie++;
    else if (ones > 0 && zeros > 0) n_vote++;
  endtask

  task automatic step(input bit t, output bit pred);
    @(negedge clk);
    compare(pred);
    hist_valid = 1'b1; hist_taken = t;
    @(posedge clk);
    for (int i = H - 1; i > 0; i--) m_hist[i] = m_hist[i-1];
    m_hist[0] = t;
    #1;
    hist_valid = 1'b0;
    check(hist[0] == t, "history shift");
  endtask

  task automatic clear();
    @(negedge clk);
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int i = 0; i < H; i++) m_hist[i] = 1'b0;
  endtask

  initial begin
    bit p;
    for (int i = 0; i < H; i++) m_hist[i] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // random outcomes, starting from the all-zero history after reset
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(1)), p);
    for (int per = 2; per <= 9; per++) begin
      bit pat [];
      pat = new[per];
      for (int k = 0; k < per; k++) pat[k] = 1'($urandom_range(1));
      pat[0] = 1'b1; pat[per-1] = 1'b0;   // not constant
      clear();
      for (int i = 0; i < 12 * per + 2 * H; i++) begin
        step(pat[i % per], p);
        if (i >= 4 * per + H && p != pat[i % per]) n_periodic_miss++;
      end
    end
    clear();
    for (int i = 0; i < 400; i++) step(i % 7 != 6, p);
    // an alternating history
    clear();
    for (int i = 0; i < H; i++) step((i == 0) ? 1'b1 : 1'(i % 2), p);
    // after reset the newest bit 1 follows only zeros: no match
    clear();
    step(1'b1, p);
    step(1'b0, p);
    check(n_periodic_miss == 0, $sformatf("periodic streams missed %0d times", n_periodic_miss));
    check(n_vote > 0, "no prediction was decided by a vote");
    check(n_tie > 0, "no tie happened");
    check(n_nomatch > 0, "no history without a match");
    $display("votes %0d ties %0d no-match %0d periodic misses %0d",
             n_vote, n_tie, n_nomatch, n_periodic_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
