// tb_perceptron_predictor: self-checking test of the perceptron predictor.
//
// The test keeps its own copy of every weight and of the global history and
// works out y, the prediction and the training decision for every branch with
// plain integer arithmetic; the design's pred_y, pred_taken, ghist and
// upd_trained are compared with it. Phase 1 uses random outcomes. Phase 2
// makes one branch repeat the outcome of the branch five places earlier in
// the history, a linearly separable rule that the perceptron must learn to
// predict without a miss; its weights also grow until |y| > 68 and training
// stops. A second unit with 2-bit weights checks that weights saturate. The
// test counts trainings caused by a wrong sign and trainings caused only by a
// small |y|, and fails if either never occurs.
module tb_perceptron_predictor;
  localparam int unsigned NP = 256, HL = 28, WB = 8, NW = HL + 1, YW = 8 + 5 + 1;
  localparam int THETA_EXP = 68;   // floor(1.93 * 28 + 14)

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0]           pred_pc, upd_pc;
  logic                  pred_taken;
  logic signed [YW-1:0]  pred_y;
  logic                  hist_valid, hist_taken;
  logic [HL-1:0]         ghist, upd_hist;
  logic                  upd_valid, upd_taken, upd_trained;

  int checks = 0, failures = 0;
  int m_w [NP][NW];
  logic [HL-1:0] m_h;
  int n_wrong = 0, n_low = 0, n_sat = 0;

  logic          hist_restore = 1'b0;
  logic [HL-1:0] hist_restore_value = '0;
  perceptron_predictor dut (.*);

  logic signed [YW-7:0] s_pred_y;
  logic                 s_pred_taken, s_upd_valid = 1'b0, s_upd_taken = 1'b0, s_trained;
  logic [HL-1:0]        s_ghist;
  perceptron_predictor #(.W_BITS(2)) dut_small (
    .clk, .rst_n, .pred_pc(32'h0), .pred_taken(s_pred_taken), .pred_y(s_pred_y),
    .hist_valid(1'b0), .hist_taken(1'b0), .ghist(s_ghist),
    .hist_restore(1'b0), .hist_restore_value('0),
    .upd_valid(s_upd_valid), .upd_pc(32'h0), .upd_hist({HL{1'b1}}), .upd_taken(s_upd_taken),
    .upd_trained(s_trained));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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

  function automatic int m_y(input int e, input logic [HL-1:0] h);
    int y;
    y = m_w[e][0];
    for (int i = 1; i < NW; i++) y += h[i-1] ? m_w[e][i] : -m_w[e][i];
    return y;
  endfunction

  // predict, update with the outcome in the same cycle, shift the history
  task automatic branch(input logic [31:0] pc, input bit t, output bit pred);
    int e, y;
    bit train;
    e = int'(pc[9:2]);
    @(negedge clk);
    pred_pc = pc; upd_pc = pc; upd_hist = m_h; upd_taken = t; upd_valid = 1'b1;
    hist_valid = 1'b1; hist_taken = t;
    #1;
    y = m_y(e, m_h);
    check(int'(pred_y) == y, $sformatf("y %0d vs %0d", pred_y, y));
    check(pred_taken == (y >= 0), "prediction");
    check(ghist == m_h, "history");
    train = ((y >= 0) != t) || (y <= THETA_EXP && y >= -THETA_EXP);
    check(upd_trained == train, "training decision");
    pred = pred_taken;
    @(posedge clk);
    if (train) begin
      if ((y >= 0) != t) n_wrong++; else n_low++;
      for (int i = 0; i < NW; i++) begin
        bit up;
        up = (i == 0) ? t : (t == m_h[i-1]);
        if (up) begin if (m_w[e][i] < 127) m_w[e][i]++; else n_sat++; end
        else    begin if (m_w[e][i] > -128) m_w[e][i]--; else n_sat++; end
      end
    end
    m_h = {m_h[HL-2:0], t};
  endtask

  initial begin
    bit pred;
    int miss, big;
    pred_pc = '0; upd_pc = '0; upd_hist = '0; upd_taken = 0; upd_valid = 0;
    hist_valid = 0; hist_taken = 0;
    for (int e = 0; e < NP; e++) for (int i = 0; i < NW; i++) m_w[e][i] = 0;
    m_h = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(dut.THETA == THETA_EXP, "threshold");
    // phase 1: random
    for (int n = 0; n < 3000; n++)
      branch({22'h0, 8'($urandom_range(15, 0)), 2'b00}, $urandom_range(1, 0) == 1, pred);
    // phase 2: branch at 0x40 repeats the outcome five branches back; the
    // others are random
    miss = 0;
    for (int n = 0; n < 3000; n++) begin
      branch({22'h0, 8'(16 + $urandom_range(7, 0)), 2'b00}, $urandom_range(1, 0) == 1, pred);
      if (n % 4 == 3) begin
        bit t;
        t = m_h[4];
        branch(32'h0000_0040, t, pred);
        if (n > 2000 && pred != t) miss++;
      end
    end
    // a heavily biased branch: training stops once |y| exceeds the threshold
    for (int n = 0; n < 400; n++) branch(32'h0000_0300, 1'b1, pred);
    big = m_y(8'hC0, m_h);
    check(big > THETA_EXP, "biased branch did not pass the threshold");
    // saturation, on a unit with 2-bit weights (range -2..1) whose |y| can
    // never pass the threshold: an always-taken branch with an all-taken
    // history trains every time, so all 29 weights must stop at +1
    @(negedge clk);
    s_upd_valid = 1'b1; s_upd_taken = 1'b1;
    repeat (6) @(posedge clk);
    #1;
    // its own history is all not-taken, so y = w0 - (w1 + ... + w28) = 1 - 28
    check(int'(s_pred_y) == -27, $sformatf("saturated y %0d, expected -27", s_pred_y));
    check(s_trained, "small unit stopped training");
    if (int'(s_pred_y) == -27) n_sat++;
    s_upd_valid = 1'b0;
    check(miss == 0, $sformatf("%0d misses on the learnable branch", miss));
    check(n_wrong > 0 && n_low > 0, "a kind of training never happened");
    check(n_sat > 0, "no weight saturated");
    $display("trainings: wrong sign %0d, low confidence %0d; saturated steps %0d; misses %0d; y of biased branch %0d",
             n_wrong, n_low, n_sat, miss, big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
