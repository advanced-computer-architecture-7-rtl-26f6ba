// tb_gshare_predictor: self-checking test of the gshare predictor.
//
// A reference model (counter array and history register kept in the test)
// predicts every branch independently; the index, the prediction and the
// history register of the design are compared with it for every branch.
// Phase 1 drives random PCs and outcomes, with the write-back update arriving
// three branches after the prediction it belongs to. Phase 2 runs a loop
// branch that is taken three times and then not taken, mixed with a second
// branch that always follows the direction of the first; once warmed up,
// gshare must predict both without a single miss, which a PC-only bimodal
// table cannot do for the loop exit. The test also checks the reset sweep
// time (2^12 cycles) and that counters saturate at both ends.
module tb_gshare_predictor;
  localparam int unsigned PB = 12, HL = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0]   pred_pc;
  logic          pred_taken;
  logic [PB-1:0] pred_idx;
  logic          hist_valid, hist_taken;
  logic [HL-1:0] bhr;
  logic          upd_valid;
  logic [PB-1:0] upd_idx;
  logic          upd_taken;
  logic          ready;

  int checks = 0, failures = 0;
  int unsigned m_pht [2**PB];
  int unsigned m_bhr;
  int n_sat_hi = 0, n_sat_lo = 0;

  gshare_predictor dut (.*);

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

  function automatic int unsigned m_index(input logic [31:0] pc);
    return (int'(pc[PB+1:2]) ^ m_bhr) & ((1 << PB) - 1);
  endfunction

  // one branch: predict, shift history, and apply a (possibly older) update
  task automatic branch(input logic [31:0] pc, input bit taken,
                        input bit do_upd, input int unsigned uidx, input bit utaken,
                        output int unsigned idx, output bit pred);
    @(negedge clk);
    pred_pc = pc;
    hist_valid = 1'b1; hist_taken = taken;
    upd_valid = do_upd; upd_idx = PB'(uidx); upd_taken = utaken;
    #1;
    idx  = m_index(pc);
    pred = m_pht[idx][1];
    check(int'(pred_idx) == idx, $sformatf("index %0h vs %0h", pred_idx, idx));
    check(pred_taken == pred, "prediction");
    pred = pred_taken;   // callers count the design's own misses
    check(int'(bhr) == m_bhr, "history register");
    @(posedge clk);
    m_bhr = ((m_bhr << 1) | taken) & ((1 << HL) - 1);
    if (do_upd) begin
      if (utaken && m_pht[uidx] == 3) n_sat_hi++;
      if (!utaken && m_pht[uidx] == 0) n_sat_lo++;
      if (utaken && m_pht[uidx] < 3) m_pht[uidx]++;
      else if (!utaken && m_pht[uidx] > 0) m_pht[uidx]--;
    end
  endtask

  initial begin
    int unsigned qi [$];
    bit          qt [$];
    int unsigned idx;
    bit pred;
    int sweep_cycles, miss;
    pred_pc = '0; hist_valid = 0; hist_taken = 0; upd_valid = 0; upd_idx = '0; upd_taken = 0;
    for (int i = 0; i < 2**PB; i++) m_pht[i] = 1;
    m_bhr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sweep_cycles = 0;
    while (!ready) begin @(posedge clk); #1; sweep_cycles++; end
    check(sweep_cycles == 2**PB, $sformatf("reset sweep took %0d cycles", sweep_cycles));

    // phase 1: random branches from a few PCs, update three branches late
    for (int n = 0; n < 6000; n++) begin
      logic [31:0] pc;
      bit t, du, ut;
      int unsigned ui;
      pc = {20'h0, 4'($urandom_range(3, 0)), 6'($urandom_range(63, 0)), 2'b00};
      t  = ($urandom_range(3, 0) != 0);
      du = (qi.size() >= 3);
      ui = du ? qi[0] : 0;
      ut = du ? qt[0] : 0;
      if (du) begin void'(qi.pop_front()); void'(qt.pop_front()); end
      branch(pc, t, du, ui, ut, idx, pred);
      qi.push_back(idx); qt.push_back(t);
    end
    check(n_sat_hi > 0 && n_sat_lo > 0, "counters never saturated");

    // phase 2: loop branch (T,T,T,N) and a branch that copies its direction
    miss = 0;
    for (int it = 0; it < 400; it++) begin
      for (int k = 0; k < 4; k++) begin
        bit t;
        t = (k != 3);
        branch(32'h0000_1040, t, 1'b0, 0, 1'b0, idx, pred);
        if (it >= 300 && pred != t) miss++;
        @(negedge clk); upd_valid = 1; upd_idx = PB'(idx); upd_taken = t; hist_valid = 0;
        @(posedge clk);
        if (t && m_pht[idx] < 3) m_pht[idx]++; else if (!t && m_pht[idx] > 0) m_pht[idx]--;
        branch(32'h0000_2080, t, 1'b0, 0, 1'b0, idx, pred);
        if (it >= 300 && pred != t) miss++;
        @(negedge clk); upd_valid = 1; upd_idx = PB'(idx); upd_taken = t; hist_valid = 0;
        @(posedge clk);
        if (t && m_pht[idx] < 3) m_pht[idx]++; else if (!t && m_pht[idx] > 0) m_pht[idx]--;
      end
    end
    check(miss == 0, $sformatf("%0d mispredictions on the warmed-up loop", miss));
    $display("reset sweep %0d cycles, saturations %0d/%0d, loop misses %0d", sweep_cycles, n_sat_hi, n_sat_lo, miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
