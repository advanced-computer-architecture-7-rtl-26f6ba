// tb_prophet_critic_sweep: accuracy of the prophet/critic hybrid against the
// number of future bits the critic sees.
//
// Six copies of prophet_critic_harness run the same kind of branch stream
// with FUTURE = 1, 2, 3, 4, 6 and 8 (4 is the default of the predictor). Each
// checks its predictor on its own; this bench waits for all of them, then
// prints, per setting, the final mispredictions per 1000 branches, the
// overrides and the accuracy on the xor branch over the second half of the
// run. The curve depends on the synthetic stream and is not a benchmark
// result. Ends with a TB_RESULT line summed over all copies; a watchdog
// bounds the run.
module tb_prophet_critic_sweep;
  localparam int NS = 6;
  localparam int FUT [NS] = '{1, 2, 3, 4, 6, 8};
  localparam int N = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bit done [NS];
  int chk [NS], fail [NS], misp [NS], ovr [NS], xt [NS], xf [NS], xp [NS], cy [NS];

  for (genvar g = 0; g < NS; g++) begin : g_h
    prophet_critic_harness #(.FUTURE(FUT[g]), .N(N)) u_h (
      .clk, .done(done[g]), .checks(chk[g]), .failures(fail[g]), .n_misp(misp[g]),
      .n_ovr(ovr[g]), .x_total(xt[g]), .x_final_ok(xf[g]), .x_prophet_ok(xp[g]), .cyc(cy[g])
    );
  end

  int checks, failures;

  initial begin
    repeat (400000) @(posedge clk);
    checks = 0; failures = 1;
    for (int g = 0; g < NS; g++) begin checks += chk[g]; failures += fail[g]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NS; g++) all &= done[g];
    end while (!all);
    checks = 0; failures = 0;
    $display("future bits | mispredictions per 1000 | overrides | xor right (final / prophet) | cycles");
    for (int g = 0; g < NS; g++) begin
      $display("%11d | %23d | %9d | %10d / %0d of %0d | %0d", FUT[g], misp[g] * 1000 / N, ovr[g],
               xf[g], xp[g], xt[g], cy[g]);
      checks += chk[g] + 1;
      failures += fail[g];
      if (misp[g] == 0 || ovr[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
