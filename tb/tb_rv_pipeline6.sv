// tb_rv_pipeline6: self-checking test of the six-stage renaming pipeline.
//
// The test assembles a small RV32I program, runs it on an instruction-set
// model written in the test (one instruction at a time, no pipeline), and
// records the sequence of executed PCs with the value each one writes. The
// same program is then loaded into the pipeline's instruction memory and run
// to its final self-loop. Checked:
//   * every retired instruction, in order: its PC and the value it writes;
//   * at the end, every logical register (looked up through the map table
//     into the physical register file) and every data-memory word written;
//   * the cycle count: with no stalls an instruction retires every cycle, so
//     cycles = instructions + squashed slots (3 per redirect) + load-use
//     stall cycles + 4 cycles of pipeline fill.
// The program starts with the four-instruction renaming example
// (sub x5,x1,x2 / add x9,x5,x4 / or x5,x5,x2 / and x2,x9,x1), fills an array
// in a loop, sums it in a second loop whose load feeds the next instruction,
// and calls a function with jal/jalr. Counted, and each must occur: load-use
// stalls, redirects, forwarding from EX/MA and from WB, register-file write
// through, and reuse of a physical tag that had been released.
module tb_rv_pipeline6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0;
  logic        retire_valid, retire_dst_en;
  logic [31:0] retire_pc, retire_value;
  logic [6:0]  retire_dst_tag;
  logic        stall_load_use, stall_no_tag, redirect, fwd_ma, fwd_wb;

  rv_pipeline6 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
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

  import rv_prog_pkg::*;

  // ------------------------------------------------------------------ run
  int n_loaduse = 0, n_redirect = 0, n_fwd_ma = 0, n_fwd_wb = 0, n_wt = 0, n_reuse = 0;
  bit seen_tag [128];

  always @(posedge clk) if (rst_n) begin
    if (stall_load_use && !redirect) n_loaduse++;
    if (redirect) n_redirect++;
    if (fwd_ma) n_fwd_ma++;
    if (fwd_wb) n_fwd_wb++;
    if (dut.u_rf.we && (dut.u_rf.wa == dut.u_rf.ra1 || dut.u_rf.wa == dut.u_rf.ra2) && dut.p2.valid) n_wt++;
  end

  initial begin
    int halt_pc, k, cycles;
    build();
    halt_pc = (prog.size() - 1) * 4;
    iss(halt_pc);
    // load the program while the pipeline is held in reset
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    k = 0; cycles = 0;
    while (k < t_pc.size()) begin
      @(posedge clk);
      cycles++;
      #1;
      if (retire_valid && k < t_pc.size()) begin
        check(retire_pc == t_pc[k], $sformatf("retire %0d: pc %0h vs %0h", k, retire_pc, t_pc[k]));
        check(retire_dst_en == t_dst[k], $sformatf("retire %0d (pc %0h): destination flag", k, t_pc[k]));
        if (t_dst[k]) begin
          check(retire_value == t_val[k], $sformatf("retire %0d (pc %0h): value %0h vs %0h", k, t_pc[k], retire_value, t_val[k]));
          if (seen_tag[retire_dst_tag]) n_reuse++;
          seen_tag[retire_dst_tag] = 1;
        end
        k++;
      end
    end
    // the first instruction leaves WB in the 5th cycle after reset; the last
    // traced instruction is a jump whose own squashed slots come after it
    check(cycles == t_pc.size() + 3 * (n_redirect_exp - 1) + n_loaduse_exp + 4,
          $sformatf("cycles %0d, expected %0d + 3*%0d + %0d + 4", cycles, t_pc.size(), n_redirect_exp - 1, n_loaduse_exp));
    check(n_redirect == n_redirect_exp, $sformatf("redirects %0d vs %0d", n_redirect, n_redirect_exp));
    check(n_loaduse == n_loaduse_exp, $sformatf("load-use stalls %0d vs %0d", n_loaduse, n_loaduse_exp));
    repeat (3) @(posedge clk);
    #1;
    for (int i = 1; i < 32; i++)
      check(dut.u_rf.regs[dut.u_rn.u_map.map[i]] == m_reg[i],
            $sformatf("x%0d = %0h vs %0h", i, dut.u_rf.regs[dut.u_rn.u_map.map[i]], m_reg[i]));
    foreach (m_mem[a]) check(dut.u_dmem.mem[a[9:0]] == m_mem[a], $sformatf("mem word %0h", a));
    check(n_loaduse > 0, "no load-use stall");
    check(n_redirect > 0, "no redirect");
    check(n_fwd_ma > 0 && n_fwd_wb > 0, "a forwarding path was never used");
    check(n_wt > 0, "no register-file write-through");
    check(n_reuse > 0, "no released tag was reused");
    $display("instructions %0d cycles %0d; redirects %0d load-use %0d fwd EX/MA %0d fwd WB %0d write-through %0d tag reuse %0d",
             t_pc.size(), cycles, n_redirect, n_loaduse, n_fwd_ma, n_fwd_wb, n_wt, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
