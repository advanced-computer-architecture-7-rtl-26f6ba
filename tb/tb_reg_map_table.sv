// tb_reg_map_table: self-checking test of the register map table.
//
// Two tables are tested side by side, one reset to the identity mapping with
// valid bits set and one reset with all valid bits clear. Random writes on
// both write ports (including both ports on the same entry, where port 1 must
// win) and random clears (which take effect only while the entry still holds
// the given tag, and lose against a write) are applied; a reference array is
// updated with the same rules and all four read ports are compared with it
// every cycle.
module tb_reg_map_table;
  localparam int unsigned NL = 32, TW = 7, RP = 4, WP = 2, LW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LW-1:0] rd_addr [RP];
  logic [TW-1:0] rd_tag_a [RP], rd_tag_b [RP];
  logic          rd_valid_a [RP], rd_valid_b [RP];
  logic          wr_en [WP];
  logic [LW-1:0] wr_addr [WP];
  logic [TW-1:0] wr_tag [WP];
  logic          clr_en [WP];
  logic [LW-1:0] clr_addr [WP];
  logic [TW-1:0] clr_tag [WP];

  int checks = 0, failures = 0;
  int unsigned m_tag [2][NL];
  bit          m_val [2][NL];
  int same_port_writes = 0, clears_taken = 0;

  reg_map_table #(.RD_PORTS(RP), .WR_PORTS(WP), .RESET_RENAMED(1'b1)) dut_a (
    .clk, .rst_n, .rd_addr, .rd_tag(rd_tag_a), .rd_valid(rd_valid_a),
    .wr_en, .wr_addr, .wr_tag, .clr_en, .clr_addr, .clr_tag);
  reg_map_table #(.RD_PORTS(RP), .WR_PORTS(WP), .RESET_RENAMED(1'b0)) dut_b (
    .clk, .rst_n, .rd_addr, .rd_tag(rd_tag_b), .rd_valid(rd_valid_b),
    .wr_en, .wr_addr, .wr_tag, .clr_en, .clr_addr, .clr_tag);

  always #5 clk = ~clk;

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
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare_reads();
    #1;
    for (int r = 0; r < RP; r++) begin
      check(int'(rd_tag_a[r]) == m_tag[0][rd_addr[r]] && rd_valid_a[r] == m_val[0][rd_addr[r]],
            $sformatf("table A entry %0d: %0d/%0d vs %0d/%0d", rd_addr[r], rd_tag_a[r], rd_valid_a[r],
                      m_tag[0][rd_addr[r]], m_val[0][rd_addr[r]]));
      check(int'(rd_tag_b[r]) == m_tag[1][rd_addr[r]] && rd_valid_b[r] == m_val[1][rd_addr[r]],
            $sformatf("table B entry %0d", rd_addr[r]));
    end
  endtask

  initial begin
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < NL; i++) begin m_tag[t][i] = i; m_val[t][i] = (t == 0); end
    foreach (wr_en[i]) begin
      wr_en[i] = 0; wr_addr[i] = '0; wr_tag[i] = '0; clr_en[i] = 0; clr_addr[i] = '0; clr_tag[i] = '0;
    end
    foreach (rd_addr[r]) rd_addr[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset contents, read through all ports
    for (int i = 0; i < NL; i += RP) begin
      for (int r = 0; r < RP; r++) rd_addr[r] = LW'(i + r);
      compare_reads();
    end
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      foreach (rd_addr[r]) rd_addr[r] = LW'($urandom_range(NL - 1, 0));
      for (int w = 0; w < WP; w++) begin
        wr_en[w]   = ($urandom_range(2, 0) == 0);
        wr_addr[w] = LW'($urandom_range(NL - 1, 0));
        wr_tag[w]  = TW'($urandom_range(127, 0));
        clr_en[w]  = ($urandom_range(2, 0) == 0);
        clr_addr[w] = LW'($urandom_range(NL - 1, 0));
        // usually the current tag of that entry so that the clear takes effect
        clr_tag[w] = ($urandom_range(3, 0) != 0) ? TW'(m_tag[0][clr_addr[w]]) : TW'($urandom_range(127, 0));
      end
      if ($urandom_range(7, 0) == 0) begin wr_en[0] = 1; wr_en[1] = 1; wr_addr[1] = wr_addr[0]; end
      compare_reads();
      @(posedge clk);
      // reference update: clears first (old contents), then writes in port order
      for (int t = 0; t < 2; t++) begin
        int unsigned old_tag [NL];
        for (int i = 0; i < NL; i++) old_tag[i] = m_tag[t][i];
        for (int w = 0; w < WP; w++)
          if (clr_en[w] && old_tag[clr_addr[w]] == clr_tag[w]) begin
            m_val[t][clr_addr[w]] = 0;
            if (t == 0) clears_taken++;
          end
        for (int w = 0; w < WP; w++)
          if (wr_en[w]) begin m_tag[t][wr_addr[w]] = wr_tag[w]; m_val[t][wr_addr[w]] = 1; end
      end
      if (wr_en[0] && wr_en[1] && wr_addr[0] == wr_addr[1]) same_port_writes++;
    end
    // tables A and B see the same writes, so any difference left is due to reset
    check(same_port_writes > 0 && clears_taken > 0, "write conflict or clear never exercised");
    $display("same-entry writes %0d, clears %0d", same_port_writes, clears_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
