// rename_unit: n-way register renaming stage (RN) of a superscalar pipeline.
//
// Each cycle it takes a group of up to WAYS decoded instructions (way 0 is the
// oldest) and converts their logical register numbers into physical register
// IDs:
//   * each source operand is looked up in the register map table
//     (2*WAYS read ports);
//   * each destination gets a fresh tag from the head of the free tag buffer,
//     and the map table entry of that logical register is overwritten with it
//     (WAYS write ports);
//   * inside the group, a source that names the destination of an older
//     instruction of the same group must not use the map table, which does not
//     hold that mapping yet: a multiplexer replaces the table's answer with the
//     tag the older instruction takes from the free tag buffer. If several
//     older instructions write the register, the youngest of them wins.
//
// With RESET_RENAMED = 1 (default) x0..x31 start mapped to p0..p31 and every
// source comes out as a physical tag. With RESET_RENAMED = 0 the map table
// starts with all valid bits clear; a source whose logical register is not
// renamed then comes out with out_srcN_renamed = 0 and its logical register
// number (zero-extended) in place of a tag, meaning "read the logical register
// file". The clear ports (clr_*) tell the map table that a physical register
// has been written back so that the logical register is no longer renamed.
//
// Freed tags arrive on free_valid/free_tag and go to the tail of the free tag
// buffer; deciding when a tag is free (at retirement) belongs to the rest of
// the processor.
//
// Handshake: in_ready is high when the free tag buffer holds at least as many
// tags as the group has destinations; it does not depend on in_hold. The
// whole group is renamed in a cycle with in_ready high and in_hold low, or
// none of it is (the stage stalls); in_hold lets a later stage stall the
// rename stage. An instruction with in_has_dst = 0, or with x0 as destination,
// takes no tag (x0 is constant).
//
// Timing: lookup, allocation and bypass are combinational and are shown in
// the same cycle on the now_* outputs, which also give the previous mapping of
// each destination (now_old_tag; the tag to release when the instruction
// retires). The map table therefore has 3*WAYS read ports: 2*WAYS for the
// sources and WAYS for the previous destinations. The renamed group also
// appears on the out_* registers one clock after it was accepted (one
// pipeline stage). Active-low synchronous reset.
//
// The map table, the free tag buffer, their sizes, the allocation from the FIFO
// head and the intra-group multiplexer follow the reference organisation; the
// all-or-nothing stall, the x0 rule, the previous-mapping output and the
// port-level handshake are choices of this design.
module rename_unit #(
  parameter int unsigned WAYS          = 2,
  parameter int unsigned NUM_LOG       = rename_pkg::NUM_LOG_REGS,
  parameter int unsigned NUM_PHYS      = rename_pkg::NUM_PHYS_REGS,
  parameter int unsigned FIRST_FREE    = NUM_LOG,
  parameter bit          RESET_RENAMED = 1'b1,
  localparam int unsigned LOG_W        = $clog2(NUM_LOG),
  localparam int unsigned TAG_W        = $clog2(NUM_PHYS),
  localparam int unsigned CNT_W        = $clog2(NUM_PHYS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // decoded group, way 0 oldest
  input  logic             in_valid   [WAYS],
  input  logic             in_has_dst [WAYS],
  input  logic [LOG_W-1:0] in_dst     [WAYS],
  input  logic [LOG_W-1:0] in_src1    [WAYS],
  input  logic [LOG_W-1:0] in_src2    [WAYS],
  output logic             in_ready,
  input  logic             in_hold,
  // renaming result of the group now at the inputs (same cycle)
  output logic             now_dst_en   [WAYS],
  output logic [TAG_W-1:0] now_dst_tag  [WAYS],
  output logic [TAG_W-1:0] now_old_tag  [WAYS],
  output logic [TAG_W-1:0] now_src1_tag [WAYS],
  output logic [TAG_W-1:0] now_src2_tag [WAYS],
  // renamed group, one cycle later
  output logic             out_valid         [WAYS],
  output logic             out_dst_en        [WAYS],
  output logic [TAG_W-1:0] out_dst_tag       [WAYS],
  output logic [TAG_W-1:0] out_src1_tag      [WAYS],
  output logic             out_src1_renamed  [WAYS],
  output logic [TAG_W-1:0] out_src2_tag      [WAYS],
  output logic             out_src2_renamed  [WAYS],
  // tags released by the rest of the processor
  input  logic             free_valid [WAYS],
  input  logic [TAG_W-1:0] free_tag   [WAYS],
  // write-back notices for the valid bits
  input  logic             clr_valid  [WAYS],
  input  logic [LOG_W-1:0] clr_log    [WAYS],
  input  logic [TAG_W-1:0] clr_tag    [WAYS],
  output logic [CNT_W-1:0] free_count
);
  localparam int unsigned NUM_W = $clog2(WAYS + 1);

  logic [TAG_W-1:0] head_tag [WAYS];
  logic [NUM_W-1:0] deq_num;

  logic [LOG_W-1:0] rd_addr  [3*WAYS];
  logic [TAG_W-1:0] rd_tag   [3*WAYS];
  logic             rd_valid [3*WAYS];
  logic             wr_en    [WAYS];

  logic             dst_en   [WAYS];
  logic [TAG_W-1:0] dst_tag  [WAYS];
  logic [TAG_W-1:0] s1_tag   [WAYS], s2_tag [WAYS];
  logic             s1_ren   [WAYS], s2_ren [WAYS];
  logic [NUM_W-1:0] need_num;
  logic             fire;

  free_tag_buffer #(
    .DEPTH(NUM_PHYS), .TAG_W(TAG_W), .WAYS(WAYS), .FIRST_FREE(FIRST_FREE)
  ) u_ftb (
    .clk, .rst_n,
    .head_tag, .deq_num,
    .enq_valid(free_valid), .enq_tag(free_tag),
    .count(free_count)
  );

  reg_map_table #(
    .NUM_LOG(NUM_LOG), .TAG_W(TAG_W), .RD_PORTS(3*WAYS), .WR_PORTS(WAYS),
    .RESET_RENAMED(RESET_RENAMED)
  ) u_map (
    .clk, .rst_n,
    .rd_addr, .rd_tag, .rd_valid,
    .wr_en, .wr_addr(in_dst), .wr_tag(dst_tag),
    .clr_en(clr_valid), .clr_addr(clr_log), .clr_tag(clr_tag)
  );

  // destination allocation: the k-th destination of the group takes the k-th
  // tag from the head of the free tag buffer
  always_comb begin
    need_num = '0;
    for (int unsigned i = 0; i < WAYS; i++) begin
      dst_en[i]  = in_valid[i] && in_has_dst[i] && (in_dst[i] != '0);
      dst_tag[i] = head_tag[int'(need_num) % WAYS];  // need_num <= i < WAYS here
      need_num   = need_num + NUM_W'(dst_en[i]);
    end
  end

  assign in_ready = (CNT_W'(need_num) <= free_count);
  assign fire     = in_ready && !in_hold;
  assign deq_num  = fire ? need_num : '0;

  always_comb begin
    for (int unsigned i = 0; i < WAYS; i++) wr_en[i] = fire && dst_en[i];
  end

  // source lookup with intra-group bypass
  always_comb begin
    for (int unsigned j = 0; j < WAYS; j++) begin
      rd_addr[2*j]   = in_src1[j];
      rd_addr[2*j+1] = in_src2[j];
      rd_addr[2*WAYS+j] = in_dst[j];
    end
    for (int unsigned j = 0; j < WAYS; j++) begin
      s1_ren[j] = rd_valid[2*j];
      s1_tag[j] = rd_valid[2*j] ? rd_tag[2*j] : TAG_W'(in_src1[j]);
      s2_ren[j] = rd_valid[2*j+1];
      s2_tag[j] = rd_valid[2*j+1] ? rd_tag[2*j+1] : TAG_W'(in_src2[j]);
      for (int unsigned i = 0; i < j; i++) begin
        if (dst_en[i] && in_dst[i] == in_src1[j]) begin
          s1_tag[j] = dst_tag[i];
          s1_ren[j] = 1'b1;
        end
        if (dst_en[i] && in_dst[i] == in_src2[j]) begin
          s2_tag[j] = dst_tag[i];
          s2_ren[j] = 1'b1;
        end
      end
    end
  end

  // previous mapping of each destination (the youngest older writer of the
  // same register in the group, else the map table), released by the user
  // once the instruction retires
  logic [TAG_W-1:0] old_tag [WAYS];
  always_comb begin
    for (int unsigned j = 0; j < WAYS; j++) begin
      old_tag[j] = rd_tag[2*WAYS+j];
      for (int unsigned i = 0; i < j; i++)
        if (dst_en[i] && in_dst[i] == in_dst[j]) old_tag[j] = dst_tag[i];
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < WAYS; j++) begin
      now_dst_en[j]   = dst_en[j];
      now_dst_tag[j]  = dst_tag[j];
      now_old_tag[j]  = old_tag[j];
      now_src1_tag[j] = s1_tag[j];
      now_src2_tag[j] = s2_tag[j];
    end
  end

  // RN pipeline register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < WAYS; i++) begin
        out_valid[i]        <= 1'b0;
        out_dst_en[i]       <= 1'b0;
        out_dst_tag[i]      <= '0;
        out_src1_tag[i]     <= '0;
        out_src1_renamed[i] <= 1'b0;
        out_src2_tag[i]     <= '0;
        out_src2_renamed[i] <= 1'b0;
      end
    end else begin
      for (int unsigned i = 0; i < WAYS; i++) begin
        out_valid[i]        <= fire && in_valid[i];
        out_dst_en[i]       <= fire && dst_en[i];
        out_dst_tag[i]      <= dst_en[i] ? dst_tag[i] : '0;
        out_src1_tag[i]     <= s1_tag[i];
        out_src1_renamed[i] <= s1_ren[i];
        out_src2_tag[i]     <= s2_tag[i];
        out_src2_renamed[i] <= s2_ren[i];
      end
    end
  end
endmodule
