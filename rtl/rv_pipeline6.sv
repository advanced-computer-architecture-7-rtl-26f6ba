// rv_pipeline6: six-stage in-order RV32I pipeline with register renaming.
//
// The classic five-stage pipeline gets an extra register renaming stage (RN)
// between decode and execute: IF, ID, RN, EX, MA, WB.
//   IF  the PC register addresses the instruction memory; the next PC is
//       PC + 4, or the target of a branch or jump resolved in EX.
//   ID  decode and immediate generation; the branch target PC + imm is
//       computed here.
//   RN  a one-way rename_unit maps the logical source registers to physical
//       tags and gives the destination a fresh tag from the free tag buffer;
//       the physical register file (128 x 32) is read with the source tags.
//   EX  ALU and branch condition. Each source is taken, in this order, from
//       the EX/MA register (the previous instruction's ALU result), from the
//       WB result, or from the value read in RN; the match is on physical
//       tags, which are unique while an instruction is in flight.
//   MA  data memory (word loads and stores).
//   WB  the result is written to the physical register named by the
//       destination tag, and the tag that logical register was mapped to
//       before is returned to the free tag buffer: every older reader has
//       already read it, since the pipeline is in order.
// A load followed directly by a user of its result holds the RN stage for
// one cycle (the loaded value is forwarded from WB). RN also waits when the
// free tag buffer is empty. A taken branch or a jump in EX redirects fetch
// and squashes the three younger instructions in IF, ID and RN; the squashed
// RN instruction is not renamed, so the map table needs no repair. Branches
// are not predicted (fetch continues at PC + 4).
//
// Interface: prog_we/prog_addr/prog_data write words into the instruction
// memory (normally while rst_n is low). retire_* show each instruction as it
// leaves WB. The stall_*, redirect and fwd_* outputs flag the events of the
// current cycle. Memories: IMEM_WORDS and DMEM_WORDS words, asynchronous read.
// The PC starts at 0 after reset.
//
// The stage split and the names of the datapath (m0..m13 in the figure: PC
// mux, PC register, +4 adder, instruction memory, immediate generator, target
// adder, register file, operand muxes, ALU, data memory, result mux) follow
// the reference pipeline. Memory sizes, the instruction subset, the
// forwarding priority, the load-use stall, the release of the previous
// mapping at WB and the squash are this design's choices.
module rv_pipeline6
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int unsigned TAG_W     = rename_pkg::TAG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             prog_we,
  input  logic [31:0]      prog_addr,
  input  logic [31:0]      prog_data,
  output logic             retire_valid,
  output logic [31:0]      retire_pc,
  output logic             retire_dst_en,
  output logic [TAG_W-1:0] retire_dst_tag,
  output logic [31:0]      retire_value,
  output logic             stall_load_use,
  output logic             stall_no_tag,
  output logic             redirect,
  output logic             fwd_ma,
  output logic             fwd_wb
);
  // ---------------------------------------------------------------- records
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] ir;
  } p1_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] tpc;
    dec_t        d;
  } p2_t;

  typedef struct packed {
    logic             valid;
    logic [31:0]      pc;
    logic [31:0]      tpc;
    dec_t             d;
    logic [TAG_W-1:0] s1, s2;
    logic [31:0]      v1, v2;
    logic             dst_en;
    logic [TAG_W-1:0] dst, old;
  } prn_t;

  typedef struct packed {
    logic             valid;
    logic [31:0]      pc;
    logic [31:0]      alu;
    logic [31:0]      in3;
    logic             is_load, is_store;
    logic             dst_en;
    logic [TAG_W-1:0] dst, old;
  } p3_t;

  typedef struct packed {
    logic             valid;
    logic [31:0]      pc;
    logic [31:0]      alu;
    logic [31:0]      ldd;
    logic             ld;
    logic             dst_en;
    logic [TAG_W-1:0] dst, old;
  } p4_t;

  p1_t  p1;
  p2_t  p2;
  prn_t prn;
  p3_t  p3;
  p4_t  p4;

  logic [31:0] r_pc, w_npc, w_pcin, w_ir, w_target;
  logic        stall;

  // --------------------------------------------------------------------- IF
  async_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .adr(prog_we ? prog_addr : r_pc), .rd(w_ir), .we(prog_we), .wd(prog_data)
  );

  assign w_npc  = r_pc + 32'h4;
  assign w_pcin = redirect ? w_target : (stall ? r_pc : w_npc);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_pc <= '0;
      p1   <= '0;
    end else begin
      r_pc <= w_pcin;
      if (redirect)   p1 <= '0;
      else if (!stall) p1 <= '{valid: 1'b1, pc: r_pc, ir: w_ir};
    end
  end

  // --------------------------------------------------------------------- ID
  dec_t w_dec;
  rv_decoder u_dec (.ir(p1.ir), .d(w_dec));

  always_ff @(posedge clk) begin
    if (!rst_n) p2 <= '0;
    else if (redirect) p2 <= '0;
    else if (!stall) p2 <= '{valid: p1.valid, pc: p1.pc, tpc: p1.pc + w_dec.imm, d: w_dec};
  end

  // --------------------------------------------------------------------- RN
  logic             rn_valid [1], rn_has_dst [1];
  logic [4:0]       rn_dst [1], rn_src1 [1], rn_src2 [1];
  logic             rn_ready;
  logic             now_dst_en [1];
  logic [TAG_W-1:0] now_dst [1], now_old [1], now_s1 [1], now_s2 [1];
  logic             rel_valid [1], no_clr [1];
  logic [TAG_W-1:0] rel_tag [1], no_tag [1];
  logic [4:0]       no_log [1];
  logic [31:0]      w_rd1, w_rd2, w_rt;

  assign rn_valid[0]   = p2.valid && !redirect;
  assign rn_has_dst[0] = p2.d.has_dst;
  assign rn_dst[0]     = p2.d.rd;
  assign rn_src1[0]    = p2.d.rs1;
  assign rn_src2[0]    = p2.d.rs2;
  assign no_clr[0]     = 1'b0;
  assign no_tag[0]     = '0;
  assign no_log[0]     = '0;

  rename_unit #(.WAYS(1)) u_rn (
    .clk, .rst_n,
    .in_valid(rn_valid), .in_has_dst(rn_has_dst), .in_dst(rn_dst),
    .in_src1(rn_src1), .in_src2(rn_src2), .in_ready(rn_ready), .in_hold(stall_load_use),
    .now_dst_en, .now_dst_tag(now_dst), .now_old_tag(now_old),
    .now_src1_tag(now_s1), .now_src2_tag(now_s2),
    .out_valid(), .out_dst_en(), .out_dst_tag(), .out_src1_tag(), .out_src1_renamed(),
    .out_src2_tag(), .out_src2_renamed(),
    .free_valid(rel_valid), .free_tag(rel_tag),
    .clr_valid(no_clr), .clr_log(no_log), .clr_tag(no_tag),
    .free_count()
  );

  phys_regfile u_rf (
    .clk, .rst_n,
    .ra1(now_s1[0]), .rd1(w_rd1), .ra2(now_s2[0]), .rd2(w_rd2),
    .we(p4.valid && p4.dst_en), .wa(p4.dst), .wd(w_rt)
  );

  // the instruction in EX is a load whose result the RN instruction reads
  assign stall_load_use = p2.valid && prn.valid && prn.d.is_load && prn.dst_en &&
                          ((p2.d.use_rs1 && now_s1[0] == prn.dst) ||
                           (p2.d.use_rs2 && now_s2[0] == prn.dst));
  assign stall_no_tag   = p2.valid && !rn_ready;
  assign stall          = !redirect && (stall_load_use || stall_no_tag);

  always_ff @(posedge clk) begin
    if (!rst_n) prn <= '0;
    else if (!p2.valid || redirect || stall) prn <= '0;
    else prn <= '{valid: 1'b1, pc: p2.pc, tpc: p2.tpc, d: p2.d,
                  s1: now_s1[0], s2: now_s2[0], v1: w_rd1, v2: w_rd2,
                  dst_en: now_dst_en[0], dst: now_dst[0], old: now_old[0]};
  end

  // --------------------------------------------------------------------- EX
  logic        f1_ma, f1_wb, f2_ma, f2_wb;
  logic [31:0] w_fw1, w_fw2, w_in1, w_in2, w_alu;
  logic        w_tkn;

  assign f1_ma = p3.valid && p3.dst_en && p3.dst == prn.s1;
  assign f2_ma = p3.valid && p3.dst_en && p3.dst == prn.s2;
  assign f1_wb = p4.valid && p4.dst_en && p4.dst == prn.s1;
  assign f2_wb = p4.valid && p4.dst_en && p4.dst == prn.s2;

  // operand muxes (m11, m12, m13): RN value, EX/MA ALU result, WB result
  assign w_fw1 = f1_ma ? p3.alu : (f1_wb ? w_rt : prn.v1);
  assign w_fw2 = f2_ma ? p3.alu : (f2_wb ? w_rt : prn.v2);
  assign w_in1 = prn.d.in1_pc ? prn.pc : w_fw1;
  assign w_in2 = prn.d.in2_four ? 32'h4 : (prn.d.in2_imm ? prn.d.imm : w_fw2);

  assign fwd_ma = prn.valid && ((prn.d.use_rs1 && f1_ma) || (prn.d.use_rs2 && f2_ma));
  assign fwd_wb = prn.valid && ((prn.d.use_rs1 && !f1_ma && f1_wb) || (prn.d.use_rs2 && !f2_ma && f2_wb));

  // for branches in1/in2 are the two register operands, so one ALU gives both
  // the result and the branch condition
  rv_alu u_alu (.op(prn.d.op), .cond(prn.d.cond), .in1(w_in1), .in2(w_in2), .w_alu(w_alu), .w_tkn(w_tkn));

  assign redirect = prn.valid && ((prn.d.is_branch && w_tkn) || prn.d.is_jal || prn.d.is_jalr);
  assign w_target = prn.d.is_jalr ? ((w_fw1 + prn.d.imm) & ~32'h1) : prn.tpc;

  always_ff @(posedge clk) begin
    if (!rst_n) p3 <= '0;
    else p3 <= '{valid: prn.valid, pc: prn.pc, alu: w_alu, in3: w_fw2,
                 is_load: prn.d.is_load, is_store: prn.d.is_store,
                 dst_en: prn.valid && prn.dst_en, dst: prn.dst, old: prn.old};
  end

  // --------------------------------------------------------------------- MA
  logic [31:0] w_ldd;
  async_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .adr(p3.alu), .rd(w_ldd), .we(p3.valid && p3.is_store), .wd(p3.in3)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) p4 <= '0;
    else p4 <= '{valid: p3.valid, pc: p3.pc, alu: p3.alu, ldd: w_ldd, ld: p3.is_load,
                 dst_en: p3.dst_en, dst: p3.dst, old: p3.old};
  end

  // --------------------------------------------------------------------- WB
  assign w_rt         = p4.ld ? p4.ldd : p4.alu;
  assign rel_valid[0] = p4.valid && p4.dst_en;
  assign rel_tag[0]   = p4.old;

  assign retire_valid   = p4.valid;
  assign retire_pc      = p4.pc;
  assign retire_dst_en  = p4.dst_en;
  assign retire_dst_tag = p4.dst;
  assign retire_value   = w_rt;
endmodule
