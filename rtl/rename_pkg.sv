// rename_pkg: shared sizes of the register renaming hardware.
//
// The renaming logic converts each RISC-V logical register (x0..x31) into a
// physical register ID. The sizes below are the ones of the reference
// organisation: 32 logical registers, 128 physical registers, so a physical
// register ID (a "tag") is 7 bits wide and a logical register number 5 bits.
package rename_pkg;
  localparam int unsigned NUM_LOG_REGS  = 32;
  localparam int unsigned NUM_PHYS_REGS = 128;
  localparam int unsigned LOG_W = $clog2(NUM_LOG_REGS);   // 5
  localparam int unsigned TAG_W = $clog2(NUM_PHYS_REGS);  // 7

  typedef logic [LOG_W-1:0] log_reg_t;
  typedef logic [TAG_W-1:0] phys_tag_t;
endpackage
