// phys_regfile: physical register file of the renaming pipeline.
//
// NUM_REGS registers of XLEN bits (128 x 32 by default, one per physical
// register ID), two combinational read ports (ra1/rd1, ra2/rd2) used by the
// RN stage and one write port (wa/wd/we) used by the WB stage. A read of the
// register being written in the same cycle returns the new value (write
// through), so an instruction three stages behind its producer needs no other
// forwarding. Register 0 is never written and reads as zero: it holds the
// constant x0. Reset (active low, synchronous) clears every register.
// The port names follow the pipeline figure's register file; the write-through
// and the reset are choices of this design.
module phys_regfile #(
  parameter int unsigned NUM_REGS = rename_pkg::NUM_PHYS_REGS,
  parameter int unsigned XLEN     = 32,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [AW-1:0]   ra2,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [AW-1:0]   wa,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [NUM_REGS];

  assign rd1 = (we && wa == ra1 && ra1 != '0) ? wd : regs[ra1];
  assign rd2 = (we && wa == ra2 && ra2 != '0) ? wd : regs[ra2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end
endmodule
