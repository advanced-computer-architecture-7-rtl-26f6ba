// async_mem: word-addressed memory with an asynchronous read port and a
// synchronous write port.
//
// Used for the instruction memory and the data memory of the RV32I pipeline.
// WORDS words of 32 bits; adr is a byte address whose bits [AW+1:2] select the
// word (the two low bits are ignored: accesses are whole aligned words). The
// read data rd follows adr in the same cycle; a write (we) takes effect at the
// rising clock edge. The contents are not reset.
module async_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] adr,
  output logic [31:0] rd,
  input  logic        we,
  input  logic [31:0] wd
);
  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = adr[AW+1:2];
  assign rd  = mem[idx];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wd;
  end
endmodule
