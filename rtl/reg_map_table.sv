// reg_map_table: register map table of the rename stage.
//
// One entry per logical register (32 entries of 7 bits by default) holds the
// ID of the physical register the logical register is currently renamed to,
// plus a valid bit. The table has RD_PORTS combinational read ports and
// WR_PORTS write ports; an n-way rename stage needs 2n read ports (two source
// operands per instruction) and n write ports (one destination each), so the
// 2-way default is the "4R, 2W" table of the reference organisation.
//
// Valid bit: when set, the logical register has been renamed and its value is
// (or will be) in the physical register named by the entry. When clear, the
// logical register is not renamed and its value is read from the logical
// register file itself. RESET_RENAMED selects the state after reset:
//   1: entry i holds tag i with valid set (x0..x31 start in p0..p31);
//   0: every valid bit is clear (no register renamed yet).
// The clear port drops the valid bit of an entry when the physical register
// it names has been written back to the logical register file, but only if
// the entry still names that tag (no younger rename of the same register);
// when a clear and a write hit the same entry in one cycle, the write wins.
// The clear rule is a choice of this design; the entry width, entry count and
// the valid bit follow the reference organisation.
//
// Writes take effect at the rising clock edge. When several write ports hit
// the same entry in one cycle, the highest-numbered port wins, so ports must be
// given in program order (port 0 oldest). Reads are not bypassed: a read in
// the same cycle as a write returns the old contents (the rename stage does
// its own bypassing within a group).
module reg_map_table #(
  parameter int unsigned NUM_LOG       = rename_pkg::NUM_LOG_REGS,
  parameter int unsigned TAG_W         = rename_pkg::TAG_W,
  parameter int unsigned RD_PORTS      = 4,
  parameter int unsigned WR_PORTS      = 2,
  parameter bit          RESET_RENAMED = 1'b1,
  localparam int unsigned LOG_W        = $clog2(NUM_LOG)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LOG_W-1:0] rd_addr  [RD_PORTS],
  output logic [TAG_W-1:0] rd_tag   [RD_PORTS],
  output logic             rd_valid [RD_PORTS],
  input  logic             wr_en    [WR_PORTS],
  input  logic [LOG_W-1:0] wr_addr  [WR_PORTS],
  input  logic [TAG_W-1:0] wr_tag   [WR_PORTS],
  input  logic             clr_en   [WR_PORTS],
  input  logic [LOG_W-1:0] clr_addr [WR_PORTS],
  input  logic [TAG_W-1:0] clr_tag  [WR_PORTS]
);
  logic [TAG_W-1:0] map   [NUM_LOG];
  logic             valid [NUM_LOG];

  always_comb begin
    for (int unsigned r = 0; r < RD_PORTS; r++) begin
      rd_tag[r]   = map[rd_addr[r]];
      rd_valid[r] = valid[rd_addr[r]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_LOG; i++) begin
        map[i]   <= TAG_W'(i);
        valid[i] <= RESET_RENAMED;
      end
    end else begin
      for (int unsigned w = 0; w < WR_PORTS; w++)
        if (clr_en[w] && map[clr_addr[w]] == clr_tag[w]) valid[clr_addr[w]] <= 1'b0;
      for (int unsigned w = 0; w < WR_PORTS; w++) begin
        if (wr_en[w]) begin
          map[wr_addr[w]]   <= wr_tag[w];
          valid[wr_addr[w]] <= 1'b1;
        end
      end
    end
  end
endmodule
