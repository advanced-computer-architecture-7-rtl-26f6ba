// free_tag_buffer: FIFO of the IDs of physical registers that are not allocated.
//
// The rename stage takes new destination tags from the head of this FIFO
// (dequeue) and tags of physical registers that are no longer needed are
// written at the tail (enqueue). The FIFO is DEPTH entries of TAG_W bits
// (128 x 7 bits by default, one entry for every physical register, so it can
// never overflow while each tag is in at most one place).
//
// Up to WAYS tags can leave and up to WAYS tags can arrive in one cycle, so an
// n-way rename stage can allocate n tags at once. The WAYS tags at the head
// are always visible on head_tag[0..WAYS-1] (head_tag[0] is the oldest); the
// user says how many of them it takes with deq_num, and must not take more
// than count. Enqueue requests are packed in port order: the valid ones are
// written at tail, tail+1, ... in the order of their port index.
//
// Reset: the FIFO holds the tags FIRST_FREE, FIRST_FREE+1, ..., DEPTH-1, head
// first. With the default FIRST_FREE = 32 the physical registers p0..p31 hold
// the initial values of x0..x31 and p32..p127 are free. The reset contents and
// the packing of several enqueues are choices of this design; the FIFO
// organisation with head and tail pointers follows the reference organisation.
//
// Timing: head_tag and count are read from registers; dequeue and enqueue take
// effect at the next rising clock edge. Active-low synchronous reset.
module free_tag_buffer #(
  parameter int unsigned DEPTH      = rename_pkg::NUM_PHYS_REGS,
  parameter int unsigned TAG_W      = $clog2(DEPTH),
  parameter int unsigned WAYS       = 2,
  parameter int unsigned FIRST_FREE = rename_pkg::NUM_LOG_REGS,
  localparam int unsigned PTR_W     = $clog2(DEPTH),
  localparam int unsigned CNT_W     = $clog2(DEPTH + 1),
  localparam int unsigned NUM_W     = $clog2(WAYS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // dequeue side (allocation)
  output logic [TAG_W-1:0] head_tag [WAYS],
  input  logic [NUM_W-1:0] deq_num,
  // enqueue side (release)
  input  logic             enq_valid [WAYS],
  input  logic [TAG_W-1:0] enq_tag   [WAYS],
  // occupancy
  output logic [CNT_W-1:0] count
);
  logic [TAG_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0] head, tail;
  logic [CNT_W-1:0] enq_num;

  // pointer arithmetic modulo DEPTH (DEPTH need not be a power of two)
  function automatic logic [PTR_W-1:0] wrap(input int unsigned base, input int unsigned off);
    return PTR_W'((base + off) % DEPTH);
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < WAYS; i++) head_tag[i] = mem[wrap(32'(head), i)];
  end

  always_comb begin
    enq_num = '0;
    for (int unsigned i = 0; i < WAYS; i++) enq_num = enq_num + CNT_W'(enq_valid[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++)
        mem[i] <= TAG_W'((FIRST_FREE + i) % DEPTH);
      head  <= '0;
      tail  <= PTR_W'((DEPTH - FIRST_FREE) % DEPTH);
      count <= CNT_W'(DEPTH - FIRST_FREE);
    end else begin
      int unsigned k;
      k = 0;
      for (int unsigned i = 0; i < WAYS; i++) begin
        if (enq_valid[i]) begin
          mem[wrap(32'(tail), k)] <= enq_tag[i];
          k++;
        end
      end
      head  <= wrap(32'(head), int'(deq_num));
      tail  <= wrap(32'(tail), int'(enq_num));
      count <= count - CNT_W'(deq_num) + enq_num;
    end
  end

  // A user may take only tags that are present and may not return more tags
  // than there is room for.
  assert property (@(posedge clk) disable iff (!rst_n) CNT_W'(deq_num) <= count)
    else $error("free_tag_buffer: dequeue of %0d tags with %0d present", deq_num, count);
  assert property (@(posedge clk) disable iff (!rst_n)
                   (32'(count) - 32'(deq_num) + 32'(enq_num)) <= DEPTH)
    else $error("free_tag_buffer: overflow");
endmodule
