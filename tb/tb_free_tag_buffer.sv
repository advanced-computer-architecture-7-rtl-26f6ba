// tb_free_tag_buffer: self-checking test of the free tag buffer.
//
// A reference FIFO (an SV queue) is kept next to the design. Each cycle the
// test dequeues a random number of tags (no more than are present) and
// returns, on random ports, tags that were dequeued earlier, so that every
// tag is in exactly one place. head_tag and count are compared with the queue
// before every clock edge. It also checks the reset contents (32, 33, ...),
// an empty buffer and a buffer filled back to all 128 tags.
module tb_free_tag_buffer;
  localparam int unsigned DEPTH = 128, WAYS = 2, FIRST = 32;
  localparam int unsigned TAG_W = 7, CNT_W = 8, NUM_W = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [TAG_W-1:0] head_tag [WAYS];
  logic [NUM_W-1:0] deq_num;
  logic             enq_valid [WAYS];
  logic [TAG_W-1:0] enq_tag   [WAYS];
  logic [CNT_W-1:0] count;

  int checks = 0, failures = 0;
  int unsigned fifo[$];   // reference contents, head first
  int unsigned out[$];    // tags currently allocated
  int saw_empty = 0, saw_full = 0;

  free_tag_buffer #(.DEPTH(DEPTH), .WAYS(WAYS), .FIRST_FREE(FIRST)) dut (.*);

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

  task automatic compare();
    check(int'(count) == fifo.size(), $sformatf("count %0d vs %0d", count, fifo.size()));
    for (int i = 0; i < WAYS; i++)
      if (i < fifo.size())
        check(int'(head_tag[i]) == fifo[i], $sformatf("head_tag[%0d] %0d vs %0d", i, head_tag[i], fifo[i]));
  endtask

  initial begin
    deq_num = '0;
    foreach (enq_valid[i]) begin enq_valid[i] = 1'b0; enq_tag[i] = '0; end
    for (int unsigned t = FIRST; t < DEPTH; t++) fifo.push_back(t);
    for (int unsigned t = 0; t < FIRST; t++) out.push_back(t);  // held by the initial mappings
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(head_tag[0] == 7'd32 && head_tag[1] == 7'd33, "reset head");
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int n, want;
      int phase;
      phase = (cyc / 1000) % 3;   // 0: drain-biased, 1: fill-biased, 2: mixed
      compare();
      // dequeue
      want = $urandom_range(WAYS, 0);
      if (phase == 1 && $urandom_range(7, 0) != 0) want = 0;
      n = (want > fifo.size()) ? fifo.size() : want;
      deq_num = NUM_W'(n);
      // enqueue previously allocated tags
      foreach (enq_valid[i]) begin
        enq_valid[i] = 1'b0;
        if (out.size() > 0 && ($urandom_range(3, 0) == 0 || (phase == 1 && $urandom_range(1, 0) == 1))
            && !(phase == 0 && $urandom_range(3, 0) != 0)) begin
          enq_valid[i] = 1'b1;
          enq_tag[i]   = TAG_W'(out.pop_front());
        end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < n; i++) out.push_back(fifo.pop_front());
      foreach (enq_valid[i]) if (enq_valid[i]) fifo.push_back(int'(enq_tag[i]));
      if (fifo.size() == 0) saw_empty++;
      if (fifo.size() == DEPTH) saw_full++;
      @(negedge clk);
    end
    check(saw_empty > 0, "buffer never ran empty");
    check(saw_full > 0, "buffer never refilled to 128 tags");
    $display("empty cycles %0d, full cycles %0d", saw_empty, saw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
