// tb_event_transfer_ctrl: random events from size and data FIFO models are
// packed into a small ring buffer, first 3 per MEP (the maximum, selected by
// packing = 0), then 2 after a change of the packing input; a framer model frees
// each MEP some time after its descriptor appears.  Checks every descriptor
// (start, length, event count) and the MEP contents in the buffer (length
// word then the event's words), and that events wait while the buffer is
// short of space.
module tb_event_transfer_ctrl;
  import tell1_pkg::*;
  localparam int AW = 6, PK = 3;
  logic clk = 0, rst = 1;
  logic size_valid, size_pop, data_valid, data_pop, mem_we, desc_push, free_word, space_wait;
  logic [15:0] size_in, mem_wdata;
  word_t data_in;
  logic [AW-1:0] mem_addr;
  logic [AW+23:0] desc;
  logic [AW:0] used;
  logic [7:0] packing = 8'd0;
  int checks = 0, failures = 0, nwait = 0, nmep = 0;
  int sizes[$]; word_t data[$];
  logic [15:0] mem [2**AW];
  logic [15:0] expw[$];        // expected buffer words in order
  int next_start = 0, to_free = 0;
  int pending[$];              // lengths of MEPs not yet freed
  event_transfer_ctrl #(.PACKING(PK), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic gate;
  always @(negedge clk) gate = ($urandom % 4) != 0;
  assign size_valid = sizes.size() > 0;
  assign size_in    = sizes.size() > 0 ? 16'(sizes[0]) : 16'h0;
  assign data_valid = data.size() > 0 && gate;
  assign data_in    = data.size() > 0 ? data[0] : '0;
  // framer model: frees a pending MEP one word per cycle, but only every
  // other cycle and after a delay, so the buffer fills up
  always @(negedge clk) free_word = (to_free > 0) && ($urandom % 2);
  always @(posedge clk) if (!rst) begin
    if (space_wait) nwait++;
    if (size_pop) fork begin #1; void'(sizes.pop_front()); end join_none;
    if (data_pop) fork begin #1; void'(data.pop_front()); end join_none;
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (free_word) to_free--;
    if (desc_push) begin
      int len, st, ne; int ws;
      st = int'(desc[AW+23:24]); len = int'(desc[23:8]); ne = int'(desc[7:0]);
      checks++;
      if (st != next_start || ne != (nmep < 6 ? PK : 2)) begin failures++; $display("desc start %0d exp %0d nev %0d", st, next_start, ne); end
      pending.push_back(len);
      nmep++;
      if (nmep == 6) packing <= 8'd2;
      fork begin
        int l0; l0 = len;
        @(negedge clk);  // words written this cycle are visible now
        for (int i = 0; i < l0; i++) begin
          checks++;
          if (expw.size() == 0 || mem[AW'(st + i)] != expw[0]) begin
            failures++; $display("mep word %0d got %h exp %h", i, mem[AW'(st + i)], expw.size() ? expw[0] : 16'hx);
          end
          if (expw.size()) void'(expw.pop_front());
        end
        repeat (30) @(negedge clk);
        to_free += l0;
      end join_none
      next_start = (st + len) % (2**AW);
    end
  end
  initial begin
    for (int e = 0; e < 36; e++) begin
      int n; n = 2 + $urandom % 9;
      sizes.push_back(n);
      expw.push_back(16'(n));
      for (int i = 0; i < n; i++) begin
        word_t w; w = '{sop: i == 0, eop: i == n-1, data: 16'($urandom)};
        data.push_back(w); expw.push_back(w.data);
      end
    end
    repeat (3) @(negedge clk); rst = 0;
    repeat (4000) @(negedge clk);
    checks++;
    if (nmep != 15 || nwait == 0 || expw.size() != 0) begin failures++; $display("meps %0d waits %0d left %0d", nmep, nwait, expw.size()); end
    $display("MEPs %0d, cycles waiting for space %0d", nmep, nwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
