// tb_hlt_link: bursts of 48-bit words (events read from the Level-1 buffer)
// against random output back-pressure; checks header word, the order of the
// three 16-bit parts of each word, sop/eop, that nothing is lost and that
// hold follows the number of queued memory words.
module tb_hlt_link;
  import tell1_pkg::*;
  logic clk = 0, rst = 1;
  logic r_valid, r_first, r_last, o_valid, o_ready, overflow, hold;
  int occ = 0, part = 0, n_hold = 0;
  logic [47:0] r_data; logic [15:0] r_evid;
  word_t o_word;
  int checks = 0, failures = 0;
  word_t q[$];
  hlt_link #(.FIFO_DEPTH(64), .HOLD_LEVEL(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) o_ready = ($urandom % 3) != 0;
  always @(posedge clk) if (!rst) begin
    checks++;
    if (hold != (occ > 4)) begin failures++; $display("hold %b with %0d words", hold, occ); end
    if (hold) n_hold++;
    if (r_valid) occ++;
    if (o_valid && o_ready && !o_word.sop) begin
      part++; if (part == 3) begin part = 0; occ--; end
    end
  end
  always @(posedge clk) if (!rst && o_valid && o_ready) begin
    word_t x;
    checks++;
    if (q.size() == 0) begin failures++; $display("extra"); end
    else begin x = q.pop_front(); if (o_word != x) begin failures++; $display("got %p exp %p", o_word, x); end end
  end
  initial begin
    r_valid = 0; r_first = 0; r_last = 0; r_data = 0; r_evid = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int e = 0; e < 40; e++) begin
      int n; n = 2 + $urandom % 6;
      q.push_back('{sop: 1, eop: 0, data: 16'(e + 100)});
      for (int i = 0; i < n; i++) begin
        r_valid = 1; r_first = (i == 0); r_last = (i == n-1); r_evid = 16'(e + 100);
        r_data = {$urandom, $urandom};
        for (int p = 0; p < 3; p++) q.push_back('{sop: 0, eop: (i == n-1 && p == 2), data: r_data[16*p +: 16]});
        @(negedge clk);
      end
      r_valid = 0;
      repeat (10 + $urandom % 20) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    checks++;
    if (q.size() != 0 || overflow) begin failures++; $display("left %0d", q.size()); end
    checks++; if (n_hold == 0) begin failures++; $display("hold never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
