// tb_hlt_zsupp: four PP-FPGA HLT fragments of raw link data (Beetle header
// row then sample rows of six links) per event; checks the encapsulated
// event: header, one address/value pair per sample above threshold in
// input order, trailer with the hit count, the event size and the event
// number check, under random gaps and back-pressure.
module tb_hlt_zsupp;
  import tell1_pkg::*;
  localparam int L = 6, NS = 4;
  logic clk = 0, rst = 1;
  logic [3:0] i_valid, i_ready;
  word_t i_word [4];
  logic [9:0] thr;
  logic o_valid, o_ready, size_push, ev_err;
  word_t o_word; logic [15:0] size;
  int checks = 0, failures = 0, nhits = 0;
  word_t src [4][$];
  word_t q[$]; int sq[$];
  hlt_zsupp #(.N_PP(4), .LINKS(L), .N_SAMPLES(NS)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  for (genvar p = 0; p < 4; p++) begin : g_src
    logic gate;
    always @(negedge clk) gate = ($urandom % 4) != 0;
    assign i_valid[p] = src[p].size() > 0 && gate;
    assign i_word[p]  = src[p].size() > 0 ? src[p][0] : '0;
    always @(posedge clk) if (!rst && i_valid[p] && i_ready[p]) fork begin #1; void'(src[p].pop_front()); end join_none;
  end
  always @(negedge clk) o_ready = ($urandom % 5) != 0;
  always @(posedge clk) if (!rst) begin
    if (o_valid && o_ready) begin
      word_t x; checks++;
      if (q.size() == 0) begin failures++; $display("extra"); end
      else begin x = q.pop_front(); if (o_word != x) begin failures++; $display("got %p exp %p", o_word, x); end end
    end
    if (size_push && o_ready) begin
      checks++;
      if (sq.size() == 0 || size != 16'(sq[0])) begin failures++; $display("size %0d", size); end
      else void'(sq.pop_front());
    end
  end
  initial begin
    thr = 10'd300;
    for (int e = 0; e < 25; e++) begin
      int total, hits; total = 1; hits = 0;
      q.push_back('{sop: 1, eop: 0, data: 16'(e + 50)});
      for (int p = 0; p < 4; p++) begin
        src[p].push_back('{sop: 1, eop: 0, data: (e == 9 && p == 1) ? 16'hBEEF : 16'(e + 50)});
        for (int k = 0; k <= NS; k++)
          for (int l = 0; l < L; l++) begin
            logic [15:0] d; bit last;
            last = (k == NS) && (l == L-1);
            d = (k == 0) ? 16'h0A00 | 16'($urandom % 256) : 16'($urandom % ((e % 5 == 0) ? 300 : 400));
            if (e == 4 && p == 3 && last) d = 16'd350;  // a hit on the very last word
            src[p].push_back('{sop: 0, eop: last, data: d});
            if (k > 0 && d[9:0] > 300) begin
              q.push_back('{sop: 0, eop: 0, data: 16'({2'(p), 3'(l), 5'(k - 1)})});
              q.push_back('{sop: 0, eop: 0, data: {6'b0, d[9:0]}});
              total += 2; hits++;
            end
          end
      end
      q.push_back('{sop: 0, eop: 1, data: {1'b1, 15'(hits)}});
      sq.push_back(total + 1);
      nhits += hits;
    end
    repeat (3) @(negedge clk); rst = 0;
    repeat (6000) @(negedge clk);
    checks++;
    if (q.size() != 0 || sq.size() != 0 || !ev_err || nhits == 0) begin failures++; $display("left %0d %0d err %0b", q.size(), sq.size(), ev_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
