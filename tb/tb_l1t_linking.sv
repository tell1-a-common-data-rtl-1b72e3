// tb_l1t_linking: four PP-FPGA source models send fragments with random
// gaps; checks the linked board fragment word by word, the event size
// reported at its end, output back-pressure, and the header check (one
// event carries a wrong event number in PP 2; the check must fire).
module tb_l1t_linking;
  import tell1_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] i_valid, i_ready;
  word_t i_word [4];
  logic o_valid, o_ready, size_push, ev_err;
  word_t o_word; logic [15:0] size;
  int checks = 0, failures = 0, nerr_seen = 0;
  word_t src [4][$];
  word_t q[$]; int sq[$];
  l1t_linking #(.N_PP(4)) dut (.*);
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
    if (size_push) begin
      checks++;
      if (sq.size() == 0 || size != 16'(sq[0])) begin failures++; $display("size %0d", size); end
      else void'(sq.pop_front());
    end
  end
  initial begin
    for (int e = 0; e < 30; e++) begin
      int total; logic [15:0] bc; total = 2;
      bc = 16'((e * 37) % 3564);
      q.push_back('{sop: 1, eop: 0, data: 16'(e + 7)});
      q.push_back('{sop: 0, eop: 0, data: bc});
      for (int p = 0; p < 4; p++) begin
        int n; n = 1 + $urandom % 6;
        src[p].push_back('{sop: 1, eop: 0, data: (e == 13 && p == 2) ? 16'hDEAD : 16'(e + 7)});
        src[p].push_back('{sop: 0, eop: 0, data: bc});
        for (int i = 0; i < n; i++) begin
          word_t w; w = '{sop: 0, eop: i == n-1, data: 16'($urandom)};
          src[p].push_back(w);
          q.push_back('{sop: 0, eop: (i == n-1) && (p == 3), data: w.data});
        end
        total += n;
      end
      sq.push_back(total);
    end
    repeat (3) @(negedge clk); rst = 0;
    repeat (3000) @(negedge clk);
    checks++;
    if (q.size() != 0 || sq.size() != 0 || !ev_err) begin failures++; $display("left %0d %0d err %0b", q.size(), sq.size(), ev_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
