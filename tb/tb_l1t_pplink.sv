// tb_l1t_pplink: six links of random zero-suppressed events; checks the
// linked fragments word by word (event number and bunch counter header
// words, links in order, eop), then stalls
// the output until the de-randomizer passes the throttle level and checks
// that the Level-0 throttle rises, and falls again once drained.
module tb_l1t_pplink;
  import tell1_pkg::*;
  localparam int NL = 6, DW = 128, TH = 80;
  logic clk = 0, rst = 1;
  logic [NL-1:0] hit_valid, hit_end;
  logic [15:0] hit_word [NL];
  logic ev_push; logic [27:0] ev_id;
  logic o_valid, o_ready, l0_throttle, in_overflow;
  word_t o_word;
  int checks = 0, failures = 0, nthr = 0, nwords = 0;
  word_t q[$];
  bit stall = 0;
  l1t_pplink #(.NL(NL), .DERAND_WORDS(DW), .THROTTLE_LEVEL(TH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) o_ready = !stall && ($urandom % 4 != 0);
  always @(posedge clk) if (!rst) begin
    if (l0_throttle) nthr++;
    if (o_valid && o_ready) begin
      word_t x;
      checks++;
      if (q.size() == 0) begin failures++; $display("extra word"); end
      else begin
        x = q.pop_front();
        if (o_word != x) begin failures++; $display("got %p exp %p", o_word, x); end
      end
    end
  end
  task automatic send_event(input int e);
    logic [15:0] w [NL][$];
    int mx = 0;
    ev_id = {12'((e * 97) % 3564), 16'(e * 3 + 1)}; ev_push = 1;
    q.push_back('{sop: 1, eop: 0, data: 16'(e * 3 + 1)});
    q.push_back('{sop: 0, eop: 0, data: {4'h0, 12'((e * 97) % 3564)}});
    for (int l = 0; l < NL; l++) begin
      int n = $urandom % 6;
      for (int h = 0; h < n; h++) w[l].push_back({1'b0, 5'($urandom), 10'($urandom)});
      w[l].push_back({1'b1, 5'b0, 10'(n)});
      for (int h = 0; h <= n; h++) q.push_back('{sop: 0, eop: (l == NL-1 && h == n), data: w[l][h]});
      if (n + 1 > mx) mx = n + 1;
    end
    for (int j = 0; j < mx; j++) begin
      for (int l = 0; l < NL; l++) begin
        hit_valid[l] = j < w[l].size();
        hit_end[l]   = j == w[l].size() - 1;
        hit_word[l]  = j < w[l].size() ? w[l][j] : 16'h0;
      end
      @(negedge clk);
      ev_push = 0;
    end
    hit_valid = '0; hit_end = '0;
  endtask
  initial begin
    hit_valid = '0; hit_end = '0; ev_push = 0; ev_id = 0;
    for (int l = 0; l < NL; l++) hit_word[l] = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int e = 0; e < 30; e++) begin send_event(e); repeat (30) @(negedge clk); end
    checks++;
    if (nthr != 0) begin failures++; $display("throttle without backlog"); end
    stall = 1;
    for (int e = 30; e < 50; e++) begin send_event(e); repeat (10) @(negedge clk); end
    repeat (20) @(negedge clk);
    checks++;
    if (!l0_throttle) begin failures++; $display("no throttle with %0d words waiting", q.size()); end
    stall = 0;
    repeat (2000) @(negedge clk);
    checks++;
    if (l0_throttle || q.size() != 0 || in_overflow) begin failures++; $display("after drain thr %0b left %0d", l0_throttle, q.size()); end
    $display("throttle cycles %0d", nthr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
