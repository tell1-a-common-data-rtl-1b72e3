// tb_pos3_tx: packets of odd and even length through the POS-PHY Level 3
// transmitter while the packet-available signal toggles; checks the 32-bit
// words, tsop/teop/tmod, odd parity, and that no word is written while
// packet-available was low.
module tb_pos3_tx;
  import tell1_pkg::*;
  logic clk = 0, rst = 1;
  logic i_valid, i_ready, ptpa, tenb, tsop, teop, tprty;
  word_t i_word; logic [31:0] tdat; logic [1:0] tmod;
  int checks = 0, failures = 0, nodd = 0, nstall = 0;
  word_t src[$];
  typedef struct { logic [31:0] d; bit s, e; logic [1:0] m; } t_t;
  t_t q[$];
  pos3_tx dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) ptpa = ($urandom % 5) != 0;
  assign i_valid = src.size() > 0;
  assign i_word  = src.size() > 0 ? src[0] : '0;
  logic ptpa_q;
  always @(posedge clk) begin
    ptpa_q <= ptpa;
    if (!rst && i_valid && i_ready) fork begin #1; void'(src.pop_front()); end join_none;
    if (!rst && !ptpa) nstall++;
    if (!rst && !tenb) begin
      t_t x; checks++;
      if (!ptpa_q) begin failures++; $display("write without ptpa"); end
      if (q.size() == 0) begin failures++; $display("extra"); end
      else begin
        x = q.pop_front();
        if (tdat != x.d || tsop != x.s || teop != x.e || tmod != x.m || tprty != ~^tdat) begin
          failures++; $display("got %h %b%b%0d exp %h %b%b%0d", tdat, tsop, teop, tmod, x.d, x.s, x.e, x.m);
        end
      end
    end
  end
  initial begin
    for (int p = 0; p < 40; p++) begin
      int n; logic [15:0] w [$];
      n = 1 + $urandom % 12; w.delete();
      if (n % 2) nodd++;
      for (int i = 0; i < n; i++) begin
        w.push_back(16'($urandom));
        src.push_back('{sop: i == 0, eop: i == n-1, data: w[i]});
      end
      for (int i = 0; i < n; i += 2)
        if (i + 1 < n) q.push_back('{d: {w[i], w[i+1]}, s: i == 0, e: i + 1 == n-1, m: 2'd0});
        else q.push_back('{d: {w[i], 16'h0}, s: i == 0, e: 1, m: 2'd2});
    end
    repeat (3) @(negedge clk); rst = 0;
    repeat (2000) @(negedge clk);
    checks++;
    if (q.size() != 0 || nodd == 0 || nstall == 0) begin failures++; $display("left %0d %h %0d", q.size(), q[0].d, q[0].e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
