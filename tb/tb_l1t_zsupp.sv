// tb_l1t_zsupp: random corrected samples (with gaps between events) against
// a threshold; checks each hit word (channel, saturated value), the end word
// with the hit count, one-cycle latency and empty events.
module tb_l1t_zsupp;
  logic clk = 0, rst = 1;
  logic i_valid, i_first, i_last, o_valid, o_end;
  logic [4:0] i_chan;
  logic signed [11:0] i_val;
  logic [9:0] thr;
  logic [15:0] o_word;
  int checks = 0, failures = 0, cyc = 0, nempty = 0, nsat = 0;
  typedef struct { logic [15:0] w; bit e; int t; } ex_t;
  ex_t q[$];
  l1t_zsupp dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (!rst) begin
    #1;
    if (o_valid) begin
      ex_t x;
      checks++;
      if (q.size() == 0) begin failures++; $display("extra output"); end
      else begin
        x = q.pop_front();
        if (o_word != x.w || o_end != x.e || cyc != x.t) begin
          failures++; $display("got %h/%0b t%0d exp %h/%0b t%0d", o_word, o_end, cyc, x.w, x.e, x.t);
        end
      end
    end
  end
  initial begin
    i_valid = 0; i_first = 0; i_last = 0; i_chan = 0; i_val = 0; thr = 10'd40;
    repeat (3) @(negedge clk); rst = 0;
    for (int e = 0; e < 60; e++) begin
      int n; n = 0;
      for (int c = 0; c < 32; c++) begin
        int v;
        v = (e % 10 == 3) ? int'($urandom % 80) - 60 : int'($urandom % 140) - 50;
        if (e % 10 == 7 && c == 5) v = 1500;
        i_valid = 1; i_first = (c == 0); i_last = (c == 31); i_chan = 5'(c); i_val = 12'(v);
        if (v > 40) begin
          q.push_back('{w: {1'b0, 5'(c), v > 1023 ? 10'h3ff : 10'(v)}, e: 0, t: cyc + 1});
          n++; if (v > 1023) nsat++;
        end
        if (c == 31) q.push_back('{w: {1'b1, 5'b0, 10'(n)}, e: 1, t: cyc + 2});
        @(negedge clk);
      end
      if (n == 0) nempty++;
      i_valid = 0; i_first = 0; i_last = 0;
      repeat (1 + e % 3) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || nempty == 0 || nsat == 0) begin failures++; $display("left %0d empty %0d sat %0d", q.size(), nempty, nsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
