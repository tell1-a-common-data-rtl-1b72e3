// tb_sync_fifo: random pushes and pops against a queue reference model;
// checks head data, empty/full and the fill level every cycle.  The depth
// is not a power of two so that pointer wrap-around is exercised.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  logic push, pop, empty, full;
  logic [7:0] din, dout;
  localparam int D = 6;
  logic [2:0] level;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  sync_fifo #(.W(8), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || level != q.size()) begin
        failures++; $display("flag mismatch size=%0d level=%0d", q.size(), level);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("data %h exp %h", dout, q[0]); end
      end
      push = ($urandom % 100) < ((i / 500) % 2 ? 70 : 35) && q.size() < D;
      pop  = ($urandom % 2) && q.size() > 0;
      din  = 8'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
