// tb_syncdata_gen: four PP-FPGA models acknowledge each offered identifier
// at random times; checks that every identifier is offered until the last
// acknowledge, released in the same cycle, and that all arrive in order.
module tb_syncdata_gen;
  import tell1_pkg::*;
  logic clk = 0, rst = 1;
  logic id_valid, pop, sync_valid;
  evid_t id, sync_data;
  logic [3:0] sync_ack;
  int checks = 0, failures = 0, nrel = 0;
  evid_t q[$]; logic [3:0] acked;
  syncdata_gen #(.N_PP(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  assign id_valid = q.size() > 0;
  assign id = (q.size() > 0) ? q[0] : '0;
  initial begin
    sync_ack = 0; acked = 0;
    for (int i = 0; i < 50; i++) q.push_back('{evcnt: 24'(i), bcnt: 12'($urandom)});
    repeat (3) @(negedge clk); rst = 0;
    while (q.size() > 0) begin
      logic [3:0] a;
      a = 4'($urandom) & ~acked;
      sync_ack = a;
      #1;
      checks++;
      if (!sync_valid || sync_data != q[0]) begin failures++; $display("offer mismatch"); end
      checks++;
      if (pop != ((acked | a) == 4'hF)) begin failures++; $display("pop %0b acked %b a %b", pop, acked, a); end
      @(negedge clk);
      if ((acked | a) == 4'hF) begin acked = 0; void'(q.pop_front()); nrel++; end
      else acked |= a;
    end
    sync_ack = 0;
    checks++;
    if (nrel != 50) begin failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
