// tb_l0_derandomizer: random Level-0 accepts and pops against a queue
// model; checks the stored identifiers in order, and that an accept into a
// full de-randomizer is dropped and flagged.
module tb_l0_derandomizer;
  import tell1_pkg::*;
  logic clk = 0, rst = 1;
  logic l0a, pop, id_valid, overflow;
  evid_t l0a_id, id;
  int checks = 0, failures = 0, nfull = 0;
  evid_t q[$];
  l0_derandomizer #(.DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    l0a = 0; pop = 0; l0a_id = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 4000; i++) begin
      checks++;
      if (id_valid != (q.size() > 0) || (q.size() > 0 && id != q[0])) begin
        failures++; $display("head mismatch at %0d", i);
      end
      checks++;
      if (overflow != (nfull > 0)) begin failures++; $display("overflow flag"); end
      l0a = ($urandom % 100) < (i < 2000 ? 30 : 70);
      pop = ($urandom % 100) < 40;
      l0a_id = '{evcnt: 24'(i), bcnt: 12'($urandom)};
      @(negedge clk);
      begin
        bit was_full; was_full = (q.size() == 16);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (l0a) begin
          if (!was_full) q.push_back(l0a_id);   // a full FIFO refuses the push
          else nfull++;
        end
      end
    end
    checks++;
    if (nfull == 0) begin failures++; $display("full case never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
