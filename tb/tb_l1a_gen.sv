// tb_l1a_gen: random Level-1 decisions; checks that each accept produces,
// one cycle later, the number of its decision (decisions counted from the
// last event counter reset), and the decision and accept counters.
module tb_l1a_gen;
  import tell1_pkg::*;
  logic clk = 0, rst = 1;
  logic evcnt_rst, dec_valid, dec_accept, l1a_valid;
  logic [EVCNT_W-1:0] l1a_evcnt, n_dec, n_acc;
  int checks = 0, failures = 0, md = 0, ma = 0;
  l1a_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    evcnt_rst = 0; dec_valid = 0; dec_accept = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      bit v, a, r; int d;
      v = $urandom % 2; a = $urandom % 3 == 0; r = (i == 1500);
      dec_valid = v; dec_accept = a; evcnt_rst = r; d = md;
      @(negedge clk);
      if (r) begin md = 0; ma = 0; end
      else if (v) begin md++; if (a) ma++; end
      checks++;
      if (l1a_valid != (v && a && !r) || (l1a_valid && l1a_evcnt != 24'(d))) begin
        failures++; $display("l1a %0b %0d exp %0b %0d", l1a_valid, l1a_evcnt, v && a, d);
      end
      checks++;
      if (n_dec != 24'(md) || n_acc != 24'(ma)) begin failures++; $display("counters"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
