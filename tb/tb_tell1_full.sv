// tb_tell1_full: end-to-end test of the board at its default sizes: 288
// events through the Level-1 trigger path (nine MEPs of 32 events) and every
// ninth event accepted at Level 1 (two HLT MEPs of 16 events).  The test
// itself is in tell1_tb_body.svh.
module tb_tell1_full;
  localparam int NEV = 288, L1T_PK = 32, HLT_PK = 16;
  localparam bit STALL = 0;
  localparam int SB = 16;
`include "tell1_tb_body.svh"
  tell1_top dut (.*);
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
