// tb_tell1_top: end-to-end test of the board with small buffers (Level-1
// buffer of 64 slots, 256-word PP de-randomizers, 1 K / 512-word MEP buffers,
// packing 8 and 4, set through the ECS below maxima of 16 and 8) so that output stalls raise the Level-0 and Level-1
// throttles within a short run.  While the HLT output is stalled every event
// is accepted, so the Level-1 throttle must turn accepts into rejects.  The test itself is in tell1_tb_body.svh.
module tb_tell1_top;
  localparam int NEV = 96, L1T_PK = 8, HLT_PK = 4;
  localparam bit STALL = 1;
  localparam int SB = 6;
`include "tell1_tb_body.svh"
  tell1_top #(.SLOT_BITS(SB), .DERAND_WORDS(256), .THROTTLE_LEVEL(160), .L1T_AW(10), .HLT_AW(9),
              .EV_DEPTH(256), .L1T_PACKING(2 * L1T_PK), .HLT_PACKING(2 * HLT_PK)) dut (.*);
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
