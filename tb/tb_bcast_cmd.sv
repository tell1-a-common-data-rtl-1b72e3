// tb_bcast_cmd: checks the bunch counter (count, wrap at 3564, reset), the
// event counter and the identifier captured at each Level-0 accept, Level-1
// decisions from short and long broadcasts, and the assembly of L1T and HLT
// IP destinations from long broadcasts.
module tb_bcast_cmd;
  import tell1_pkg::*;
  logic clk = 0, rst = 1;
  logic l0_accept, brcst_str, lb_str;
  logic [5:0] brcst; logic [7:0] lb_sub, lb_data;
  logic [BCNT_W-1:0] bcnt; logic [EVCNT_W-1:0] evcnt;
  logic l0a, l1_dec_valid, l1_dec_accept, dest_l1t_push, dest_hlt_push;
  evid_t l0a_id; logic [31:0] dest_ip;
  int checks = 0, failures = 0;
  int mb = 0, me = 0;    // model counters
  bcast_cmd dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic tick(input bit a, input bit bres, input bit eres);
    int eb, ee;
    l0_accept = a; brcst_str = bres | eres; brcst = {4'b0, eres, bres};
    eb = bres ? 0 : mb; ee = eres ? 0 : me;
    @(negedge clk);
    chk(l0a == a, "l0a");
    if (a) chk(l0a_id.bcnt == 12'(eb) && l0a_id.evcnt == 24'(ee), $sformatf("id %0d/%0d exp %0d/%0d", l0a_id.bcnt, l0a_id.evcnt, eb, ee));
    mb = bres ? 0 : (mb == 3563 ? 0 : mb + 1);
    me = eres ? (a ? 1 : 0) : me + (a ? 1 : 0);
    chk(bcnt == 12'(mb) && evcnt == 24'(me), $sformatf("counters %0d %0d exp %0d %0d", bcnt, evcnt, mb, me));
    l0_accept = 0; brcst_str = 0; brcst = 0;
  endtask
  task automatic lb(input logic [7:0] s, input logic [7:0] d);
    lb_str = 1; lb_sub = s; lb_data = d; @(negedge clk); lb_str = 0;
  endtask
  initial begin
    l0_accept = 0; brcst_str = 0; brcst = 0; lb_str = 0; lb_sub = 0; lb_data = 0;
    repeat (2) @(negedge clk); rst = 0;
    // synchronise model with a bunch counter reset and event counter reset
    tick(0, 1, 1);
    for (int i = 0; i < 8000; i++) tick(($urandom % 5) == 0, i == 5000, i == 6000);
    // short broadcast Level-1 decisions
    for (int i = 0; i < 20; i++) begin
      bit acc = $urandom % 2;
      brcst_str = 1; brcst = {2'b0, acc, 1'b1, 2'b0}; @(negedge clk); brcst_str = 0; brcst = 0;
      chk(l1_dec_valid && l1_dec_accept == acc, "short L1 decision");
      @(negedge clk); chk(!l1_dec_valid, "decision pulse");
    end
    // long broadcast Level-1 decision
    lb(8'h30, 8'h01); chk(l1_dec_valid && l1_dec_accept, "long L1 accept");
    lb(8'h30, 8'h00); chk(l1_dec_valid && !l1_dec_accept, "long L1 reject");
    // destinations
    lb(8'h10, 8'd10); lb(8'h11, 8'd1); lb(8'h12, 8'd2);
    chk(!dest_l1t_push, "no early push");
    lb(8'h13, 8'd33); chk(dest_l1t_push && !dest_hlt_push && dest_ip == {8'd10, 8'd1, 8'd2, 8'd33}, "L1T dest");
    lb(8'h20, 8'd192); lb(8'h21, 8'd168); lb(8'h22, 8'd7); lb(8'h23, 8'd9);
    chk(dest_hlt_push && !dest_l1t_push && dest_ip == {8'd192, 8'd168, 8'd7, 8'd9}, "HLT dest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
