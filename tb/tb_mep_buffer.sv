// tb_mep_buffer: random writes and reads against an array model; checks the
// read data one cycle after the address, including a read of the address
// written in the same cycle (returns the old contents).
module tb_mep_buffer;
  localparam int AW = 8;
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [15:0] m [2**AW];
  logic [15:0] expd;
  mep_buffer #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 1;
    for (int i = 0; i < 2**AW; i++) begin waddr = AW'(i); wdata = 16'($urandom); m[i] = wdata; raddr = 0; @(negedge clk); end
    for (int i = 0; i < 3000; i++) begin
      we = $urandom % 2; waddr = AW'($urandom); wdata = 16'($urandom);
      raddr = (i % 7 == 0) ? waddr : AW'($urandom);
      expd = m[raddr];
      @(negedge clk);
      if (we) m[waddr] = wdata;
      checks++;
      if (rdata != expd) begin failures++; $display("addr %0d got %h exp %h", raddr, rdata, expd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
