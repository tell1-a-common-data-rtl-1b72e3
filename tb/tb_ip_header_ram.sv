// tb_ip_header_ram: writes all 17 header words through the ECS port and
// reads them back, then overwrites some and reads again.
module tb_ip_header_ram;
  logic clk = 0, we;
  logic [4:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [15:0] m [17];
  ip_header_ram #(.WORDS(17)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 17; i++) if (r == 0 || $urandom % 2) begin
        we = 1; waddr = 5'(i); wdata = 16'($urandom); m[i] = wdata; @(negedge clk);
      end
      we = 0;
      for (int i = 0; i < 17; i++) begin
        raddr = 5'(i); #1; checks++;
        if (rdata != m[i]) begin failures++; $display("word %0d", i); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
