// l1b_sdram_model: behavioural model of one Level-1 buffer SDRAM bank as the
// controller's memory command port sees it.  Not synthesizable.  Commands
// are taken while mem_ready is high (randomly low one cycle in ten); reads
// return data LAT cycles later, in order; a refresh command makes the bank
// busy for the following REF_CYCLES cycles.  Storage is sparse, so the full
// 96 MByte address range costs only what is written.  Counts refreshes.
module l1b_sdram_model #(
  parameter int AW = 24,
  parameter int DW = 48,
  parameter int LAT = 3,
  parameter int REF_CYCLES = 8
) (
  input  logic          clk,
  output logic          mem_ready,
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic          mem_ref,
  input  logic [AW-1:0] mem_addr,
  input  logic [DW-1:0] mem_wdata,
  output logic          mem_rvalid,
  output logic [DW-1:0] mem_rdata,
  output int            n_ref,
  output int            n_bad
);
  logic [DW-1:0] mem [int];
  logic [LAT-1:0] pv = '0;
  logic [DW-1:0]  pd [LAT];
  int busy = 0;
  initial begin n_ref = 0; n_bad = 0; end
  always @(negedge clk) mem_ready = ($urandom % 10) != 0;
  always @(posedge clk) begin
    pv <= {pv[LAT-2:0], 1'b0};
    for (int i = LAT-1; i > 0; i--) pd[i] <= pd[i-1];
    if (busy > 0) busy <= busy - 1;
    if (mem_req) begin
      if (!mem_ready || busy > 0) n_bad <= n_bad + 1;
      if (mem_ref) begin n_ref <= n_ref + 1; busy <= REF_CYCLES; end
      else if (mem_we) mem[int'(mem_addr)] = mem_wdata;
      else begin
        pv[0] <= 1'b1;
        pd[0] <= mem.exists(int'(mem_addr)) ? mem[int'(mem_addr)] : '0;
      end
    end
  end
  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];
endmodule
