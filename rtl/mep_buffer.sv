// mep_buffer: MEP buffer memory of the SyncLink-FPGA.
// Simple dual-port RAM of 2**AW 16-bit words: one write port used by the
// event transfer controller, one read port used by the framer with one cycle
// read latency.  64 KByte (AW = 15) for the Level-1 trigger stream as in the
// document; the document's HLT buffer of 1 MByte is an external QDR SRAM,
// built here as the same array with AW = 19.
module mep_buffer #(
  parameter int AW = 15
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata
);
  logic [15:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
