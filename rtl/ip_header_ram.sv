// ip_header_ram: Ethernet/IP header template of one output stream ("IP
// Header RAM").  The control system (ECS) writes the WORDS 16-bit words of
// the header: 7 words Ethernet header (destination MAC, source MAC, type)
// and 10 words IPv4 header.  The framer reads it combinationally while it
// fills in the fields that change per packet.  That the header template
// comes from an ECS-written RAM is the document's; its layout is standard
// Ethernet/IPv4.
module ip_header_ram #(
  parameter int WORDS = 17
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [15:0]              wdata,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [15:0]              rdata
);
  logic [15:0] mem [WORDS];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
