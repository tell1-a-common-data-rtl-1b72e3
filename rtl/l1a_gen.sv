// l1a_gen: Level-1 accept generator of the SyncLink-FPGA.
// Level-1 decisions arrive by TTC broadcast in the order of the Level-0
// accepts and carry no event number, so this block numbers them: decision n
// belongs to Level-0 event n.  For every positive decision it sends that
// event number (EvCnt) to the PP-FPGAs, which read the event from their
// Level-1 buffers.  One cycle latency.  Counters of decisions and accepts
// are kept for monitoring.  The Level-1 accept distribution is the
// document's; numbering by order is this design's own reading.
module l1a_gen
  import tell1_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               evcnt_rst,
  input  logic               dec_valid,
  input  logic               dec_accept,
  output logic               l1a_valid,
  output logic [EVCNT_W-1:0] l1a_evcnt,
  output logic [EVCNT_W-1:0] n_dec,
  output logic [EVCNT_W-1:0] n_acc
);
  always_ff @(posedge clk) begin
    if (rst || evcnt_rst) begin
      l1a_valid <= 1'b0; l1a_evcnt <= '0; n_dec <= '0; n_acc <= '0;
    end else begin
      l1a_valid <= dec_valid && dec_accept;
      if (dec_valid) begin
        l1a_evcnt <= n_dec;
        n_dec     <= n_dec + 1'b1;
        if (dec_accept) n_acc <= n_acc + 1'b1;
      end
    end
  end
endmodule
