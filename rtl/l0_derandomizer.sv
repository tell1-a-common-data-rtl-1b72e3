// l0_derandomizer: Level-0 de-randomizer of the SyncLink-FPGA.
// At every Level-0 accept the event identification (Level-0 event counter
// and bunch counter) is stored, so the PP-FPGAs can later tag the event's
// data with it.  A DEPTH-entry FIFO; an accept that finds it full is dropped
// and sets the sticky overflow flag.  First-word-fall-through output,
// removed with pop.  Storing the counters at each accept is the document's;
// the depth is this design's own choice.
module l0_derandomizer
  import tell1_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  l0a,
  input  evid_t l0a_id,
  input  logic  pop,
  output logic  id_valid,
  output evid_t id,
  output logic  overflow
);
  logic empty, full;
  sync_fifo #(.W($bits(evid_t)), .DEPTH(DEPTH)) u_f (
    .clk, .rst, .push(l0a && !full), .din(l0a_id), .pop(pop && !empty), .dout(id),
    .empty(empty), .full(full), .level());
  assign id_valid = !empty;
  always_ff @(posedge clk) begin
    if (rst) overflow <= 1'b0;
    else if (l0a && full) overflow <= 1'b1;
  end
endmodule
