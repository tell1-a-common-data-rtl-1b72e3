// syncdata_gen: SyncData generator of the SyncLink-FPGA.
// Presents the oldest event identification from the Level-0 de-randomizer
// to all N_PP PP-FPGAs (sync_valid, sync_data).  Each PP-FPGA answers with a
// one-cycle SyncAck pulse when it has taken the identifier for the event it
// starts; acknowledges are collected and the entry is released (pop) in the
// cycle the last one arrives, after which the next entry is offered.  The
// SyncData/SyncAck signal names are the document's; the handshake is this
// design's own choice.
module syncdata_gen
  import tell1_pkg::*;
#(
  parameter int N_PP = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            id_valid,
  input  evid_t           id,
  output logic            pop,
  output logic            sync_valid,
  output evid_t           sync_data,
  input  logic [N_PP-1:0] sync_ack
);
  logic [N_PP-1:0] seen, all;
  assign sync_valid = id_valid;
  assign sync_data  = id;
  assign all        = seen | sync_ack;
  assign pop        = id_valid && (&all);
  always_ff @(posedge clk) begin
    if (rst || pop) seen <= '0;
    else if (id_valid) seen <= all;
  end
endmodule
