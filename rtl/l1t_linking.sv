// l1t_linking: final Level-1 trigger linking on the SyncLink-FPGA
// ("L1T Linking").
// The L1T fragments of the N_PP PP-FPGAs are read in turn, PP 0 first, and
// joined into the board's event fragment: PP 0's two header words (event
// number, then bunch counter) become the board header, the other PPs' two
// header words are dropped after being compared with PP 0's (a mismatch
// sets ev_err), and all
// other words are copied, eop only on the last PP's last word.  When the
// fragment is complete its length in words is pushed to the event size FIFO
// (size_push, size); the words go to the event data FIFO (o_valid, o_ready,
// o_word).  One word per cycle, combinational from input to output.  The
// linking of PP-FPGA data into one board fragment is the document's; the
// order, header handling and the check are this design's own choices.
module l1t_linking
  import tell1_pkg::*;
#(
  parameter int N_PP = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_PP-1:0] i_valid,
  output logic [N_PP-1:0] i_ready,
  input  word_t           i_word [N_PP],
  output logic            o_valid,
  input  logic            o_ready,
  output word_t           o_word,
  output logic            size_push,
  output logic [15:0]     size,
  output logic            ev_err
);
  logic [$clog2(N_PP)-1:0] sel;
  logic [15:0] evid, bc, cnt;
  word_t w;
  logic v, drop, take, second;   // second: next word is the bunch counter word

  assign w    = i_word[sel];
  assign v    = i_valid[sel];
  assign drop = (w.sop || second) && (sel != 0);
  assign take = v && (drop || o_ready);

  always_comb begin
    i_ready      = '0;
    i_ready[sel] = drop || o_ready;
    o_valid      = v && !drop;
    o_word       = '{sop: w.sop, eop: w.eop && (sel == N_PP-1), data: w.data};
    size_push    = take && !drop && w.eop && (sel == N_PP-1);
    size         = cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= '0; evid <= '0; bc <= '0; cnt <= '0; ev_err <= 1'b0; second <= 1'b0;
    end else if (take) begin
      second <= w.sop;
      if (w.sop && sel == 0) evid <= w.data;
      if (second && sel == 0) bc <= w.data;
      if (drop && w.data != (w.sop ? evid : bc)) ev_err <= 1'b1;
      if (!drop) cnt <= cnt + 1'b1;
      if (w.eop) begin
        if (sel == N_PP-1) begin sel <= '0; cnt <= '0; end
        else sel <= sel + 1'b1;
      end
    end
  end
endmodule
