// hlt_link: HLT link of a PP-FPGA ("HLT Link").
// After a Level-1 accept the event is read from the Level-1 buffer as
// 48-bit memory words.  This block queues them and sends the event to the
// SyncLink-FPGA as one fragment of 16-bit words: a header word (sop) with the
// event number, then each memory word as three 16-bit words, lowest first;
// the last word of the event carries eop.  Output is a valid/ready stream;
// the input FIFO (FIFO_DEPTH memory words) absorbs the read bursts.  The
// memory reads have no back-pressure once started, so hold asks the buffer
// controller not to start a new event while more than HOLD_LEVEL words wait.  Fragment layout and FIFO depth are this design's
// own choices; the document gives the linking into one fragment.
module hlt_link
  import tell1_pkg::*;
#(
  parameter int FIFO_DEPTH = 256,
  parameter int HOLD_LEVEL = 174
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        r_valid,
  input  logic        r_first,
  input  logic        r_last,
  input  logic [47:0] r_data,
  input  logic [15:0] r_evid,
  output logic        o_valid,
  input  logic        o_ready,
  output word_t       o_word,
  output logic        overflow,
  output logic        hold
);
  logic [65:0] f_dout;
  logic f_empty, f_full, f_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_level;
  logic [1:0] part;
  logic hdr_done;
  logic e_first, e_last;
  logic [15:0] e_evid;
  logic [47:0] e_data;

  sync_fifo #(.W(66), .DEPTH(FIFO_DEPTH)) u_f (
    .clk, .rst, .push(r_valid && !f_full), .din({r_first, r_last, r_evid, r_data}),
    .pop(f_pop), .dout(f_dout), .empty(f_empty), .full(f_full), .level(f_level));
  assign hold = f_level > ($bits(f_level))'(HOLD_LEVEL);

  assign {e_first, e_last, e_evid, e_data} = f_dout;

  always_comb begin
    o_valid = !f_empty;
    o_word  = '0;
    if (e_first && !hdr_done) o_word = '{sop: 1'b1, eop: 1'b0, data: e_evid};
    else o_word = '{sop: 1'b0, eop: e_last && (part == 2'd2), data: e_data[16*part +: 16]};
    f_pop = o_valid && o_ready && !(e_first && !hdr_done) && (part == 2'd2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      part <= '0; hdr_done <= 1'b0; overflow <= 1'b0;
    end else begin
      if (r_valid && f_full) overflow <= 1'b1;
      if (o_valid && o_ready) begin
        if (e_first && !hdr_done) hdr_done <= 1'b1;
        else if (part == 2'd2) begin part <= '0; hdr_done <= 1'b0; end
        else part <= part + 1'b1;
      end
    end
  end
endmodule
