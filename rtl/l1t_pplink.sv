// l1t_pplink: Level-1 trigger linking stage of a PP-FPGA ("L1T PPLink").
// The zero-suppressed words of the NL links are collected in small per-link
// input FIFOs.  For each event, whose bunch counter and number arrive
// through ev_push/ev_id, the linker writes a header word (sop) with the
// event number and a header word with the bunch counter, and then copies
// link 0's hit words and end word, link 1's, and so on; the last link's
// end word carries eop.  Fragments go into the 64 KByte output
// de-randomizer (DERAND_WORDS 16-bit words plus flags) that smooths events of
// high occupancy over the link to the SyncLink-FPGA.  When its fill level
// exceeds THROTTLE_LEVEL the Level-0 throttle is raised so that no more
// events are accepted; the remaining space absorbs events already accepted.
// The linker moves one word per cycle and waits when an input is empty or
// the de-randomizer is full.  The output is a first-word-fall-through
// valid/ready stream.  Buffer size and throttle are the document's; the
// threshold and the fragment layout are this design's own choices.
module l1t_pplink
  import tell1_pkg::*;
#(
  parameter int NL             = 6,
  parameter int IN_DEPTH       = 64,
  parameter int DERAND_WORDS   = 32768,
  parameter int THROTTLE_LEVEL = 28672
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NL-1:0]    hit_valid,
  input  logic [15:0]      hit_word [NL],
  input  logic [NL-1:0]    hit_end,
  input  logic             ev_push,
  input  logic [27:0]      ev_id,     // {bunch counter, event number}
  output logic             o_valid,
  input  logic             o_ready,
  output word_t            o_word,
  output logic             l0_throttle,
  output logic             in_overflow
);
  localparam int LW = $clog2(DERAND_WORDS+1);
  logic [16:0] in_dout [NL];
  logic [NL-1:0] in_empty, in_full, in_pop;
  logic [27:0] id_dout;
  logic id_empty, id_pop;
  logic d_push, d_full, d_empty;
  word_t d_din;
  logic [LW-1:0] d_level;
  logic [1:0] hdr_phase;   // 2: event number word, 1: bunch counter word
  logic [$clog2(NL)-1:0] lsel;
  logic busy;
  logic [16:0] cur;

  for (genvar i = 0; i < NL; i++) begin : g_in
    sync_fifo #(.W(17), .DEPTH(IN_DEPTH)) u_in (
      .clk, .rst, .push(hit_valid[i] && !in_full[i]), .din({hit_end[i], hit_word[i]}),
      .pop(in_pop[i]), .dout(in_dout[i]), .empty(in_empty[i]), .full(in_full[i]), .level());
  end

  sync_fifo #(.W(28), .DEPTH(16)) u_id (
    .clk, .rst, .push(ev_push), .din(ev_id), .pop(id_pop), .dout(id_dout),
    .empty(id_empty), .full(), .level());

  sync_fifo #(.W($bits(word_t)), .DEPTH(DERAND_WORDS)) u_derand (
    .clk, .rst, .push(d_push), .din(d_din), .pop(o_valid && o_ready), .dout(o_word),
    .empty(d_empty), .full(d_full), .level(d_level));

  assign o_valid = !d_empty;
  assign cur     = in_dout[lsel];

  always_comb begin
    d_push = 1'b0; d_din = '0; id_pop = 1'b0; in_pop = '0;
    if (busy && !d_full) begin
      if (hdr_phase == 2'd2) begin
        d_push = 1'b1;
        d_din  = '{sop: 1'b1, eop: 1'b0, data: id_dout[15:0]};
      end else if (hdr_phase == 2'd1) begin
        d_push = 1'b1;
        d_din  = '{sop: 1'b0, eop: 1'b0, data: {4'h0, id_dout[27:16]}};
        id_pop = 1'b1;
      end else if (!in_empty[lsel]) begin
        d_push       = 1'b1;
        d_din        = '{sop: 1'b0, eop: cur[16] && (lsel == NL-1), data: cur[15:0]};
        in_pop[lsel] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; hdr_phase <= '0; lsel <= '0;
      l0_throttle <= 1'b0; in_overflow <= 1'b0;
    end else begin
      l0_throttle <= (d_level > LW'(THROTTLE_LEVEL));
      if (|(hit_valid & in_full)) in_overflow <= 1'b1;
      if (!busy) begin
        if (!id_empty) begin busy <= 1'b1; hdr_phase <= 2'd2; lsel <= '0; end
      end else if (d_push) begin
        if (hdr_phase != 0) hdr_phase <= hdr_phase - 1'b1;
        else if (cur[16]) begin
          if (lsel == NL-1) begin busy <= 1'b0; lsel <= '0; end
          else lsel <= lsel + 1'b1;
        end
      end
    end
  end
endmodule
