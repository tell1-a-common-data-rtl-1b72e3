// l1b_ctrl: Level-1 buffer controller of a PP-FPGA ("L1B Ctrl").
// All Level-0 accepted data must wait in the Level-1 buffer (L1B), a bank of
// three 16-bit DDR SDRAM chips seen here as one 48-bit memory, until the
// Level-1 decision.  The buffer has a fixed maximum latency, so management
// is trivial: each event owns the slot given by the lower SLOT_BITS bits of
// its Level-0 event number.  A slot holds 2*N_WORDS memory words: each
// 96-bit input word (the same word position of the six links) is written as
// two 48-bit memory words, low half first.
//   Write side: the links have no flow control, so input words go into a
//   small write de-randomizer that covers the cycles spent on refresh and
//   reads.  Read side: each Level-1 accept (event number) is queued; the
//   controller reads the event's 2*N_WORDS words, and the returned data are
//   tagged with first/last.  A new event is only started while r_hold is
//   low (the reader has room for a whole event).  Refresh: every REFRESH_INTERVAL cycles a refresh
//   command occupies the memory for REFRESH_CYCLES cycles.
// Priority is refresh, then write, then read.  The memory port issues one
// command per cycle while mem_ready is high; read data come back on
// mem_rvalid in order, with any latency below 16 commands.  The addressing
// by event number and the write de-randomizer follow the document; the
// memory port replaces the DDR protocol, and the refresh timing and FIFO
// depths are this design's own choices.
module l1b_ctrl #(
  parameter int N_WORDS          = 33,
  parameter int SLOT_BITS        = 16,
  parameter int MEM_W            = 48,
  parameter int WDERAND_DEPTH    = 64,
  parameter int REFRESH_INTERVAL = 936,
  parameter int REFRESH_CYCLES   = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  // write side, from the link synchronisers
  input  logic                    w_valid,
  input  logic                    w_first,
  input  logic [15:0]             w_evid,
  input  logic [2*MEM_W-1:0]      w_word,
  // Level-1 accepts
  input  logic                    l1a_valid,
  input  logic [15:0]             l1a_evid,
  input  logic                    r_hold,
  // memory command port
  input  logic                    mem_ready,
  output logic                    mem_req,
  output logic                    mem_we,
  output logic                    mem_ref,
  output logic [SLOT_BITS+7:0]    mem_addr,
  output logic [MEM_W-1:0]        mem_wdata,
  input  logic                    mem_rvalid,
  input  logic [MEM_W-1:0]        mem_rdata,
  // event read out
  output logic                    r_valid,
  output logic                    r_first,
  output logic                    r_last,
  output logic [MEM_W-1:0]        r_data,
  output logic [15:0]             r_evid,
  output logic                    wfifo_overflow
);
  localparam int NW  = 2 * N_WORDS;
  localparam int EW  = 1 + 16 + 2*MEM_W;
  logic [EW-1:0] wf_dout;
  logic wf_empty, wf_full, wf_pop;
  logic [15:0] l1_dout;
  logic l1_empty, l1_full, l1_pop;
  logic [17:0] tag_dout;
  logic [15:0] revid;
  logic tag_empty;
  logic [$clog2(REFRESH_INTERVAL+1)-1:0] ref_timer;
  logic ref_pend;
  logic [$clog2(REFRESH_CYCLES+1)-1:0] ref_busy;
  logic whalf;
  logic [SLOT_BITS-1:0] wslot;
  logic [6:0] widx;
  logic rd_act;
  logic [SLOT_BITS-1:0] rslot;
  logic [7:0] ridx;
  logic do_ref, do_wr, do_rd, rd_start;
  logic w_first_e;
  logic [15:0] w_evid_e;
  logic [2*MEM_W-1:0] w_word_e;
  logic [SLOT_BITS-1:0] cur_wslot;
  logic [6:0] cur_widx;

  sync_fifo #(.W(EW), .DEPTH(WDERAND_DEPTH)) u_wderand (
    .clk, .rst, .push(w_valid && !wf_full), .din({w_first, w_evid, w_word}),
    .pop(wf_pop), .dout(wf_dout), .empty(wf_empty), .full(wf_full), .level());
  sync_fifo #(.W(16), .DEPTH(16)) u_l1a (
    .clk, .rst, .push(l1a_valid && !l1_full), .din(l1a_evid), .pop(l1_pop), .dout(l1_dout),
    .empty(l1_empty), .full(l1_full), .level());
  sync_fifo #(.W(18), .DEPTH(16)) u_tag (
    .clk, .rst, .push(do_rd), .din({ridx == 8'd0, ridx == 8'(NW-1), revid}),
    .pop(mem_rvalid), .dout(tag_dout), .empty(tag_empty), .full(), .level());

  assign {w_first_e, w_evid_e, w_word_e} = wf_dout;
  assign cur_wslot = (w_first_e && !whalf) ? w_evid_e[SLOT_BITS-1:0] : wslot;
  assign cur_widx  = (w_first_e && !whalf) ? 7'd0 : widx;

  always_comb begin
    do_ref = 1'b0; do_wr = 1'b0; do_rd = 1'b0; rd_start = 1'b0;
    if (mem_ready && ref_busy == 0) begin
      if (ref_pend)       do_ref = 1'b1;
      else if (!wf_empty) do_wr  = 1'b1;
      else if (rd_act)    do_rd  = 1'b1;
    end
    if (!rd_act && !l1_empty && !r_hold) rd_start = 1'b1;
    wf_pop  = do_wr && whalf;
    l1_pop  = rd_start;
    mem_req = do_ref || do_wr || do_rd;
    mem_we  = do_wr;
    mem_ref = do_ref;
    mem_addr  = '0;
    mem_wdata = '0;
    if (do_wr) begin
      mem_addr  = {cur_wslot, cur_widx, whalf};
      mem_wdata = whalf ? w_word_e[2*MEM_W-1:MEM_W] : w_word_e[MEM_W-1:0];
    end else if (do_rd) begin
      mem_addr = {rslot, ridx};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ref_timer <= '0; ref_pend <= 1'b0; ref_busy <= '0;
      whalf <= 1'b0; wslot <= '0; widx <= '0;
      rd_act <= 1'b0; rslot <= '0; revid <= '0; ridx <= '0; wfifo_overflow <= 1'b0;
    end else begin
      if ((w_valid && wf_full) || (l1a_valid && l1_full)) wfifo_overflow <= 1'b1;
      // refresh scheduling
      if (ref_timer == ($bits(ref_timer))'(REFRESH_INTERVAL-1)) begin
        ref_timer <= '0; ref_pend <= 1'b1;
      end else ref_timer <= ref_timer + 1'b1;
      if (do_ref) begin
        ref_pend <= 1'b0;
        ref_busy <= ($bits(ref_busy))'(REFRESH_CYCLES);
      end else if (ref_busy != 0) ref_busy <= ref_busy - 1'b1;
      // writes: two memory words per input word
      if (do_wr) begin
        whalf <= ~whalf;
        if (!whalf) begin wslot <= cur_wslot; widx <= cur_widx; end
        else widx <= cur_widx + 1'b1;
      end
      // reads: one slot per Level-1 accept
      if (rd_start) begin
        rd_act <= 1'b1; rslot <= l1_dout[SLOT_BITS-1:0]; revid <= l1_dout; ridx <= '0;
      end
      if (do_rd) begin
        if (ridx == 8'(NW-1)) rd_act <= 1'b0;
        ridx <= ridx + 1'b1;
      end
    end
  end

  assign r_valid = mem_rvalid;
  assign r_data  = mem_rdata;
  assign r_first = mem_rvalid && tag_dout[17];
  assign r_last  = mem_rvalid && tag_dout[16];
  assign r_evid  = tag_dout[15:0];

  a_tag: assert property (@(posedge clk) disable iff (rst) mem_rvalid |-> !tag_empty);
endmodule
