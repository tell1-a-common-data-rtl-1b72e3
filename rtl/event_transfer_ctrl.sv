// event_transfer_ctrl: assembles Multi Event Packets (MEPs) in the MEP
// buffer ("Event transfer Ctrl" of the SyncLink-FPGA).
// To keep the packet rate on the readout network low, several events are
// sent in one MEP: the packing factor is the run-time input packing, from
// 1 up to the maximum PACKING (0 or a larger value selects PACKING).  For each event whose length is in the event size FIFO,
// this block checks that the MEP buffer (2**AW 16-bit words, used as a ring)
// has room, writes the event length word and then copies the event's words
// from the event data FIFO, one word per cycle.  After `packing` events the
// MEP is complete and its descriptor {start address, length in words, event
// count} is pushed into the MEP ADDR FIFO for the framer.  The framer
// returns the space of words it has read through free_word.  Multi event
// packing, the adjustable packing factor and its maximum (32 for Level-1,
// 16 for HLT) are the document's; the length word per event and the space accounting are this
// design's own choices.
module event_transfer_ctrl
  import tell1_pkg::*;
#(
  parameter int PACKING = 32,
  parameter int AW      = 15
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        packing,
  input  logic              size_valid,
  input  logic [15:0]       size_in,
  output logic              size_pop,
  input  logic              data_valid,
  input  word_t             data_in,
  output logic              data_pop,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [15:0]       mem_wdata,
  output logic              desc_push,
  output logic [AW+23:0]    desc,      // {start[AW-1:0], len[15:0], nev[7:0]}
  input  logic              free_word,
  output logic [AW:0]       used,
  output logic              space_wait  // an event waits for buffer space
);
  typedef enum logic {S_IDLE, S_COPY} state_t;
  state_t st;
  logic [AW-1:0] wp, mep_start;
  logic [15:0]   remain, mep_len;
  logic [7:0]    nev;
  logic          fits, ev_done;
  logic [7:0]    pk;

  localparam int UW = AW + 2;
  assign fits = ({1'b0, used} + UW'(size_in) + UW'(1)) <= UW'(2**AW);

  always_comb begin
    size_pop = 1'b0; data_pop = 1'b0; mem_we = 1'b0; mem_addr = wp; mem_wdata = '0;
    ev_done = 1'b0;
    if (st == S_IDLE) begin
      if (size_valid && fits) begin
        size_pop = 1'b1; mem_we = 1'b1; mem_wdata = size_in;
      end
    end else if (data_valid) begin
      data_pop = 1'b1; mem_we = 1'b1; mem_wdata = data_in.data;
      ev_done = (remain == 16'd1);
    end
    pk        = (packing == 8'd0 || 32'(packing) > PACKING) ? 8'(PACKING) : packing;
    desc_push = ev_done && ({1'b0, nev} + 9'd1 >= {1'b0, pk});
    desc      = {mep_start, mep_len + 16'd1, nev + 8'd1};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; wp <= '0; mep_start <= '0; remain <= '0; mep_len <= '0;
      nev <= '0; used <= '0; space_wait <= 1'b0;
    end else begin
      used <= used + (AW+1)'(mem_we) - (AW+1)'(free_word);
      if (mem_we) begin
        wp <= wp + 1'b1;
        mep_len <= mep_len + 1'b1;
      end
      space_wait <= (st == S_IDLE) && size_valid && !fits;
      if (size_pop) begin
        st <= S_COPY; remain <= size_in;
        if (nev == 0) begin mep_start <= wp; mep_len <= 16'd1; end
      end
      if (data_pop) remain <= remain - 1'b1;
      if (ev_done) begin
        st <= S_IDLE;
        if (desc_push) begin nev <= '0; mep_len <= '0; end
        else nev <= nev + 1'b1;
      end
    end
  end
endmodule
