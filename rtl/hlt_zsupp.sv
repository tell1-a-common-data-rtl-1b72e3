// hlt_zsupp: HLT zero suppression and event encapsulation on the
// SyncLink-FPGA ("HLT ZeroSupp, Event Encaps.").
// The HLT fragments of the N_PP PP-FPGAs carry raw data read from the
// Level-1 buffers: after the fragment header, for each word position k
// (k = 0 is the Beetle header, k = 1..N_SAMPLES the samples) the words of
// the LINKS links.  The fragments are read in turn; PP 0's header becomes
// the event header, the other headers are checked against it (ev_err).
// Each sample whose 10-bit value exceeds the threshold becomes two words:
// the address {pp, link, channel} and the value.  Beetle header words are
// dropped.  The last word of the event is the trailer {1, hit count} with
// eop; its length goes to the event size FIFO.  One input word per cycle; a
// hit needs a second cycle for its value word.  That the HLT data are zero
// suppressed at this stage is the document's; threshold compare and word
// formats are this design's own choices.
module hlt_zsupp
  import tell1_pkg::*;
#(
  parameter int N_PP      = 4,
  parameter int LINKS     = 6,
  parameter int N_SAMPLES = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_PP-1:0] i_valid,
  output logic [N_PP-1:0] i_ready,
  input  word_t           i_word [N_PP],
  input  logic [9:0]      thr,
  output logic            o_valid,
  input  logic            o_ready,
  output word_t           o_word,
  output logic            size_push,
  output logic [15:0]     size,
  output logic            ev_err
);
  typedef enum logic [1:0] {S_DATA, S_VALUE, S_TRAIL} state_t;
  state_t st;
  logic [$clog2(N_PP)-1:0] sel;
  logic [2:0]  lnk;
  logic [5:0]  k;
  logic [15:0] evid, cnt, hits;
  logic [9:0]  val;
  word_t w;
  logic v, hit, fwd, last_pend;

  assign w   = i_word[sel];
  assign v   = i_valid[sel];
  assign hit = !w.sop && (k != 0) && (w.data[9:0] > thr);
  // forward: the word goes to the output (header of PP0 or address of a hit)
  assign fwd = (w.sop && sel == 0) || hit;

  always_comb begin
    i_ready = '0; o_valid = 1'b0; o_word = '0; size_push = 1'b0;
    size = cnt + 1'b1;
    unique case (st)
      S_DATA: begin
        i_ready[sel] = fwd ? o_ready : 1'b1;
        o_valid      = v && fwd;
        if (w.sop) o_word = '{sop: 1'b1, eop: 1'b0, data: w.data};
        else       o_word = '{sop: 1'b0, eop: 1'b0,
                              data: 16'({2'(sel), lnk, 5'(k - 6'd1)})};
      end
      S_VALUE: begin
        o_valid = 1'b1;
        o_word  = '{sop: 1'b0, eop: 1'b0, data: {6'b0, val}};
      end
      S_TRAIL: begin
        o_valid   = 1'b1;
        o_word    = '{sop: 1'b0, eop: 1'b1, data: {1'b1, hits[14:0]}};
        size_push = o_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_DATA; sel <= '0; lnk <= '0; k <= '0;
      evid <= '0; cnt <= '0; hits <= '0; val <= '0; ev_err <= 1'b0; last_pend <= 1'b0;
    end else begin
      unique case (st)
        S_DATA: if (v && i_ready[sel]) begin
          if (o_valid) cnt <= cnt + 1'b1;
          if (w.sop) begin
            lnk <= '0; k <= '0;
            if (sel == 0) begin evid <= w.data; hits <= '0; end
            else if (w.data != evid) ev_err <= 1'b1;
          end else begin
            if (lnk == 3'(LINKS-1)) begin lnk <= '0; k <= k + 1'b1; end
            else lnk <= lnk + 1'b1;
            if (hit) begin val <= w.data[9:0]; hits <= hits + 1'b1; end
          end
          if (w.eop && sel != N_PP-1) sel <= sel + 1'b1;
          last_pend <= w.eop && (sel == N_PP-1);
          if (hit) st <= S_VALUE;
          else if (w.eop && sel == N_PP-1) st <= S_TRAIL;
        end
        S_VALUE: if (o_ready) begin
          cnt <= cnt + 1'b1;
          st  <= last_pend ? S_TRAIL : S_DATA;
        end
        S_TRAIL: if (o_ready) begin
          st <= S_DATA; sel <= '0; cnt <= '0;
        end
        default: st <= S_DATA;
      endcase
    end
  end
endmodule
