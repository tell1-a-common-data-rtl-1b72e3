// framer: builds the IP packet of one complete MEP ("L1T/HLT framer").
// The framer can only start once a MEP is complete, because the header must
// hold the total length.  When a MEP descriptor (MEP ADDR FIFO) and a
// destination address (dest FIFO, filled from TTC broadcasts) are both
// available it
//   1. spends 10 cycles reading the IPv4 part of the header template (words
//      7..16 of the ECS-written header RAM) to form the header checksum, with
//      total length and destination address substituted;
//   2. sends the 17 header words (Ethernet + IPv4) with total length
//      (bytes: 20 + 2 + 2*len), checksum and destination filled in;
//   3. sends one MEP header word {frames, events}: the event count and the
//      number of Ethernet frames, ceil(IP payload bytes / MTU_PAYLOAD), the
//      packet will need;
//   4. streams the MEP's len words from the MEP buffer (one-cycle read
//      latency, one word per cycle), returning each word's space (free_word).
// Then it pops the descriptor and the destination.  Output is a valid/ready
// stream of 16-bit words with sop on the first and eop on the last.  That
// length, frame count and destination are inserted here is the document's;
// the placement of the frame count and the timing are this design's own.
module framer
  import tell1_pkg::*;
#(
  parameter int AW          = 15,
  parameter int HDR_WORDS   = 17,
  parameter int MTU_PAYLOAD = 1480
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         desc_valid,
  input  logic [AW+23:0]               desc,
  output logic                         desc_pop,
  input  logic                         dest_valid,
  input  logic [31:0]                  dest_ip,
  output logic                         dest_pop,
  output logic [$clog2(HDR_WORDS)-1:0] hdr_raddr,
  input  logic [15:0]                  hdr_rdata,
  output logic [AW-1:0]                buf_raddr,
  input  logic [15:0]                  buf_rdata,
  output logic                         free_word,
  output logic                         o_valid,
  input  logic                         o_ready,
  output word_t                        o_word
);
  localparam int HW = $clog2(HDR_WORDS);
  typedef enum logic [2:0] {S_IDLE, S_CSUM, S_HDR, S_MHDR, S_DATA} state_t;
  state_t st;
  logic [AW-1:0] start, rptr;
  logic [15:0]   len, remain;
  logic [7:0]    nev;
  logic [HW-1:0] hidx;
  logic [19:0]   csum;
  logic [15:0]   tot_len, hword, chk, frames;
  logic [16:0]   folded;
  logic          fire;

  assign {start, len, nev} = desc;
  assign tot_len = 16'd22 + {len[14:0], 1'b0};
  assign frames  = 16'((32'(tot_len) - 32'd20 + 32'(MTU_PAYLOAD) - 32'd1) / 32'(MTU_PAYLOAD));
  assign folded  = {1'b0, csum[15:0]} + {13'b0, csum[19:16]};
  assign chk     = ~(folded[15:0] + {15'b0, folded[16]});
  assign fire    = o_valid && o_ready;
  assign hdr_raddr = hidx;

  // header word with the per-packet fields substituted (checksum field 0)
  always_comb begin
    unique case (hidx)
      HW'(8):  hword = tot_len;
      HW'(12): hword = 16'h0;
      HW'(15): hword = dest_ip[31:16];
      HW'(16): hword = dest_ip[15:0];
      default: hword = hdr_rdata;
    endcase
  end

  always_comb begin
    o_valid = 1'b0; o_word = '0; free_word = 1'b0;
    desc_pop = 1'b0; dest_pop = 1'b0;
    buf_raddr = rptr;
    unique case (st)
      S_HDR: begin
        o_valid = 1'b1;
        o_word  = '{sop: hidx == 0, eop: 1'b0, data: (hidx == HW'(12)) ? chk : hword};
      end
      S_MHDR: begin
        o_valid   = 1'b1;
        o_word    = '{sop: 1'b0, eop: 1'b0, data: {frames[7:0], nev}};
        buf_raddr = start;
      end
      S_DATA: begin
        o_valid   = 1'b1;
        o_word    = '{sop: 1'b0, eop: remain == 16'd1, data: buf_rdata};
        free_word = fire;
        buf_raddr = fire ? rptr + 1'b1 : rptr;
        desc_pop  = fire && remain == 16'd1;
        dest_pop  = desc_pop;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; hidx <= '0; csum <= '0; rptr <= '0; remain <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (desc_valid && dest_valid) begin
          st <= S_CSUM; hidx <= HW'(7); csum <= '0;
        end
        S_CSUM: begin
          csum <= csum + 20'(hword);
          if (hidx == HW'(HDR_WORDS-1)) begin st <= S_HDR; hidx <= '0; end
          else hidx <= hidx + 1'b1;
        end
        S_HDR: if (fire) begin
          if (hidx == HW'(HDR_WORDS-1)) st <= S_MHDR;
          else hidx <= hidx + 1'b1;
        end
        S_MHDR: if (fire) begin
          st <= (len == 0) ? S_IDLE : S_DATA; rptr <= start; remain <= len;
        end
        S_DATA: if (fire) begin
          rptr <= rptr + 1'b1; remain <= remain - 1'b1;
          if (remain == 16'd1) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
