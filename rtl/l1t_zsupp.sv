// l1t_zsupp: Level-1 trigger zero suppression of one link ("L1T ZSupp").
// Every corrected sample whose value is above the ECS threshold becomes a
// hit word {0, channel[4:0], value[9:0]}; negative values never pass.  One
// cycle after the event's last sample an end word {1, 00000, count[9:0]}
// gives the number of hits of the event, so an empty event still produces
// one word; values above 1023 saturate.  The input must leave at least one
// idle cycle after each event's last sample (ped_com does).  Output is registered, one cycle behind the input.  That zero
// suppression follows common-mode correction is the document's; the single
// strip threshold and the word formats are this design's own choices.
module l1t_zsupp (
  input  logic               clk,
  input  logic               rst,
  input  logic               i_valid,
  input  logic               i_first,
  input  logic               i_last,
  input  logic [4:0]         i_chan,
  input  logic signed [11:0] i_val,
  input  logic [9:0]         thr,
  output logic               o_valid,
  output logic [15:0]        o_word,
  output logic               o_end
);
  logic [9:0] cnt;
  logic       end_pend;
  logic       hit;
  logic [9:0] cnt_next;

  always_comb begin
    hit      = i_valid && (i_val > $signed({2'b00, thr}));
    cnt_next = (i_first ? 10'd0 : cnt) + (hit ? 10'd1 : 10'd0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; end_pend <= 1'b0;
      o_valid <= 1'b0; o_word <= '0; o_end <= 1'b0;
    end else begin
      o_valid <= 1'b0; o_end <= 1'b0;
      if (i_valid) cnt <= cnt_next;
      if (end_pend) begin
        o_valid  <= 1'b1; o_end <= 1'b1;
        o_word   <= {1'b1, 5'b0, cnt};
        end_pend <= 1'b0;
      end else if (hit) begin
        o_valid <= 1'b1;
        o_word  <= {1'b0, i_chan, (i_val > 12'sd1023) ? 10'h3ff : i_val[9:0]};
      end
      if (i_valid && i_last) end_pend <= 1'b1;
    end
  end
endmodule
