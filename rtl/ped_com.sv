// ped_com: pedestal subtraction, channel masking and common-mode correction
// of the samples of one link ("Ped Com" in the PP-FPGA).
// Each 10-bit sample has its channel's pedestal subtracted (pedestal table
// written through the ECS bus).  Channels whose mask bit is set are left out
// of the common-mode estimate and are output as zero.  The common mode of an
// event is the mean of the pedestal-subtracted unmasked channels (integer
// division, truncated toward zero); it is subtracted from every channel.
// Because the mean is known only after the last sample, an event is stored in
// one half of a ping-pong buffer and read out, corrected, while the next
// event fills the other half.  Output starts one cycle after i_last and
// streams N_CH consecutive samples; o_val is signed.  The three operations
// come from the document; the mean as common-mode estimator and the buffering
// are this design's own choices.  Events must be at least N_CH+1 cycles apart.
module ped_com #(
  parameter int N_CH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              i_valid,
  input  logic              i_first,
  input  logic              i_last,
  input  logic [4:0]        i_chan,
  input  logic [9:0]        i_adc,
  // ECS configuration
  input  logic              cfg_we,
  input  logic [4:0]        cfg_chan,
  input  logic [9:0]        cfg_ped,
  input  logic              cfg_mask,
  // corrected stream
  output logic              o_valid,
  output logic              o_first,
  output logic              o_last,
  output logic [4:0]        o_chan,
  output logic signed [11:0] o_val
);
  localparam int SW = 18;
  logic [9:0]         ped  [N_CH];
  logic               mask [N_CH];
  logic signed [11:0] sbuf [2][N_CH];
  logic               wb;            // bank being written
  logic signed [SW-1:0] sum;
  logic [5:0]         cnt;
  logic signed [11:0] cm;
  logic               rd_act, rb;
  logic [4:0]         rd_idx;

  logic signed [11:0]   sub;
  logic                 use_ch;
  logic signed [SW-1:0] sum_tot;
  logic [5:0]           cnt_tot;

  always_comb begin
    sub     = $signed({2'b00, i_adc}) - $signed({2'b00, ped[i_chan]});
    use_ch  = !mask[i_chan];
    sum_tot = (i_first ? SW'(0) : sum) + (use_ch ? SW'(sub) : SW'(0));
    cnt_tot = (i_first ? 6'd0 : cnt) + (use_ch ? 6'd1 : 6'd0);
  end

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      ped[cfg_chan]  <= cfg_ped;
      mask[cfg_chan] <= cfg_mask;
    end
    if (i_valid) sbuf[wb][i_chan] <= sub;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wb <= 1'b0; sum <= '0; cnt <= '0; cm <= '0;
      rd_act <= 1'b0; rb <= 1'b0; rd_idx <= '0;
      o_valid <= 1'b0; o_first <= 1'b0; o_last <= 1'b0; o_chan <= '0; o_val <= '0;
    end else begin
      if (i_valid) begin
        sum <= sum_tot;
        cnt <= cnt_tot;
        if (i_last) begin
          cm     <= (cnt_tot == 0) ? 12'sd0 : 12'(sum_tot / $signed({1'b0, cnt_tot}));
          rd_act <= 1'b1;
          rb     <= wb;
          rd_idx <= '0;
          wb     <= ~wb;
        end
      end
      o_valid <= rd_act;
      o_first <= rd_act && (rd_idx == 0);
      o_last  <= rd_act && (rd_idx == 5'(N_CH-1));
      o_chan  <= rd_idx;
      o_val   <= mask[rd_idx] ? 12'sd0 : sbuf[rb][rd_idx] - cm;
      if (rd_act) begin
        rd_idx <= rd_idx + 1'b1;
        if (rd_idx == 5'(N_CH-1)) rd_act <= 1'b0;
      end
    end
  end
endmodule
