// bcast_cmd: TTC broadcast command decoder and local event counters
// ("Broad Cast CMD" on the SyncLink-FPGA).
// The TTC receiver delivers the Level-0 accept, short broadcasts (6 bits
// with a strobe) and long (addressed) broadcasts (sub-address and data byte
// with a strobe).  This block keeps a local copy of the LHC bunch counter
// (wraps after BCNT_MAX) and of the Level-0 event counter (counts accepts),
// and decodes:
//   short  bit0: bunch counter reset, bit1: event counter reset,
//          bit2: Level-1 decision, with bit3 = accept;
//   long   sub-address 0x30: Level-1 decision, data bit0 = accept;
//          0x10..0x13 / 0x20..0x23: bytes 3..0 of the IP destination of the
//          next L1T / HLT MEP, delivered (dest_*_push) with the last byte.
// evcnt_l0 is the number the current Level-0 accept gets (the counter before
// it increments).  All outputs are registered, one cycle after the input.
// That resets, Level-1 decisions and destinations come by TTC broadcast is
// the document's; the bit and sub-address encodings are this design's own.
module bcast_cmd
  import tell1_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               l0_accept,
  input  logic               brcst_str,
  input  logic [5:0]         brcst,
  input  logic               lb_str,
  input  logic [7:0]         lb_sub,
  input  logic [7:0]         lb_data,
  output logic [BCNT_W-1:0]  bcnt,
  output logic [EVCNT_W-1:0] evcnt,
  output logic               l0a,
  output evid_t              l0a_id,
  output logic               l1_dec_valid,
  output logic               l1_dec_accept,
  output logic               dest_l1t_push,
  output logic               dest_hlt_push,
  output logic [31:0]        dest_ip
);
  logic [23:0] ip_l1t, ip_hlt;
  logic bc_rst, ev_rst;

  assign bc_rst = brcst_str && brcst[0];
  assign ev_rst = brcst_str && brcst[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt <= '0; evcnt <= '0; l0a <= 1'b0; l0a_id <= '0;
      l1_dec_valid <= 1'b0; l1_dec_accept <= 1'b0;
      dest_l1t_push <= 1'b0; dest_hlt_push <= 1'b0; dest_ip <= '0;
      ip_l1t <= '0; ip_hlt <= '0;
    end else begin
      bcnt <= bc_rst ? '0 : (bcnt == BCNT_W'(BCNT_MAX)) ? '0 : bcnt + 1'b1;
      l0a  <= l0_accept;
      if (l0_accept) l0a_id <= '{evcnt: ev_rst ? '0 : evcnt, bcnt: bc_rst ? '0 : bcnt};
      if (ev_rst)         evcnt <= l0_accept ? EVCNT_W'(1) : '0;
      else if (l0_accept) evcnt <= evcnt + 1'b1;
      l1_dec_valid  <= 1'b0;
      dest_l1t_push <= 1'b0;
      dest_hlt_push <= 1'b0;
      if (brcst_str && brcst[2]) begin
        l1_dec_valid <= 1'b1; l1_dec_accept <= brcst[3];
      end else if (lb_str && lb_sub == 8'h30) begin
        l1_dec_valid <= 1'b1; l1_dec_accept <= lb_data[0];
      end
      if (lb_str) begin
        unique case (lb_sub)
          8'h10: ip_l1t[23:16] <= lb_data;
          8'h11: ip_l1t[15:8]  <= lb_data;
          8'h12: ip_l1t[7:0]   <= lb_data;
          8'h13: begin dest_ip <= {ip_l1t, lb_data}; dest_l1t_push <= 1'b1; end
          8'h20: ip_hlt[23:16] <= lb_data;
          8'h21: ip_hlt[15:8]  <= lb_data;
          8'h22: ip_hlt[7:0]   <= lb_data;
          8'h23: begin dest_ip <= {ip_hlt, lb_data}; dest_hlt_push <= 1'b1; end
          default: ;
        endcase
      end
    end
  end
endmodule
