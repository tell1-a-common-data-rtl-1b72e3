// pp_fpga: one pre-processing FPGA of the board, reading NL optical links.
// Per link: link_sync frames the data, either with the reference Beetle
// data valid (checking the PCN) or, for links of other front-end chips, with
// the link's own data valid link_dv (checking the event counter bits against
// the offered event number); the ECS mode bit selects the link type; ped_com subtracts pedestals and common mode; l1t_zsupp
// zero-suppresses for the Level-1 trigger.  l1t_pplink links the six links'
// hits per event into the 64 KByte output de-randomizer towards the
// SyncLink-FPGA and raises the Level-0 throttle.  In parallel the raw
// synchronised words of all six links (one 96-bit word per word position)
// go to l1b_ctrl, which keeps them in the Level-1 buffer at the slot of the
// event number and reads them back on Level-1 accept into hlt_link.
// The event number comes from the SyncLink-FPGA: the identifier offered on
// sync_valid/sync_data is taken, and acknowledged with a sync_ack pulse,
// when link 0 delivers the header of a new event (sync_miss is set if none
// was offered).  ECS writes: addr[12:10] link, addr[9:8] = 0 pedestal
// (wdata[9:0]) and mask (wdata[15]) of channel addr[4:0], = 2 zero
// suppression threshold (wdata[9:0]), = 3 link type (wdata[0], all links).
// All links of one PP-FPGA are assumed to deliver an event in the same
// cycles; link 0 times the buffer writes.  The data flow follows the document's
// PP-FPGA diagram; the event-number handshake and ECS map are own choices.
module pp_fpga
  import tell1_pkg::*;
#(
  parameter int NL             = 6,
  parameter int N_SAMPLES      = 32,
  parameter int DV_SHIFT       = 4,
  parameter int DERAND_WORDS   = 32768,
  parameter int THROTTLE_LEVEL = 28672,
  parameter int SLOT_BITS      = 16,
  parameter int REFRESH_INTERVAL = 936
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [15:0]          link_data [NL],
  input  logic                 ref_dv,
  input  logic [NL-1:0]        link_dv,
  input  logic [7:0]           ref_pcn,
  input  logic                 sync_valid,
  input  evid_t                sync_data,
  output logic                 sync_ack,
  input  logic                 ecs_we,
  input  logic [12:0]          ecs_addr,
  input  logic [15:0]          ecs_wdata,
  input  logic                 l1a_valid,
  input  logic [EVCNT_W-1:0]   l1a_evcnt,
  input  logic                 mem_ready,
  output logic                 mem_req,
  output logic                 mem_we,
  output logic                 mem_ref,
  output logic [SLOT_BITS+7:0] mem_addr,
  output logic [47:0]          mem_wdata,
  input  logic                 mem_rvalid,
  input  logic [47:0]          mem_rdata,
  output logic                 l1t_valid,
  input  logic                 l1t_ready,
  output word_t                l1t_word,
  output logic                 hlt_valid,
  input  logic                 hlt_ready,
  output word_t                hlt_word,
  output logic                 l0_throttle,
  output logic [NL-1:0]        pcn_err,
  output logic                 sync_miss,
  output logic                 overflow
);
  logic [NL-1:0] s_valid, s_first, s_last;
  logic [5:0]    s_chan [NL];
  logic [15:0]   s_word [NL];
  logic [NL-1:0] p_valid, p_first, p_last;
  logic [4:0]    p_chan [NL];
  logic signed [11:0] p_val [NL];
  logic [NL-1:0] z_valid, z_end;
  logic [15:0]   z_word [NL];
  logic [9:0]    thr [NL];
  logic [NL*16-1:0] raw;
  logic          ev_start;
  logic [15:0]   ev_num;
  logic          r_valid, r_first, r_last;
  logic [47:0]   r_data;
  logic [15:0]   r_evid;
  logic          ovf_pp, ovf_l1b, ovf_hlt, hlt_hold;
  logic          mode;

  // link type: 0 = Beetle links framed by the reference data valid,
  // 1 = links with their own data valid and event counter bits
  always_ff @(posedge clk) begin
    if (rst) mode <= 1'b0;
    else if (ecs_we && ecs_addr[9:8] == 2'd3) mode <= ecs_wdata[0];
  end

  for (genvar i = 0; i < NL; i++) begin : g_ch
    logic cfg_we;
    assign cfg_we = ecs_we && ecs_addr[12:10] == 3'(i) && ecs_addr[9:8] == 2'd0;
    link_sync #(.N_SAMPLES(N_SAMPLES), .DV_SHIFT(DV_SHIFT)) u_sync (
      .clk, .rst, .link_data(link_data[i]), .ref_dv, .ref_pcn,
      .mode, .link_dv(link_dv[i]), .ev_ref(sync_data.evcnt[7:0]),
      .o_valid(s_valid[i]), .o_first(s_first[i]), .o_last(s_last[i]),
      .o_chan(s_chan[i]), .o_word(s_word[i]), .pcn_err(pcn_err[i]));
    ped_com #(.N_CH(N_SAMPLES)) u_pc (
      .clk, .rst, .i_valid(s_valid[i] && !s_first[i]), .i_first(s_chan[i] == 6'd1),
      .i_last(s_last[i]), .i_chan(5'(s_chan[i] - 6'd1)), .i_adc(s_word[i][9:0]),
      .cfg_we, .cfg_chan(ecs_addr[4:0]), .cfg_ped(ecs_wdata[9:0]), .cfg_mask(ecs_wdata[15]),
      .o_valid(p_valid[i]), .o_first(p_first[i]), .o_last(p_last[i]), .o_chan(p_chan[i]), .o_val(p_val[i]));
    l1t_zsupp u_zs (
      .clk, .rst, .i_valid(p_valid[i]), .i_first(p_first[i]), .i_last(p_last[i]),
      .i_chan(p_chan[i]), .i_val(p_val[i]), .thr(thr[i]),
      .o_valid(z_valid[i]), .o_word(z_word[i]), .o_end(z_end[i]));
    always_ff @(posedge clk) begin
      if (rst) thr[i] <= 10'h3ff;
      else if (ecs_we && ecs_addr[12:10] == 3'(i) && ecs_addr[9:8] == 2'd2) thr[i] <= ecs_wdata[9:0];
    end
    assign raw[16*i +: 16] = s_word[i];
  end

  // event number of the event whose header link 0 is delivering
  assign ev_start = s_valid[0] && s_first[0];
  assign ev_num   = sync_data.evcnt[15:0];
  assign sync_ack = ev_start && sync_valid;
  always_ff @(posedge clk) begin
    if (rst) sync_miss <= 1'b0;
    else if (ev_start && !sync_valid) sync_miss <= 1'b1;
  end

  l1t_pplink #(.NL(NL), .DERAND_WORDS(DERAND_WORDS), .THROTTLE_LEVEL(THROTTLE_LEVEL)) u_pplink (
    .clk, .rst, .hit_valid(z_valid), .hit_word(z_word), .hit_end(z_end),
    .ev_push(ev_start), .ev_id({sync_data.bcnt, ev_num}),
    .o_valid(l1t_valid), .o_ready(l1t_ready), .o_word(l1t_word),
    .l0_throttle, .in_overflow(ovf_pp));

  l1b_ctrl #(.N_WORDS(N_SAMPLES + 1), .SLOT_BITS(SLOT_BITS), .MEM_W(NL*8),
             .REFRESH_INTERVAL(REFRESH_INTERVAL)) u_l1b (
    .clk, .rst, .w_valid(s_valid[0]), .w_first(s_first[0]), .w_evid(ev_num), .w_word(raw),
    .l1a_valid, .l1a_evid(l1a_evcnt[15:0]), .r_hold(hlt_hold),
    .mem_ready, .mem_req, .mem_we, .mem_ref, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata,
    .r_valid, .r_first, .r_last, .r_data, .r_evid, .wfifo_overflow(ovf_l1b));

  hlt_link #(.FIFO_DEPTH(256), .HOLD_LEVEL(256 - 2*(N_SAMPLES+1) - 16)) u_hlt (
    .clk, .rst, .r_valid, .r_first, .r_last, .r_data, .r_evid,
    .o_valid(hlt_valid), .o_ready(hlt_ready), .o_word(hlt_word), .overflow(ovf_hlt), .hold(hlt_hold));

  assign overflow = ovf_pp || ovf_l1b || ovf_hlt;
endmodule
