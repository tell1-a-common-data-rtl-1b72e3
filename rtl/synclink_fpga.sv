// synclink_fpga: the board's synchronisation, linking and network FPGA.
// Timing: bcast_cmd decodes the TTC receiver's broadcasts and keeps the
// bunch and Level-0 event counters; at each Level-0 accept the identifier
// goes into the Level-0 de-randomizer, from which syncdata_gen hands it to
// the four PP-FPGAs.  Level-1 decisions become event numbers for the
// PP-FPGAs' Level-1 buffers (l1a_gen); IP destinations go into one small
// FIFO per output stream.
// Level-1 trigger stream: l1t_linking joins the PP fragments into the
// board fragment (event data FIFO + event size FIFO); event_transfer_ctrl
// packs L1T_PACKING events per Multi Event Packet into the 64 KByte MEP
// buffer; the framer adds Ethernet/IP header from the ECS header RAM and
// the destination, and pos3_tx sends it on POS-PHY Level 3.
// HLT stream: the same chain, with hlt_zsupp zero-suppressing the raw data
// first, HLT_PACKING events per MEP and a 1 MByte MEP buffer.
// The Level-1 throttle rises when the HLT event data FIFO is three quarters
// full or the HLT MEP buffer has less than a quarter free.
// ECS writes (ecs_we with addr[16:15]): 0 L1T header RAM word addr[4:0],
// 1 HLT header RAM word, 2 HLT zero-suppression threshold (wdata[9:0]),
// 3 packing factor of stream addr[0] (0 L1T, 1 HLT) in wdata[7:0]; the
// reset value 0 selects the maximum L1T_PACKING / HLT_PACKING.
// Everything runs on one clock; the document uses several clock domains.
// Block structure follows the document's SyncLink-FPGA diagram; FIFO
// depths, thresholds and the ECS map are this design's own choices.
module synclink_fpga
  import tell1_pkg::*;
#(
  parameter int NUM_PP      = 4,
  parameter int LINKS       = 6,
  parameter int N_SAMPLES   = 32,
  parameter int L1T_PACKING = 32,
  parameter int HLT_PACKING = 16,
  parameter int L1T_AW      = 15,
  parameter int HLT_AW      = 19,
  parameter int EV_DEPTH    = 1024
) (
  input  logic               clk,
  input  logic               rst,
  // TTC receiver
  input  logic               ttc_l0_accept,
  input  logic               ttc_brcst_str,
  input  logic [5:0]         ttc_brcst,
  input  logic               ttc_lb_str,
  input  logic [7:0]         ttc_lb_sub,
  input  logic [7:0]         ttc_lb_data,
  // ECS
  input  logic               ecs_we,
  input  logic [16:0]        ecs_addr,
  input  logic [15:0]        ecs_wdata,
  // to / from the PP-FPGAs
  output logic               sync_valid,
  output evid_t              sync_data,
  input  logic [NUM_PP-1:0]  sync_ack,
  output logic               l1a_valid,
  output logic [EVCNT_W-1:0] l1a_evcnt,
  input  logic [NUM_PP-1:0]  l1t_valid,
  output logic [NUM_PP-1:0]  l1t_ready,
  input  word_t              l1t_word [NUM_PP],
  input  logic [NUM_PP-1:0]  hlt_valid,
  output logic [NUM_PP-1:0]  hlt_ready,
  input  word_t              hlt_word [NUM_PP],
  // POS-PHY Level 3 to the Gigabit Ethernet card, L1T and HLT ports
  input  logic               l1t_ptpa,
  output logic [31:0]        l1t_tdat,
  output logic               l1t_tenb, l1t_tsop, l1t_teop, l1t_tprty,
  output logic [1:0]         l1t_tmod,
  input  logic               hlt_ptpa,
  output logic [31:0]        hlt_tdat,
  output logic               hlt_tenb, hlt_tsop, hlt_teop, hlt_tprty,
  output logic [1:0]         hlt_tmod,
  // status
  output logic               l1_throttle,
  output logic [BCNT_W-1:0]  bcnt,
  output logic [EVCNT_W-1:0] evcnt,
  output logic               l0_derand_overflow,
  output logic               l1t_ev_err,
  output logic               hlt_ev_err
);
  // ---------------- timing and event identification ----------------
  logic  l0a, dec_valid, dec_accept, dest_l1t_push, dest_hlt_push, id_valid, id_pop;
  evid_t l0a_id, id;
  logic [31:0] dest_ip;

  bcast_cmd u_bcast (
    .clk, .rst, .l0_accept(ttc_l0_accept), .brcst_str(ttc_brcst_str), .brcst(ttc_brcst),
    .lb_str(ttc_lb_str), .lb_sub(ttc_lb_sub), .lb_data(ttc_lb_data),
    .bcnt, .evcnt, .l0a, .l0a_id, .l1_dec_valid(dec_valid), .l1_dec_accept(dec_accept),
    .dest_l1t_push, .dest_hlt_push, .dest_ip);

  l0_derandomizer u_l0d (
    .clk, .rst, .l0a, .l0a_id, .pop(id_pop), .id_valid, .id, .overflow(l0_derand_overflow));

  syncdata_gen #(.N_PP(NUM_PP)) u_sd (
    .clk, .rst, .id_valid, .id, .pop(id_pop), .sync_valid, .sync_data, .sync_ack);

  l1a_gen u_l1a (
    .clk, .rst, .evcnt_rst(ttc_brcst_str && ttc_brcst[1]), .dec_valid, .dec_accept,
    .l1a_valid, .l1a_evcnt, .n_dec(), .n_acc());

  // ---------------- the two output streams ----------------
  localparam int LW = $clog2(EV_DEPTH+1);
  // index 0: Level-1 trigger, index 1: HLT
  logic        ev_valid [2], ev_ready [2], sz_push [2];
  word_t       ev_word [2];
  logic [15:0] sz [2];
  logic [LW-1:0] d_level [2];
  logic [HLT_AW:0] used_hlt;
  logic [9:0]    hlt_thr;
  logic [7:0]    pack [2];

  l1t_linking #(.N_PP(NUM_PP)) u_l1t_link (
    .clk, .rst, .i_valid(l1t_valid), .i_ready(l1t_ready), .i_word(l1t_word),
    .o_valid(ev_valid[0]), .o_ready(ev_ready[0]), .o_word(ev_word[0]),
    .size_push(sz_push[0]), .size(sz[0]), .ev_err(l1t_ev_err));

  hlt_zsupp #(.N_PP(NUM_PP), .LINKS(LINKS), .N_SAMPLES(N_SAMPLES)) u_hlt_zs (
    .clk, .rst, .i_valid(hlt_valid), .i_ready(hlt_ready), .i_word(hlt_word), .thr(hlt_thr),
    .o_valid(ev_valid[1]), .o_ready(ev_ready[1]), .o_word(ev_word[1]),
    .size_push(sz_push[1]), .size(sz[1]), .ev_err(hlt_ev_err));

  always_ff @(posedge clk) begin
    if (rst) begin
      hlt_thr <= 10'h3ff; pack[0] <= '0; pack[1] <= '0;
    end else if (ecs_we && ecs_addr[16:15] == 2'd2) hlt_thr <= ecs_wdata[9:0];
    else if (ecs_we && ecs_addr[16:15] == 2'd3) pack[ecs_addr[0]] <= ecs_wdata[7:0];
  end

  for (genvar s = 0; s < 2; s++) begin : g_stream
    localparam int AW = (s == 0) ? L1T_AW : HLT_AW;
    localparam int PK = (s == 0) ? L1T_PACKING : HLT_PACKING;
    logic  d_empty, d_full, d_pop, s_empty, s_full, s_pop;
    word_t d_dout;
    logic [15:0] s_dout;
    logic  mem_we, desc_push, desc_empty, desc_pop, free_word;
    logic [AW-1:0] mem_addr, buf_raddr;
    logic [15:0] mem_wdata, buf_rdata;
    logic [AW+23:0] desc_in, desc_out;
    logic [AW:0] used;
    logic  dst_empty, dst_pop;
    logic [31:0] dst;
    logic [4:0]  hdr_raddr;
    logic [15:0] hdr_rdata;
    logic  f_valid, f_ready;
    word_t f_word;

    assign ev_ready[s] = !d_full && !s_full;

    sync_fifo #(.W($bits(word_t)), .DEPTH(EV_DEPTH)) u_evdata (
      .clk, .rst, .push(ev_valid[s] && ev_ready[s]), .din(ev_word[s]), .pop(d_pop),
      .dout(d_dout), .empty(d_empty), .full(d_full), .level(d_level[s]));
    sync_fifo #(.W(16), .DEPTH(64)) u_evsize (
      .clk, .rst, .push(sz_push[s] && ev_ready[s]), .din(sz[s]), .pop(s_pop),
      .dout(s_dout), .empty(s_empty), .full(s_full), .level());

    event_transfer_ctrl #(.PACKING(PK), .AW(AW)) u_etc (
      .clk, .rst, .packing(pack[s]), .size_valid(!s_empty), .size_in(s_dout), .size_pop(s_pop),
      .data_valid(!d_empty), .data_in(d_dout), .data_pop(d_pop),
      .mem_we, .mem_addr, .mem_wdata, .desc_push, .desc(desc_in), .free_word,
      .used, .space_wait());

    mep_buffer #(.AW(AW)) u_mep (
      .clk, .we(mem_we), .waddr(mem_addr), .wdata(mem_wdata), .raddr(buf_raddr), .rdata(buf_rdata));

    sync_fifo #(.W(AW+24), .DEPTH(16)) u_mepaddr (
      .clk, .rst, .push(desc_push), .din(desc_in), .pop(desc_pop), .dout(desc_out),
      .empty(desc_empty), .full(), .level());

    sync_fifo #(.W(32), .DEPTH(16)) u_dest (
      .clk, .rst, .push(s == 0 ? dest_l1t_push : dest_hlt_push), .din(dest_ip), .pop(dst_pop),
      .dout(dst), .empty(dst_empty), .full(), .level());

    ip_header_ram #(.WORDS(17)) u_hdr (
      .clk, .we(ecs_we && ecs_addr[16:15] == 2'(s)), .waddr(ecs_addr[4:0]), .wdata(ecs_wdata),
      .raddr(hdr_raddr), .rdata(hdr_rdata));

    framer #(.AW(AW)) u_framer (
      .clk, .rst, .desc_valid(!desc_empty), .desc(desc_out), .desc_pop,
      .dest_valid(!dst_empty), .dest_ip(dst), .dest_pop(dst_pop),
      .hdr_raddr, .hdr_rdata, .buf_raddr, .buf_rdata, .free_word,
      .o_valid(f_valid), .o_ready(f_ready), .o_word(f_word));

    if (s == 0) begin : g_l1t
      pos3_tx u_pos (
        .clk, .rst, .i_valid(f_valid), .i_ready(f_ready), .i_word(f_word), .ptpa(l1t_ptpa),
        .tdat(l1t_tdat), .tenb(l1t_tenb), .tsop(l1t_tsop), .teop(l1t_teop), .tmod(l1t_tmod), .tprty(l1t_tprty));
    end else begin : g_hlt
      pos3_tx u_pos (
        .clk, .rst, .i_valid(f_valid), .i_ready(f_ready), .i_word(f_word), .ptpa(hlt_ptpa),
        .tdat(hlt_tdat), .tenb(hlt_tenb), .tsop(hlt_tsop), .teop(hlt_teop), .tmod(hlt_tmod), .tprty(hlt_tprty));
      assign used_hlt = (HLT_AW+1)'(used);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) l1_throttle <= 1'b0;
    else l1_throttle <= (d_level[1] > LW'(EV_DEPTH * 3 / 4)) ||
                        (used_hlt > (HLT_AW+1)'(2**HLT_AW * 3 / 4));
  end
endmodule
