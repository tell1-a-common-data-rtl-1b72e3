// tell1_top: the TELL1 off-detector readout board.
// Four PP-FPGAs (pp_fpga), each reading six de-serialized 16-bit optical
// links, and one SyncLink-FPGA (synclink_fpga).  The PP-FPGAs pre-process
// the data for the Level-1 trigger, keep all raw data in their Level-1
// buffers and send accepted events for the High Level Trigger; the
// SyncLink-FPGA identifies events from the TTC signals, links the four
// PP-FPGAs' data into board fragments, packs them into Multi Event Packets
// and sends them as IP packets on two POS-PHY Level 3 ports to the Gigabit
// Ethernet card.
// Parts outside the FPGAs are ports: the receiver cards (link_data), the
// reference Beetle on the FEM card (ref_dv, ref_pcn), the data valid of
// links from other front-end chips (link_dv), the TTC receiver
// (ttc_*), the Level-1 buffer SDRAM banks (mem_*, one per PP-FPGA), the
// Gigabit Ethernet card (l1t_*, hlt_* POS-PHY signals) and the ECS bus:
// ecs_addr[19:17] = 0..3 selects a PP-FPGA (its address in [12:0]), 4 the
// SyncLink-FPGA (address in [16:0]).  The Level-0 throttle is the OR of the
// PP-FPGAs' throttles; the Level-1 throttle comes from the SyncLink-FPGA.
// One clock drives everything.  Board partitioning follows the document.
module tell1_top
  import tell1_pkg::*;
#(
  parameter int NUM_PP    = 4,
  parameter int NL        = 6,
  parameter int N_SAMPLES = 32,
  parameter int SLOT_BITS = 16,
  parameter int DERAND_WORDS   = 32768,
  parameter int THROTTLE_LEVEL = 28672,
  parameter int L1T_AW    = 15,
  parameter int HLT_AW    = 19,
  parameter int EV_DEPTH  = 1024,
  parameter int L1T_PACKING = 32,
  parameter int HLT_PACKING = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [15:0]          link_data [NUM_PP][NL],
  input  logic                 ref_dv,
  input  logic [NL-1:0]        link_dv [NUM_PP],
  input  logic [7:0]           ref_pcn,
  input  logic                 ttc_l0_accept,
  input  logic                 ttc_brcst_str,
  input  logic [5:0]           ttc_brcst,
  input  logic                 ttc_lb_str,
  input  logic [7:0]           ttc_lb_sub,
  input  logic [7:0]           ttc_lb_data,
  input  logic                 ecs_we,
  input  logic [19:0]          ecs_addr,
  input  logic [15:0]          ecs_wdata,
  input  logic [NUM_PP-1:0]    mem_ready,
  output logic [NUM_PP-1:0]    mem_req,
  output logic [NUM_PP-1:0]    mem_we,
  output logic [NUM_PP-1:0]    mem_ref,
  output logic [SLOT_BITS+7:0] mem_addr [NUM_PP],
  output logic [NL*8-1:0]      mem_wdata [NUM_PP],
  input  logic [NUM_PP-1:0]    mem_rvalid,
  input  logic [NL*8-1:0]      mem_rdata [NUM_PP],
  input  logic                 l1t_ptpa,
  output logic [31:0]          l1t_tdat,
  output logic                 l1t_tenb, l1t_tsop, l1t_teop, l1t_tprty,
  output logic [1:0]           l1t_tmod,
  input  logic                 hlt_ptpa,
  output logic [31:0]          hlt_tdat,
  output logic                 hlt_tenb, hlt_tsop, hlt_teop, hlt_tprty,
  output logic [1:0]           hlt_tmod,
  output logic                 l0_throttle,
  output logic                 l1_throttle,
  output logic [NUM_PP*NL-1:0] pcn_err,
  output logic                 error
);
  logic  sync_valid, l1a_valid;
  evid_t sync_data;
  logic [NUM_PP-1:0] sync_ack, l1t_valid, l1t_ready, hlt_valid, hlt_ready, thr, miss, ovf;
  word_t l1t_word [NUM_PP], hlt_word [NUM_PP];
  logic [EVCNT_W-1:0] l1a_evcnt;
  logic l0d_ovf, l1t_err, hlt_err;

  for (genvar p = 0; p < NUM_PP; p++) begin : g_pp
    pp_fpga #(.NL(NL), .N_SAMPLES(N_SAMPLES), .SLOT_BITS(SLOT_BITS),
              .DERAND_WORDS(DERAND_WORDS), .THROTTLE_LEVEL(THROTTLE_LEVEL)) u_pp (
      .clk, .rst, .link_data(link_data[p]), .ref_dv, .link_dv(link_dv[p]), .ref_pcn,
      .sync_valid, .sync_data, .sync_ack(sync_ack[p]),
      .ecs_we(ecs_we && ecs_addr[19:17] == 3'(p)), .ecs_addr(ecs_addr[12:0]), .ecs_wdata,
      .l1a_valid, .l1a_evcnt,
      .mem_ready(mem_ready[p]), .mem_req(mem_req[p]), .mem_we(mem_we[p]), .mem_ref(mem_ref[p]),
      .mem_addr(mem_addr[p]), .mem_wdata(mem_wdata[p]), .mem_rvalid(mem_rvalid[p]), .mem_rdata(mem_rdata[p]),
      .l1t_valid(l1t_valid[p]), .l1t_ready(l1t_ready[p]), .l1t_word(l1t_word[p]),
      .hlt_valid(hlt_valid[p]), .hlt_ready(hlt_ready[p]), .hlt_word(hlt_word[p]),
      .l0_throttle(thr[p]), .pcn_err(pcn_err[p*NL +: NL]), .sync_miss(miss[p]), .overflow(ovf[p]));
  end

  synclink_fpga #(.NUM_PP(NUM_PP), .LINKS(NL), .N_SAMPLES(N_SAMPLES),
                  .L1T_AW(L1T_AW), .HLT_AW(HLT_AW), .EV_DEPTH(EV_DEPTH),
                  .L1T_PACKING(L1T_PACKING), .HLT_PACKING(HLT_PACKING)) u_sl (
    .clk, .rst, .ttc_l0_accept, .ttc_brcst_str, .ttc_brcst, .ttc_lb_str, .ttc_lb_sub, .ttc_lb_data,
    .ecs_we(ecs_we && ecs_addr[19:17] == 3'd4), .ecs_addr(ecs_addr[16:0]), .ecs_wdata,
    .sync_valid, .sync_data, .sync_ack, .l1a_valid, .l1a_evcnt,
    .l1t_valid, .l1t_ready, .l1t_word, .hlt_valid, .hlt_ready, .hlt_word,
    .l1t_ptpa, .l1t_tdat, .l1t_tenb, .l1t_tsop, .l1t_teop, .l1t_tprty, .l1t_tmod,
    .hlt_ptpa, .hlt_tdat, .hlt_tenb, .hlt_tsop, .hlt_teop, .hlt_tprty, .hlt_tmod,
    .l1_throttle, .bcnt(), .evcnt(), .l0_derand_overflow(l0d_ovf),
    .l1t_ev_err(l1t_err), .hlt_ev_err(hlt_err));

  assign l0_throttle = |thr;
  assign error       = |miss || |ovf || l0d_ovf || l1t_err || hlt_err;
endmodule
