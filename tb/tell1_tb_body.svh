// tell1_tb_body.svh: end-to-end test of the TELL1 board, shared by
// tb_tell1_top (reduced buffers, all mechanisms forced) and tb_tell1_full
// (default sizes).  The including module declares NEV (events), STALL
// (whether output stalls are forced), SB (Level-1 buffer slot bits),
// L1T_PK/HLT_PK (packing factors) and instantiates tell1_top as `dut`.
//
// The testbench plays the parts around the board: the FEM reference Beetle,
// 18 Beetle links and the six links of PP-FPGA OWN_PP, which carry their own
// data valid and event counter bits in the header (link type 1), the TTC system with a Readout Supervisor that
// holds Level-0 accepts while the Level-0 throttle is up and turns Level-1
// accepts into rejects while the Level-1 throttle is up, the ECS, four SDRAM
// banks and the Gigabit Ethernet card.  It predicts, from the samples it
// generates, every Level-1 trigger event (pedestal and common-mode
// correction, zero suppression, linking) and every HLT event (zero
// suppression of the raw data of accepted events), and checks the packets on
// both POS-PHY ports word for word: Ethernet/IP header, total length,
// checksum, destination, event and frame counts, and the MEP contents.
  localparam int NP = 4, NL = 6, NS = 32, DVS = 4;
  localparam int ZS_THR = 40, HLT_THR = 700, SPACING = 110;
  logic clk = 0, rst = 1;
  logic [15:0] link_data [NP][NL];
  logic ref_dv = 0; logic [7:0] ref_pcn = 0;
  logic ttc_l0_accept = 0, ttc_brcst_str = 0, ttc_lb_str = 0;
  logic [5:0] ttc_brcst = 0; logic [7:0] ttc_lb_sub = 0, ttc_lb_data = 0;
  logic ecs_we = 0; logic [19:0] ecs_addr = 0; logic [15:0] ecs_wdata = 0;
  logic [NP-1:0] mem_ready, mem_req, mem_we, mem_ref, mem_rvalid;
  logic [SB+7:0] mem_addr [NP];
  logic [47:0] mem_wdata [NP], mem_rdata [NP];
  logic l1t_ptpa, hlt_ptpa;
  logic [31:0] l1t_tdat, hlt_tdat;
  logic l1t_tenb, l1t_tsop, l1t_teop, l1t_tprty, hlt_tenb, hlt_tsop, hlt_teop, hlt_tprty;
  logic [1:0] l1t_tmod, hlt_tmod;
  logic l0_throttle, l1_throttle, error;
  logic [NP*NL-1:0] pcn_err;
  logic [NL-1:0] link_dv [NP];
  localparam int OWN_PP = 1;  // this PP-FPGA's links carry their own data valid
  int checks = 0, failures = 0;
  int n_ref [NP], n_bad [NP];
  // mechanism counters
  int c_l0thr = 0, c_l1thr = 0, c_pcnerr = 0, c_acc = 0, c_rej = 0, c_forced_rej = 0,
      c_lbdec = 0, c_hits = 0, c_masked = 0, c_mep[2] = '{0, 0}, c_multiframe = 0,
      c_odd = 0, c_stall = 0;

  always #5 clk = ~clk;

  for (genvar p = 0; p < NP; p++) begin : g_mem
    l1b_sdram_model #(.AW(SB+8)) u_m (.clk, .mem_ready(mem_ready[p]), .mem_req(mem_req[p]), .mem_we(mem_we[p]),
      .mem_ref(mem_ref[p]), .mem_addr(mem_addr[p]), .mem_wdata(mem_wdata[p]),
      .mem_rvalid(mem_rvalid[p]), .mem_rdata(mem_rdata[p]), .n_ref(n_ref[p]), .n_bad(n_bad[p]));
  end

  // reference bunch counter: cleared by the bunch counter reset broadcast,
  // wraps after 3564 crossings
  logic [11:0] bc_m = 0;
  always @(posedge clk) bc_m <= (ttc_brcst_str && ttc_brcst[0]) ? 12'd0 : (bc_m == 12'd3563) ? 12'd0 : bc_m + 12'd1;
  task automatic fail(input string s);
    failures++; if (failures < 20) $display("FAIL %s", s);
  endtask

  // ---------------------------------------------------------------- models
  int ped [NP][NL][NS]; bit msk [NP][NL][NS];
  logic [15:0] hdr_tmpl [2][17];
  logic [15:0] exp_l1t [$][$];       // expected L1T events, in order
  logic [15:0] exp_hlt [$][$];       // expected HLT events, in order
  typedef logic [NP-1:0][NL-1:0][NS:0][15:0] raw_t;
  raw_t raw_ev [int];             // raw link words of each event
  logic [31:0] dest_q [2][$];

  function automatic int sat10(input int v); return v > 1023 ? 1023 : v; endfunction

  function automatic void predict_l1t(input int e, input logic [11:0] bc, input raw_t raw);
    logic [15:0] ev [$];
    ev.push_back(16'(e));
    ev.push_back({4'h0, bc});
    for (int p = 0; p < NP; p++)
      for (int l = 0; l < NL; l++) begin
        int sum = 0, cnt = 0, cm, n = 0;
        for (int c = 0; c < NS; c++) if (!msk[p][l][c]) begin sum += int'(raw[p][l][c+1][9:0]) - ped[p][l][c]; cnt++; end
        cm = cnt ? sum / cnt : 0;
        for (int c = 0; c < NS; c++) begin
          int v; v = msk[p][l][c] ? 0 : int'(raw[p][l][c+1][9:0]) - ped[p][l][c] - cm;
          if (v > ZS_THR) begin ev.push_back({1'b0, 5'(c), 10'(sat10(v))}); n++; end
        end
        ev.push_back({1'b1, 5'b0, 10'(n)});
        c_hits += n;
      end
    exp_l1t.push_back(ev);
  endfunction

  function automatic void predict_hlt(input int e);
    logic [15:0] ev [$]; int h = 0; raw_t rv;
    rv = raw_ev[e];
    ev.push_back(16'(e));
    for (int p = 0; p < NP; p++)
      for (int k = 1; k <= NS; k++)
        for (int l = 0; l < NL; l++)
          if (rv[p][l][k][9:0] > HLT_THR) begin
            ev.push_back(16'({2'(p), 3'(l), 5'(k - 1)}));
            ev.push_back({6'b0, rv[p][l][k][9:0]});
            h++;
          end
    ev.push_back({1'b1, 15'(h)});
    exp_hlt.push_back(ev);
  endfunction

  // ------------------------------------------------------ stimulus helpers
  task automatic ecs(input logic [19:0] a, input logic [15:0] d);
    ecs_we = 1; ecs_addr = a; ecs_wdata = d; @(negedge clk); ecs_we = 0;
  endtask
  task automatic brcst(input logic [5:0] b);
    ttc_brcst_str = 1; ttc_brcst = b; @(negedge clk); ttc_brcst_str = 0; ttc_brcst = 0;
  endtask
  task automatic lbrc(input logic [7:0] s, input logic [7:0] d);
    ttc_lb_str = 1; ttc_lb_sub = s; ttc_lb_data = d; @(negedge clk); ttc_lb_str = 0;
  endtask
  task automatic send_dest(input int s, input logic [31:0] ip);
    logic [7:0] base; base = (s == 0) ? 8'h10 : 8'h20;
    for (int i = 0; i < 4; i++) lbrc(base + 8'(i), ip[31 - 8*i -: 8]);
    dest_q[s].push_back(ip);
  endtask

  // one event on the FEM and the 24 links (runs in the background)
  task automatic drive_event(input int e, input raw_t raw, input logic [7:0] pcn);
    fork
      begin
        ref_dv = 1; ref_pcn = pcn;
        repeat (NS + 1) @(negedge clk);
        ref_dv = 0;
      end
      begin
        repeat (DVS) @(negedge clk);
        for (int k = 0; k <= NS; k++) begin
          for (int p = 0; p < NP; p++) for (int l = 0; l < NL; l++) link_data[p][l] = raw[p][l][k];
          for (int p = 0; p < NP; p++) link_dv[p] = '1;
          @(negedge clk);
        end
        for (int p = 0; p < NP; p++) link_dv[p] = '0;
      end
    join_none
  endtask

  // ------------------------------------------------ Gigabit Ethernet side
  logic [15:0] pk [2][$];
  int pkt_words [2][$];
  task automatic check_packet(input int s);
    logic [15:0] w [$]; int tot, nev, fr, idx, len; logic [31:0] ip; int sum;
    w = pk[s];
    checks++;
    if (w.size() < 18) begin fail($sformatf("stream %0d short packet", s)); return; end
    for (int i = 0; i < 17; i++) if (!(i == 8 || i == 12 || i == 15 || i == 16)) begin
      checks++; if (w[i] != hdr_tmpl[s][i]) fail($sformatf("stream %0d header word %0d", s, i));
    end
    tot = w[8];
    checks++; if (tot != 2 * (w.size() - 7)) fail($sformatf("stream %0d total length %0d for %0d words", s, tot, w.size()));
    sum = 0; for (int i = 7; i < 17; i++) sum += w[i];
    while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
    checks++; if (sum != 16'hFFFF) fail("IP header checksum");
    ip = {w[15], w[16]};
    checks++;
    if (dest_q[s].size() == 0 || ip != dest_q[s][0]) fail($sformatf("stream %0d destination %h", s, ip));
    else void'(dest_q[s].pop_front());
    nev = w[17][7:0]; fr = w[17][15:8];
    checks++; if (nev != (s == 0 ? L1T_PK : HLT_PK)) fail($sformatf("stream %0d events per MEP %0d", s, nev));
    checks++; if (fr != (tot - 20 + 1479) / 1480) fail("frame count");
    if (fr > 1) c_multiframe++;
    idx = 18;
    for (int n = 0; n < nev; n++) begin
      logic [15:0] ev [$];
      if (idx >= w.size()) begin fail("MEP too short"); return; end
      len = w[idx]; idx++;
      checks++;
      if (s == 0) begin if (exp_l1t.size() == 0) begin fail("unexpected L1T event"); return; end ev = exp_l1t.pop_front(); end
      else begin if (exp_hlt.size() == 0) begin fail("unexpected HLT event"); return; end ev = exp_hlt.pop_front(); end
      if (len != ev.size()) fail($sformatf("stream %0d event %0d length %0d exp %0d", s, ev[0], len, ev.size()));
      for (int i = 0; i < len && i < ev.size(); i++) begin
        checks++;
        if (w[idx + i] != ev[i]) fail($sformatf("stream %0d event %0d word %0d: %h exp %h", s, ev[0], i, w[idx + i], ev[i]));
      end
      idx += len;
    end
    checks++; if (idx != w.size()) fail("MEP length");
    c_mep[s]++;
  endtask

  bit stall_l1t = 0, stall_hlt = 0;
  int cur_e = 0;
  always @(negedge clk) begin
    l1t_ptpa = !(STALL && stall_l1t) && ($urandom % 8 != 0);
    hlt_ptpa = !(STALL && stall_hlt) && ($urandom % 8 != 0);
    if (!l1t_ptpa || !hlt_ptpa) c_stall++;
  end
  int c_pcn_seen = 0, c_pcn_other = 0;
  always @(posedge clk) if (!rst) begin
    if (pcn_err[2*NL+3]) c_pcn_seen++;
    if ((pcn_err & ~(24'(1) << (2*NL+3))) != 0) c_pcn_other++;
    if (!l1t_tenb) begin
      if (l1t_tsop) pk[0].delete();
      pk[0].push_back(l1t_tdat[31:16]);
      if (l1t_tmod == 0) pk[0].push_back(l1t_tdat[15:0]); else c_odd++;
      checks++; if (l1t_tprty != ~^l1t_tdat) fail("L1T parity");
      if (l1t_teop) check_packet(0);
    end
    if (!hlt_tenb) begin
      if (hlt_tsop) pk[1].delete();
      pk[1].push_back(hlt_tdat[31:16]);
      if (hlt_tmod == 0) pk[1].push_back(hlt_tdat[15:0]); else c_odd++;
      checks++; if (hlt_tprty != ~^hlt_tdat) fail("HLT parity");
      if (hlt_teop) check_packet(1);
    end
    if (l0_throttle) c_l0thr++;
    if (l1_throttle) c_l1thr++;
  end

  // -------------------------------------------------------------- main
  int decided = 0;
  task automatic decide(input int e);
    bit acc; acc = (e % 9 == 0) || (STALL && stall_hlt);
    if (acc && l1_throttle) begin acc = 0; c_forced_rej++; end
    if (e % 7 == 5) begin lbrc(8'h30, {7'b0, acc}); c_lbdec++; end
    else brcst({2'b0, acc, 1'b1, 2'b0});
    if (acc) begin predict_hlt(e); c_acc++; end else c_rej++;
  endtask

  initial begin
    for (int p = 0; p < NP; p++) for (int l = 0; l < NL; l++) link_data[p][l] = 16'h0;
    for (int p = 0; p < NP; p++) link_dv[p] = '0;
    repeat (4) @(negedge clk); rst = 0;
    // ECS: pedestals, masks, thresholds, header templates
    for (int p = 0; p < NP; p++) for (int l = 0; l < NL; l++) begin
      for (int c = 0; c < NS; c++) begin
        ped[p][l][c] = 200 + $urandom % 300;
        msk[p][l][c] = ($urandom % 32) == 0;
        if (msk[p][l][c]) c_masked++;
        ecs({3'(p), 4'b0, 3'(l), 2'd0, 3'b0, 5'(c)}, {msk[p][l][c], 5'b0, 10'(ped[p][l][c])});
      end
      ecs({3'(p), 4'b0, 3'(l), 2'd2, 8'b0}, 16'(ZS_THR));
    end
    ecs({3'd4, 2'd2, 15'b0}, 16'(HLT_THR));
    ecs({3'(OWN_PP), 7'b0, 2'd3, 8'b0}, 16'd1);  // link type of PP OWN_PP
    ecs({3'd4, 2'd3, 15'd0}, 16'(L1T_PK));   // run-time packing factors
    ecs({3'd4, 2'd3, 15'd1}, 16'(HLT_PK));
    for (int s = 0; s < 2; s++) for (int i = 0; i < 17; i++) begin
      hdr_tmpl[s][i] = (i == 7) ? 16'h4500 : (i == 11) ? 16'h4011 : 16'($urandom);
      ecs({3'd4, 2'(s), 10'b0, 5'(i)}, hdr_tmpl[s][i]);
    end
    // TTC: counter resets, one destination per expected MEP
    brcst(6'b000011);
    for (int m = 0; m < NEV / L1T_PK; m++) send_dest(0, {8'd10, 8'd0, 8'(m), 8'($urandom)});
    for (int m = 0; m < (STALL ? 15 : NEV / (9 * HLT_PK) + 2); m++) send_dest(1, {8'd10, 8'd1, 8'(m), 8'($urandom)});
    // output stalls of the Gigabit Ethernet card, by time
    if (STALL) fork
      begin wait (cur_e == 12); stall_l1t = 1; repeat (5000) @(negedge clk); stall_l1t = 0; end
      begin wait (cur_e == 20); stall_hlt = 1; repeat (7000) @(negedge clk); stall_hlt = 0; end
    join_none
    // events
    for (int e = 0; e < NEV; e++) begin
      raw_t raw; logic [7:0] pcn; int cmn;
      while (l0_throttle) @(negedge clk);
      cur_e = e;
      pcn = 8'((e * 7) % 160);
      for (int p = 0; p < NP; p++) for (int l = 0; l < NL; l++) begin
        cmn = int'($urandom % 101) - 50;
        raw[p][l][0] = (p == OWN_PP) ? {8'h5A, 8'(e)}   // event counter bits
                     : {8'hA5, (e == 11 && p == 2 && l == 3) ? pcn ^ 8'h40 : pcn};
        for (int c = 0; c < NS; c++) begin
          int v; v = ped[p][l][c] + cmn + int'($urandom % 9) - 4;
          if ($urandom % 16 == 0) v += 50 + $urandom % 500;
          if (v < 0) v = 0; if (v > 1023) v = 1023;
          raw[p][l][c+1] = {6'b0, 10'(v)};
        end
      end
      if (e == 11) c_pcnerr++;
      raw_ev[e] = raw;
      predict_l1t(e, bc_m, raw);   // bunch counter seen by the accept below
      ttc_l0_accept = 1; @(negedge clk); ttc_l0_accept = 0;
      @(negedge clk);
      drive_event(e, raw, pcn);
      // Level-1 decision, three events after the event (in Level-0 order)
      repeat (4) @(negedge clk);
      if (e >= 3) begin decide(decided); decided++; end
      repeat (SPACING - 6) @(negedge clk);
    end
    while (decided < NEV) begin decide(decided); decided++; repeat (SPACING) @(negedge clk); end
    // the last, incomplete MEPs stay in the buffers; wait for the complete ones
    repeat (20000) @(negedge clk);
    // ------------------------------------------------------ final checks
    checks++; if (c_mep[0] != NEV / L1T_PK) fail($sformatf("L1T MEPs %0d exp %0d", c_mep[0], NEV / L1T_PK));
    checks++; if (c_mep[1] != c_acc / HLT_PK) fail($sformatf("HLT MEPs %0d exp %0d", c_mep[1], c_acc / HLT_PK));
    checks++; if (exp_l1t.size() != NEV % L1T_PK) fail($sformatf("L1T events left %0d", exp_l1t.size()));
    checks++; if (exp_hlt.size() != c_acc % HLT_PK) fail($sformatf("HLT events left %0d", exp_hlt.size()));
    for (int p = 0; p < NP; p++) begin
      checks++; if (n_bad[p] != 0 || n_ref[p] == 0) fail($sformatf("SDRAM %0d: bad %0d refreshes %0d", p, n_bad[p], n_ref[p]));
    end
    checks++; if (c_pcn_seen == 0 || c_pcn_other != 0) fail("PCN error not reported on its link only");
    checks++; if (error) fail("board error flag");
    $display("events %0d: L1 accepts %0d, rejects %0d (forced by throttle %0d, long broadcast %0d)",
             NEV, c_acc, c_rej, c_forced_rej, c_lbdec);
    $display("L1T MEPs %0d, HLT MEPs %0d, multi-frame MEPs %0d, odd-length packets %0d",
             c_mep[0], c_mep[1], c_multiframe, c_odd);
    $display("hits %0d, masked channels %0d, PCN errors injected %0d, refreshes %0d",
             c_hits, c_masked, c_pcnerr, n_ref[0]);
    $display("L0 throttle cycles %0d, L1 throttle cycles %0d, ptpa stall cycles %0d", c_l0thr, c_l1thr, c_stall);
    if (STALL) begin
      checks++; if (c_l0thr == 0) fail("Level-0 throttle never raised");
      checks++; if (c_l1thr == 0) fail("Level-1 throttle never raised");
      checks++; if (c_forced_rej == 0) fail("no accept turned into reject");
    end
    checks++; if (c_mep[0] == 0 || c_mep[1] == 0 || c_multiframe == 0 && !STALL) fail("too few MEPs");
    checks++; if (c_lbdec == 0 || c_rej == 0 || c_hits == 0 || c_masked == 0 || c_stall == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
