// tb_l1b_ctrl: writes events (one 96-bit word every third cycle, the ratio
// of the 40 MHz link rate to the 120 MHz memory clock) into the controller,
// which stores them through a behavioural memory with a three-cycle read
// latency and random not-ready cycles.  Level-1 accepts for recent events
// must return exactly the words written for that event, framed by first and
// last; refresh commands must come every REFRESH_INTERVAL cycles and keep
// the memory idle for REFRESH_CYCLES; slot addresses must wrap by event
// number.  Counts reads, writes and refreshes, all of which must occur.
module tb_l1b_ctrl;
  localparam int NWD = 5, SB = 4, RI = 60, RC = 4, LAT = 3;
  logic clk = 0, rst = 1;
  logic w_valid, w_first, l1a_valid;
  logic [15:0] w_evid, l1a_evid, r_evid;
  logic [95:0] w_word;
  logic mem_ready, mem_req, mem_we, mem_ref, mem_rvalid;
  logic [SB+7:0] mem_addr;
  logic [47:0] mem_wdata, mem_rdata, r_data;
  logic r_valid, r_first, r_last, wfifo_overflow, r_hold;
  int checks = 0, failures = 0, cyc = 0, nref = 0, nwr = 0, nrd = 0, last_ref = -1, busy_until = 0;
  logic [47:0] mem [int];
  logic [LAT:0] pv; logic [47:0] pd [LAT+1];
  logic [NWD-1:0][95:0] written [int];   // by event number
  logic [NWD-1:0][95:0] evtmp, evrd;
  l1b_ctrl #(.N_WORDS(NWD), .SLOT_BITS(SB), .REFRESH_INTERVAL(RI), .REFRESH_CYCLES(RC)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // behavioural SDRAM bank: fixed read latency, occasionally busy
  always @(negedge clk) mem_ready = ($urandom % 10) != 0;
  // reader back-pressure: no new event read may start while r_hold is high
  always @(negedge clk) r_hold = ($urandom % 4) == 0;
  always @(posedge clk) if (!rst && dut.rd_start) begin
    checks++; if (r_hold) begin failures++; $display("read started during hold"); end
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    pv <= {pv[LAT-1:0], 1'b0};
    for (int i = LAT; i > 0; i--) pd[i] <= pd[i-1];
    if (!rst && mem_req) begin
      checks++;
      if (!mem_ready || cyc < busy_until) begin failures++; $display("command while busy at %0d", cyc); end
      if (mem_ref) begin
        nref++;
        if (last_ref >= 0) begin
          checks++;
          if (cyc - last_ref > RI + 12 || cyc - last_ref < RI - 12) begin failures++; $display("refresh gap %0d", cyc - last_ref); end
        end
        last_ref = cyc; busy_until = cyc + RC + 1;
      end else if (mem_we) begin
        mem[int'(mem_addr)] = mem_wdata; nwr++;
      end else begin
        pv[0] <= 1'b1; pd[0] <= mem.exists(int'(mem_addr)) ? mem[int'(mem_addr)] : 48'h0; nrd++;
      end
    end
  end
  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];
  initial pv = '0;
  // read-out checking
  int exp_ev[$]; int ridx = 0;
  logic [95:0] wtmp, rtmp;
  always @(posedge clk) if (!rst && r_valid) begin
    int ev; logic [47:0] e;
    checks++;
    if (exp_ev.size() == 0) begin failures++; $display("unexpected read data"); end
    else begin
      ev = exp_ev[0];
      evrd = written[ev]; rtmp = evrd[ridx / 2];
      e = (ridx % 2) ? rtmp[95:48] : rtmp[47:0];
      if (r_data != e || r_first != (ridx == 0) || r_last != (ridx == 2*NWD-1) || r_evid != 16'(ev)) begin
        failures++; $display("ev %0d word %0d got %h exp %h", ev, ridx, r_data, e);
      end
      ridx++;
      if (ridx == 2*NWD) begin ridx = 0; void'(exp_ev.pop_front()); end
    end
  end
  initial begin
    w_valid = 0; w_first = 0; w_evid = 0; w_word = 0; l1a_valid = 0; l1a_evid = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int e = 0; e < 60; e++) begin
      for (int k = 0; k < NWD; k++) begin
        w_valid = 1; w_first = (k == 0); w_evid = 16'(e);
        w_word = {$urandom, $urandom, $urandom};
        evtmp[k] = w_word;
        @(negedge clk); w_valid = 0; w_first = 0;
        repeat (2) @(negedge clk);
      end
      written[e] = evtmp;
      // Level-1 decision for an event a few events back (still in its slot)
      if (e >= 3 && (e % 3 == 0)) begin
        l1a_valid = 1; l1a_evid = 16'(e - 3); exp_ev.push_back(e - 3);
        @(negedge clk); l1a_valid = 0;
      end
      repeat ($urandom % 4) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    checks++;
    if (exp_ev.size() != 0 || nref < 5 || wfifo_overflow) begin
      failures++; $display("left %0d refreshes %0d ovf %0b", exp_ev.size(), nref, wfifo_overflow);
    end
    // slot wrap: slot 1 (address 1 << 8) now holds event 49 (49 mod 16 = 1)
    checks++;
    evrd = written[49]; wtmp = evrd[0];
    if (!mem.exists(256) || mem[256] != wtmp[47:0]) begin
      failures++; $display("slot addressing");
    end
    $display("writes %0d reads %0d refreshes %0d", nwr, nrd, nref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
