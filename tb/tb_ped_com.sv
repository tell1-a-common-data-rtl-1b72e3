// tb_ped_com: loads random pedestals and channel masks, sends events with a
// random common-mode offset and checks every corrected sample against a
// model (pedestal subtraction, mean of unmasked channels truncated toward
// zero, masked channels zero) and the latency from the last input sample.
module tb_ped_com;
  localparam int N = 32;
  logic clk = 0, rst = 1;
  logic i_valid, i_first, i_last, cfg_we, cfg_mask;
  logic [4:0] i_chan, cfg_chan, o_chan;
  logic [9:0] i_adc, cfg_ped;
  logic o_valid, o_first, o_last;
  logic signed [11:0] o_val;
  int checks = 0, failures = 0, cyc = 0, last_t = 0, nev = 0;
  int ped [N]; bit msk [N];
  int expq[$]; int exp_t[$];
  ped_com #(.N_CH(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int k = 0;
  always @(posedge clk) if (!rst) begin
    #1;
    if (o_valid) begin
      checks++;
      if (k >= expq.size()) begin failures++; $display("extra output"); end
      else if (o_val !== 12'(expq[k]) || o_chan != 5'(k % N) || o_first != (k % N == 0) || o_last != (k % N == N-1)) begin
        failures++; $display("ev %0d ch %0d got %0d exp %0d", k / N, k % N, o_val, expq[k]);
      end
      if (k % N == 0) begin
        checks++;
        if (cyc != exp_t[k / N]) begin failures++; $display("latency: t=%0d exp %0d", cyc, exp_t[k/N]); end
      end
      k++;
    end
  end
  initial begin
    i_valid = 0; i_first = 0; i_last = 0; i_chan = 0; i_adc = 0; cfg_we = 0; cfg_chan = 0; cfg_ped = 0; cfg_mask = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int c = 0; c < N; c++) begin
      ped[c] = 100 + $urandom % 200; msk[c] = ($urandom % 8) == 0;
      cfg_we = 1; cfg_chan = 5'(c); cfg_ped = 10'(ped[c]); cfg_mask = msk[c];
      @(negedge clk);
    end
    cfg_we = 0;
    for (int e = 0; e < 40; e++) begin
      int adc [N]; int sum, cnt, cm, cmn;
      sum = 0; cnt = 0;
      cmn = int'($urandom % 121) - 60;
      for (int c = 0; c < N; c++) begin
        adc[c] = ped[c] + cmn + int'($urandom % 21) - 10 + (($urandom % 10) == 0 ? 200 : 0);
        if (adc[c] < 0) adc[c] = 0; if (adc[c] > 1023) adc[c] = 1023;
        if (!msk[c]) begin sum += adc[c] - ped[c]; cnt++; end
      end
      cm = (cnt == 0) ? 0 : sum / cnt;
      for (int c = 0; c < N; c++) expq.push_back(msk[c] ? 0 : adc[c] - ped[c] - cm);
      for (int c = 0; c < N; c++) begin
        i_valid = 1; i_first = (c == 0); i_last = (c == N-1); i_chan = 5'(c); i_adc = 10'(adc[c]);
        if (c == N-1) exp_t.push_back(cyc + 2);
        @(negedge clk);
      end
      i_valid = 0; i_first = 0; i_last = 0;
      repeat (1 + e % 4) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    checks++;
    if (k != 40 * N) begin failures++; $display("outputs %0d", k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
