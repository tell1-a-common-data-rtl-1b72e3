// tb_link_sync: drives a reference data valid and delayed link data with
// headers carrying the PCN; checks framing (first/last/channel numbers,
// sample words), the fixed latency of DV_SHIFT+1 cycles and the PCN check,
// including events with a wrong PCN.  Then the same for a link with its own
// data valid (mode 1): framing by link_dv with one cycle latency and the
// header compared with the expected event counter bits.
module tb_link_sync;
  localparam int NS = 8, SH = 4;
  logic clk = 0, rst = 1;
  logic [15:0] link_data;
  logic ref_dv;
  logic [7:0] ref_pcn, ev_ref;
  logic mode, link_dv;
  logic o_valid, o_first, o_last, pcn_err;
  logic [5:0] o_chan;
  logic [15:0] o_word;
  int checks = 0, failures = 0, cyc = 0, nerr = 0;
  link_sync #(.N_SAMPLES(NS), .DV_SHIFT(SH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // expected output words, queued at the time the link carries them
  typedef struct { int t; logic [15:0] w; int ch; logic bad; } exp_t;
  exp_t eq[$];
  task automatic send_event(input logic [7:0] pcn, input bit bad);
    logic [15:0] words [NS+1];
    words[0] = {8'hA5, bad ? pcn ^ 8'h01 : pcn};
    for (int i = 1; i <= NS; i++) words[i] = 16'($urandom);
    fork
      begin // reference Beetle
        ref_dv = 1; ref_pcn = pcn;
        repeat (NS+1) @(negedge clk);
        ref_dv = 0; ref_pcn = 8'h00;
      end
      begin // link, DV_SHIFT cycles later
        repeat (SH) @(negedge clk);
        for (int i = 0; i <= NS; i++) begin
          link_data = words[i];
          eq.push_back('{t: cyc + 1, w: words[i], ch: i, bad: bad});
          @(negedge clk);
        end
        link_data = 16'hFFFF;
      end
    join
  endtask
  task automatic send_own(input logic [7:0] id, input bit bad);
    ev_ref = id;
    for (int i = 0; i <= NS; i++) begin
      link_dv   = 1;
      link_data = (i == 0) ? {8'h5A, bad ? id ^ 8'h10 : id} : 16'($urandom);
      eq.push_back('{t: cyc + 1, w: link_data, ch: i, bad: bad});
      @(negedge clk);
    end
    link_dv = 0; link_data = 16'hFFFF;
  endtask
  always @(posedge clk) if (!rst) begin
    #1;
    if (o_valid) begin
      exp_t e;
      checks++;
      if (eq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = eq.pop_front();
        if (o_word != e.w || o_chan != 6'(e.ch) || o_first != (e.ch == 0) || o_last != (e.ch == NS)
            || cyc != e.t) begin
          failures++; $display("mismatch word %h/%h ch %0d/%0d t %0d/%0d", o_word, e.w, o_chan, e.ch, cyc, e.t);
        end
        if (e.ch == 0) begin
          checks++;
          if (pcn_err != e.bad) begin failures++; $display("pcn_err %0b exp %0b", pcn_err, e.bad); end
          if (pcn_err) nerr++;
        end
      end
    end
  end
  initial begin
    link_data = '1; ref_dv = 0; ref_pcn = 0; mode = 0; link_dv = 0; ev_ref = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int e = 0; e < 20; e++) begin
      send_event(8'(e * 7 + 3), (e % 5) == 2);
      repeat (e % 3) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    mode = 1;
    for (int e = 0; e < 10; e++) begin
      send_own(8'(e * 13 + 1), (e % 4) == 1);
      repeat (e % 3) @(negedge clk);
      ref_dv = (e == 4); // the reference data valid is ignored in mode 1
    end
    ref_dv = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (eq.size() != 0 || nerr != 7) begin failures++; $display("left %0d nerr %0d", eq.size(), nerr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
