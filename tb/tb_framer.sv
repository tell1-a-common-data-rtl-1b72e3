// tb_framer: a header template, MEP buffer contents and descriptors are
// prepared; the framer's packets are checked word by word: template words,
// total length, destination address, a header checksum that verifies (one's
// complement sum of the IPv4 header is 0xFFFF), the MEP header word with
// frame and event counts, the MEP words, sop/eop and the freed word count.
// MEPs larger than one Ethernet frame are included.
module tb_framer;
  import tell1_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst = 1;
  logic desc_valid, desc_pop, dest_valid, dest_pop, free_word, o_valid, o_ready;
  logic [AW+23:0] desc; logic [31:0] dest_ip;
  logic [4:0] hdr_raddr; logic [15:0] hdr_rdata, buf_rdata;
  logic [AW-1:0] buf_raddr;
  word_t o_word;
  int checks = 0, failures = 0, nfree = 0, npk = 0, nbig = 0;
  logic [15:0] hdr [17]; logic [15:0] bufm [2**AW];
  logic [AW+23:0] dq[$]; logic [31:0] iq[$];
  word_t q[$];
  framer #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  assign hdr_rdata  = hdr[hdr_raddr];
  always @(posedge clk) buf_rdata <= bufm[buf_raddr];
  assign desc_valid = dq.size() > 0;
  assign desc       = dq.size() > 0 ? dq[0] : '0;
  assign dest_valid = iq.size() > 0;
  assign dest_ip    = iq.size() > 0 ? iq[0] : '0;
  always @(negedge clk) o_ready = ($urandom % 4) != 0;
  logic [15:0] pk[$];
  always @(posedge clk) if (!rst) begin
    if (desc_pop) fork begin #1; void'(dq.pop_front()); end join_none;
    if (dest_pop) fork begin #1; void'(iq.pop_front()); end join_none;
    if (free_word) nfree++;
    if (o_valid && o_ready) begin
      word_t x; checks++;
      if (q.size() == 0) begin failures++; $display("extra"); end
      else begin
        x = q.pop_front();
        pk.push_back(o_word.data);
        // checksum word is computed by the checker below, not predicted
        if (pk.size() != 13 && o_word != x) begin failures++; $display("word %0d got %p exp %p", pk.size() - 1, o_word, x); end
        if (o_word.eop) begin
          int s; s = 0;
          for (int i = 7; i < 17; i++) s += pk[i];
          while (s > 16'hFFFF) s = (s & 16'hFFFF) + (s >> 16);
          checks++;
          if (s != 16'hFFFF) begin failures++; $display("checksum sum %h", s); end
          pk.delete(); npk++;
        end
      end
    end
  end
  initial begin
    int start; start = 0;
    for (int i = 0; i < 17; i++) hdr[i] = 16'($urandom);
    hdr[7] = 16'h4500;
    for (int i = 0; i < 2**AW; i++) bufm[i] = 16'($urandom);
    for (int m = 0; m < 12; m++) begin
      int len, ne, bytes, fr; logic [31:0] ip;
      len = (m % 4 == 3) ? 900 + $urandom % 600 : 1 + $urandom % 40;
      ne = 1 + m; ip = $urandom;
      bytes = 22 + 2 * len;
      fr = (bytes - 20 + 1479) / 1480;
      if (fr > 1) nbig++;
      dq.push_back({AW'(start), 16'(len), 8'(ne)}); iq.push_back(ip);
      for (int i = 0; i < 17; i++) begin
        logic [15:0] d;
        d = (i == 8) ? 16'(bytes) : (i == 12) ? 16'h0 : (i == 15) ? ip[31:16] : (i == 16) ? ip[15:0] : hdr[i];
        q.push_back('{sop: i == 0, eop: 0, data: d});
      end
      q.push_back('{sop: 0, eop: 0, data: {8'(fr), 8'(ne)}});
      for (int i = 0; i < len; i++) q.push_back('{sop: 0, eop: i == len-1, data: bufm[AW'(start + i)]});
      start = (start + len) % (2**AW);
    end
    repeat (3) @(negedge clk); rst = 0;
    repeat (12000) @(negedge clk);
    checks++;
    if (q.size() != 0 || npk != 12 || dq.size() != 0 || iq.size() != 0 || nbig == 0) begin
      failures++; $display("left %0d packets %0d", q.size(), npk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
