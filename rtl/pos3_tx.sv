// pos3_tx: transmit side of the POS-PHY Level 3 interface to the Gigabit
// Ethernet mezzanine ("RO-Interface POS-PHY Level 3").
// POS-PHY Level 3 is a FIFO-like packet interface: 32-bit words (tdat) are
// written while tenb is low; tsop and teop mark the packet boundaries, tmod
// on the last word gives the number of unused bytes (0 or 2 here, as packets
// are made of 16-bit words) and tprty is odd parity over tdat.  The link
// layer may start or continue writing only while the PHY's packet-available
// signal ptpa is high.  This block pairs the 16-bit words of its input
// stream, first word in bits [31:16], and drives the interface from
// registers.  The document names the standard only; the signal set follows
// the POS-PHY Level 3 standard for a single-port device.
module pos3_tx
  import tell1_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        i_valid,
  output logic        i_ready,
  input  word_t       i_word,
  input  logic        ptpa,
  output logic [31:0] tdat,
  output logic        tenb,
  output logic        tsop,
  output logic        teop,
  output logic [1:0]  tmod,
  output logic        tprty
);
  logic        have_hi, hi_sop;
  logic [15:0] hi;

  assign i_ready = ptpa;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_hi <= 1'b0; hi_sop <= 1'b0; hi <= '0;
      tdat <= '0; tenb <= 1'b1; tsop <= 1'b0; teop <= 1'b0; tmod <= '0; tprty <= 1'b1;
    end else begin
      tenb <= 1'b1; tsop <= 1'b0; teop <= 1'b0; tmod <= '0;
      if (i_valid && i_ready) begin
        if (!have_hi && !i_word.eop) begin
          have_hi <= 1'b1; hi <= i_word.data; hi_sop <= i_word.sop;
        end else begin
          have_hi <= 1'b0;
          tenb    <= 1'b0;
          if (have_hi) begin
            tdat <= {hi, i_word.data}; tsop <= hi_sop; tmod <= 2'd0;
            tprty <= ~^{hi, i_word.data};
          end else begin
            tdat <= {i_word.data, 16'h0}; tsop <= i_word.sop; tmod <= 2'd2;
            tprty <= ~^i_word.data;
          end
          teop <= i_word.eop;
        end
      end
    end
  end
endmodule
