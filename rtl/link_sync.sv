// link_sync: event synchronisation of one optical link from a Beetle
// front-end chip ("Sync" in the PP-FPGA).
// A Beetle sends, as its only event identification, the Pipeline Column
// Number (PCN) in the event header.  A local reference Beetle (on the FEM
// card) gives a data-valid signal with a fixed time shift to the link data,
// plus its own PCN.  This block delays the reference data valid by DV_SHIFT
// cycles to frame the link data, takes the first framed word as the header
// and compares its PCN (bits [7:0]) with the reference PCN sampled when
// ref_dv rose, then numbers the N_SAMPLES sample words that follow.
// Links from other front-end chips (mode = 1) carry their own data valid
// (link_dv, the link's flow-control bit) and, in the header, the lower bits
// of the Level-0 event counter: then link_dv frames the data without delay
// and header bits [7:0] are compared with ev_ref, the expected event counter
// bits.  Outputs are registered: o_first marks the header word (o_chan = 0),
// o_last the last sample; pcn_err (identification mismatch) is valid from
// the word after the header to the end of the event.  The two link types,
// the fixed-shift framing and the header comparison follow the document;
// header layout, N_SAMPLES and DV_SHIFT are own choices.
module link_sync #(
  parameter int N_SAMPLES = 32,
  parameter int DV_SHIFT  = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] link_data,
  input  logic        ref_dv,
  input  logic [7:0]  ref_pcn,
  input  logic        mode,      // 0: reference Beetle framing, 1: link_dv
  input  logic        link_dv,
  input  logic [7:0]  ev_ref,
  output logic        o_valid,
  output logic        o_first,
  output logic        o_last,
  output logic [5:0]  o_chan,   // 0 = header, 1..N_SAMPLES = samples
  output logic [15:0] o_word,
  output logic        pcn_err
);
  logic [DV_SHIFT-1:0] dv_dly;
  logic [7:0]        pcn_ref_q;
  logic              ref_dv_q;
  logic              in_ev;
  logic [5:0]        cnt;
  logic              dv_s;

  assign dv_s = mode ? link_dv : dv_dly[DV_SHIFT-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      dv_dly <= '0; ref_dv_q <= 1'b0; pcn_ref_q <= '0;
      in_ev <= 1'b0; cnt <= '0;
      o_valid <= 1'b0; o_first <= 1'b0; o_last <= 1'b0;
      o_chan <= '0; o_word <= '0; pcn_err <= 1'b0;
    end else begin
      dv_dly   <= DV_SHIFT'({dv_dly, ref_dv});
      ref_dv_q <= ref_dv;
      if (ref_dv && !ref_dv_q) pcn_ref_q <= ref_pcn;
      o_valid <= 1'b0; o_first <= 1'b0; o_last <= 1'b0;
      if (dv_s && !in_ev) begin
        // header word of a new event
        in_ev   <= 1'b1;
        cnt     <= 6'd1;
        o_valid <= 1'b1; o_first <= 1'b1; o_chan <= '0; o_word <= link_data;
        pcn_err <= (link_data[7:0] != (mode ? ev_ref : pcn_ref_q));
      end else if (in_ev) begin
        o_valid <= 1'b1; o_chan <= cnt; o_word <= link_data;
        o_last  <= (cnt == 6'(N_SAMPLES));
        if (cnt == 6'(N_SAMPLES)) in_ev <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
