// tell1_pkg: constants and types shared by the TELL1 readout board RTL.
// The board has four pre-processing FPGAs (PP-FPGAs), each reading six
// 16-bit de-serialized optical links, and one SyncLink-FPGA that builds the
// board's event fragments and sends them to the network.  Between FPGAs data
// travels as 16-bit words tagged with start-of-packet and end-of-packet
// flags (word_t); every such stream uses a valid/ready handshake.  Counter
// widths and the stream format are this design's own choices.
package tell1_pkg;
  localparam int LINK_W       = 16;   // link word width (document)
  localparam int LINKS_PER_PP = 6;    // links per PP-FPGA (document)
  localparam int N_PP         = 4;    // PP-FPGAs per board (document)
  localparam int BCNT_W       = 12;
  localparam int EVCNT_W      = 24;
  localparam int BCNT_MAX     = 3563; // LHC orbit of 3564 bunches
  localparam int ADC_W        = 10;   // 10-bit ADC samples (document)

  typedef struct packed {
    logic        sop;
    logic        eop;
    logic [15:0] data;
  } word_t;

  // Event identification sent from the SyncLink-FPGA to the PP-FPGAs.
  typedef struct packed {
    logic [EVCNT_W-1:0] evcnt;
    logic [BCNT_W-1:0]  bcnt;
  } evid_t;
endpackage
