// rod_pkg: types and constants shared by the ROD FPGA event builder.
//
// It fixes the widths of the event identifiers, the layout of the ROD
// frame (a 9-word header, the left and right RX/SL frames, a 4-word footer)
// and the word format this design assumes for the RX/SL frames and for the
// S-Link control words. The 9-word header follows the ATLAS ROD fragment
// header (start marker, header size, format version, source ID, run number,
// L1 ID, BCID, trigger type, event type); the footer carries error flags,
// build time, data word count and total frame length. The RX/SL frame
// format, the footer order and all marker values other than the ATLAS
// header marker are choices of this design.
package rod_pkg;

  localparam int unsigned DATA_W   = 32;   // RODbus and S-Link word width
  localparam int unsigned EVID_W   = 24;   // extended L1 ID width
  localparam int unsigned BCID_W   = 12;   // bunch crossing ID width
  localparam int unsigned HDR_WORDS = 9;   // ROD frame header length
  localparam int unsigned FTR_WORDS = 4;   // ROD frame footer length

  // EVID FIFO entry: one accepted trigger.
  typedef struct packed {
    logic [EVID_W-1:0] evid;
    logic [BCID_W-1:0] bcid;
  } trig_t;

  // S-Link FIFO / VME FIFO entry: one frame word, last marks the footer end.
  typedef struct packed {
    logic              last;
    logic [DATA_W-1:0] data;
  } oword_t;

  // ROD header constants.
  localparam logic [31:0] ROD_SOF     = 32'hEE12_34EE;
  localparam logic [31:0] ROD_HDR_SZ  = 32'd9;
  localparam logic [31:0] ROD_FMT_VER = 32'h0301_0000;

  // RX/SL frame: header {4'hA, evid[11:0], bcid[11:0], 4'h0},
  // payload words, trailer {4'hF, 12'h0, payload word count[15:0]}.
  localparam logic [3:0] RX_HDR_TAG = 4'hA;
  localparam logic [3:0] RX_TRL_TAG = 4'hF;

  // S-Link control words sent around each fragment.
  localparam logic [31:0] SLINK_BOF = 32'hB0F0_0000;
  localparam logic [31:0] SLINK_EOF = 32'hE0F0_0000;

  // 8b/10b control characters used on the GTP links.
  localparam logic [7:0] K28_5 = 8'hBC;    // comma, idle
  localparam logic [7:0] K28_0 = 8'h1C;    // S-Link control word marker
  localparam logic [7:0] D16_2 = 8'h50;    // second byte of an idle word

  // Footer status flag bits, per RX side (left in [3:0], right in [7:4]).
  localparam int unsigned ERR_HDR     = 0; // first word was not a header
  localparam int unsigned ERR_ID      = 1; // EVID/BCID did not match TTC
  localparam int unsigned ERR_LEN     = 2; // trailer count != words seen
  localparam int unsigned ERR_TIMEOUT = 3; // no frame within the timeout

  typedef enum logic [3:0] {
    S0_PREPARE, S1_EVID_EMPTY, S2_READ_EVID, S3_WRITE_HEADER,
    S_READ_LEFT, S_READ_RIGHT, S4_WRITE_FOOTER
  } fm_state_t;

endpackage
