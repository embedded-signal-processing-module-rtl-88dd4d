// dsp_pkg: types and constants shared by the data fragment builder.
//
// The fragment layout follows the field list of the proposed data fragment
// format: an 8-word header (start marker, header size, format version, source
// identifier, run number, primary trigger ID, time index k, primary trigger
// decision), one sub-fragment per packet controller (start marker, size,
// type, data words) and a 3-word trailer (number of status elements, number
// of data elements, end marker). The marker values, the format version and
// the type codes are this design's own choices; the document gives only the
// field names.
package dsp_pkg;

  localparam int unsigned WORD_W = 32;

  localparam logic [31:0] HEADER_MARKER  = 32'hEE12_34EE;
  localparam logic [31:0] SUBFRAG_MARKER = 32'hDD12_34DD;
  localparam logic [31:0] END_MARKER     = 32'hE0DA_0E0D;
  localparam logic [31:0] FORMAT_VERSION = 32'h0001_0000;

  localparam int unsigned HEADER_WORDS  = 8;
  localparam int unsigned SUBHDR_WORDS  = 3;
  localparam int unsigned TRAILER_WORDS = 3;

  // Sub-fragment type codes (upper byte of the type word; the low 16 bits
  // carry the channel number).
  localparam logic [7:0] TYPE_GENERIC = 8'h01;
  localparam logic [7:0] TYPE_ADC     = 8'h02;

  // Information the trigger control unit keeps for each accepted trigger.
  typedef struct packed {
    logic [31:0] trig_id;    // running number of the primary trigger
    logic [31:0] time_index; // clock index k at which the trigger arrived
    logic [31:0] decision;   // primary trigger decision word
    logic [7:0]  l1_addr;    // L1 write pointer at the trigger (reference address)
  } trig_info_t;

  // Packer states, as named for the packer FSM.
  typedef enum logic [2:0] {
    PK_IDLE,
    PK_HEADER,
    PK_DATA_HEADER,
    PK_DATA,
    PK_TRAILER
  } pk_state_t;

  // Number of 32-bit words an event occupies in an L2 memory.
  function automatic int unsigned words_per_event(int unsigned sample_w, int unsigned win);
    int unsigned spw;
    spw = WORD_W / sample_w;
    return (win + spw - 1) / spw;
  endfunction

endpackage
