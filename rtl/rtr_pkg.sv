// rtr_pkg: types and constants shared by the run-time reconfigurable DSP unit.
//
// The DSP unit has one reconfiguration region (RR1) that holds one of two
// candidate filters at a time. The partial evaluation parameter `sel` picks
// the candidate: 0 selects the recursive filter (filterIIR), 1 selects the
// FIR filter (filterFIR). `sel` is a 4-bit unsigned number, as in the
// functional description of the unit.
//
// Partial bitstream geometry follows the Virtex-4 region used for the unit:
// 3 CLB columns of 16 configuration frames each, 1312 bits per frame, which
// gives 3 * 16 * 1312 = 62976 bits. The 32-bit configuration word width, and
// therefore 41 words per frame, is this design's choice (it matches the
// 32-bit mode of the Virtex-4 configuration access port). The one-word header
// in front of each partial bitstream, carrying the candidate number, is also
// this design's choice: it stands in for the frame contents, which decide the
// region's logic on a real device.
package rtr_pkg;

  // Sample width of the filters (DatainT / DataoutT). Not fixed by the
  // functional description; 16-bit two's complement is this design's choice.
  localparam int unsigned DATA_W = 16;
  typedef logic signed [DATA_W-1:0] sample_t;

  // Partial evaluation parameter: Unsigned D4.
  localparam int unsigned SEL_W = 4;
  typedef logic [SEL_W-1:0] sel_t;

  localparam sel_t SEL_IIR = sel_t'(0);
  localparam sel_t SEL_FIR = sel_t'(1);
  localparam int unsigned NUM_CANDIDATES = 2;

  // Reconfiguration region geometry.
  localparam int unsigned RR_COLUMNS        = 3;
  localparam int unsigned FRAMES_PER_COLUMN = 16;
  localparam int unsigned FRAME_BITS        = 1312;
  localparam int unsigned PBS_BITS          = RR_COLUMNS * FRAMES_PER_COLUMN * FRAME_BITS; // 62976

  // Configuration port word.
  localparam int unsigned CFG_W = 32;
  typedef logic [CFG_W-1:0] cfg_word_t;
  localparam int unsigned FRAME_WORDS = FRAME_BITS / CFG_W;                             // 41
  localparam int unsigned PBS_WORDS   = RR_COLUMNS * FRAMES_PER_COLUMN * FRAME_WORDS;   // 1968

  // Header word: CFG_TAG in bits [31:4], candidate number in bits [3:0].
  localparam logic [CFG_W-SEL_W-1:0] CFG_TAG = 28'hC0F16A5;
  localparam int unsigned BS_WORDS = 1 + PBS_WORDS;                                     // 1969

  function automatic cfg_word_t cfg_header(sel_t id);
    return {CFG_TAG, id};
  endfunction

endpackage
