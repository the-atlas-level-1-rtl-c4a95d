// muctpi_pkg: types and constants shared by the octant (MIOCT) trigger logic.
//
// A muon candidate from the trigger sector logic is a pT threshold number and a
// Region-of-Interest (RoI) number. pT threshold 0 means "no candidate"; 1..6
// are the six pT thresholds of the Level-1 muon trigger. One octant has 13
// sectors (4 barrel, 6 end-cap, 3 forward) with up to two candidates each,
// 26 candidates in all. The topological word sent per bunch crossing (BC)
// is 8 bits: eta code [7:5], phi code [4:2], pT code [1:0].
// The 3-bit pT field, the 8-bit RoI field, the sector order inside the
// octant, the eta code meaning "no candidate" and the training pattern value
// are choices of this implementation.
package muctpi_pkg;

  localparam int N_SECT  = 13;           // sectors per octant
  localparam int N_CAND  = 2 * N_SECT;   // candidates per octant (26)
  localparam int N_THR   = 6;            // pT thresholds
  localparam int PT_W    = 3;            // 0 = none, 1..6 = threshold
  localparam int ROI_W   = 8;            // widest RoI number (end-cap sectors)
  localparam int SECT_W  = 4;            // sector number inside the octant, 0..12
  localparam int MULT_W  = 3;            // multiplicity per threshold, saturating
  localparam int LUT_AW  = SECT_W + ROI_W;

  typedef struct packed {
    logic [PT_W-1:0]  pt;
    logic [ROI_W-1:0] roi;
  } cand_t;

  typedef struct packed {
    logic              valid;
    logic [SECT_W-1:0] sector;
    logic [ROI_W-1:0]  roi;
    logic [PT_W-1:0]   pt;
  } sorted_cand_t;

  typedef struct packed {
    logic [2:0] eta;
    logic [2:0] phi;
    logic [1:0] pt;
  } topo_word_t;

  // Number of candidates left after the veto: none, one, two, more than two.
  typedef enum logic [1:0] {
    NCAND_ZERO = 2'd0,
    NCAND_ONE  = 2'd1,
    NCAND_TWO  = 2'd2,
    NCAND_MORE = 2'd3
  } ncand_e;

  // Serializer source.
  typedef enum logic [1:0] {
    SER_DATA  = 2'd0,   // topological words
    SER_TRAIN = 2'd1,   // fixed 16-bit training pattern
    SER_PRBS  = 2'd2    // PRBS-31 test sequence
  } ser_mode_e;

  localparam logic [2:0]  ETA_NONE      = 3'b111;   // eta code used for "no candidate"
  localparam logic [1:0]  PT2_MORE      = 2'b11;    // 2nd-candidate pT code: more than two
  localparam logic [15:0] TRAIN_PATTERN = 16'hFE01; // first byte is the alignment word

endpackage
