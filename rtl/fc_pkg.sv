// fc_pkg: types and constants shared by the fuzzy coprocessor blocks.
//
// The coprocessor works on 8-bit inputs, 8-bit membership grades and an 8-bit
// crisp output, and reads its knowledge base memory (KBM) in 15-bit words.
// The 8-bit data path, the 15-bit KBM word, four inputs per rule segment,
// seven input and eight output linguistic values, 256 rules per knowledge base
// and 64 knowledge bases are the published figures of the chip. The bit
// layouts of the words below are this design's own choice, made so that every
// item fits one 15-bit word:
//
//   KBD word 0 (control) : [14] link to KB+1, [13:8] nc-1, [7:0] nr-1
//   KBD word 1           : IMF directory start (15 bits); directory word s
//                          is the start of segment s's four IMF tables
//   KBD word 2           : [9:7] algorithm, [6:0] OMF start page (x256 words)
//   KBD word 3           : SR start address (15 bits)
//   IMF / OMF entry      : [11] second MF hit, [10:8] first MF label, [7:0] grade
//   SR word              : [14:12] OMF index, [11:0] four 3-bit linguistic
//                          values, lane 0 in [2:0]; value 0 means "input not used"
//
// The KBD of knowledge base k sits at word address 4*k.
package fc_pkg;

  localparam int unsigned DW       = 8;    // data / grade resolution
  localparam int unsigned KW       = 15;   // KBM word width
  localparam int unsigned KAW      = 15;   // KBM word address width
  localparam int unsigned LANES    = 4;    // inputs per rule segment
  localparam int unsigned N_OMF    = 8;    // output membership functions
  localparam int unsigned MAX_NR   = 256;  // rules per knowledge base
  localparam int unsigned N_KB     = 64;   // knowledge bases
  localparam int unsigned RO       = 8;    // output resolution (bits)
  localparam int unsigned N_X      = 1 << RO; // output points swept

  typedef logic [DW-1:0]  grade_t;
  typedef logic [KW-1:0]  kword_t;
  typedef logic [KAW-1:0] kaddr_t;

  // Algorithm select: one bit per stage, eight combinations.
  typedef struct packed {
    logic mom;        // defuzzifier: 1 = Mean of Maxima, 0 = Centre of Gravity
    logic inf_bsum;   // inference:   1 = bounded sum,    0 = MAX
    logic rule_bsum;  // aggregation: 1 = bounded sum,    0 = MAX
  } algo_t;

  // Look-up entry of an input or output membership function table.
  typedef struct packed {
    logic [2:0] spare;
    logic       nxt;   // label+1 is hit too, with grade 255-mu
    logic [2:0] lbl;   // first hit label
    grade_t     mu;    // grade of label lbl
  } mf_entry_t;

  // One rule segment: four antecedents and the consequent OMF.
  typedef struct packed {
    logic [2:0]            omf;
    logic [LANES-1:0][2:0] lv;
  } rule_word_t;

  typedef struct packed {
    logic       link;
    logic [5:0] nc_m1;
    logic [7:0] nr_m1;
  } kbd_ctrl_t;

  typedef struct packed {
    logic [4:0] spare;
    algo_t      algo;
    logic [6:0] omf_page;
  } kbd_omf_t;

  // Kinds of KBM read the controller asks the KBM interface for.
  typedef enum logic [2:0] {
    KBM_NONE = 3'd0,
    KBM_KBD  = 3'd1,
    KBM_IMF  = 3'd2,
    KBM_SR   = 3'd3,
    KBM_OMF  = 3'd4,
    KBM_DIR  = 3'd5
  } kbm_req_e;

  // Saturating 8-bit addition (bounded sum).
  function automatic grade_t bsum(grade_t a, grade_t b);
    logic [DW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[DW] ? '1 : s[DW-1:0];
  endfunction

  function automatic grade_t gmin(grade_t a, grade_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic grade_t gmax(grade_t a, grade_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
