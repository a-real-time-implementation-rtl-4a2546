// Shared widths, types and register map of the Viterbi scoring board.
//
// Metric widths follow the design: 16-bit state metrics, 8-bit transition
// and output metrics, four passing-list slots in the processing element.
// The metric encoding is this design's choice: metrics are unsigned, larger
// means more probable, and a state metric of 0 stands for minus infinity
// (a state that cannot be reached). Real state metrics are always >= 1.
// Memory depths, the codebook size and the register map are also choices
// of this design; they are sized for the 100,000-state, 2,000-word case.
package vs_pkg;

  localparam int SM_W    = 16;  // state metric width
  localparam int TM_W    = 8;   // transition metric width
  localparam int OM_W    = 8;   // output metric width
  localparam int NSLOT   = 4;   // passing-list registers in the elastic storage
  localparam int VQ_W    = 8;   // VQ index width (256-entry codebook)
  localparam int STATE_AW = 17; // global state address (131,072 >= 100,000 states)
  localparam int WORD_AW  = 11; // word index (2,048 >= 2,000 words)
  localparam int LOC_W    = 6;  // state index inside a word (up to 64 states)
  localparam int TOPO_W   = 2;  // topology selector stored per word

  typedef logic [SM_W-1:0] smetric_t;
  typedef logic [TM_W-1:0] tmetric_t;
  typedef logic [OM_W-1:0] ometric_t;

  // Minus infinity in the state-metric encoding.
  localparam smetric_t SM_NEG_INF = '0;

  // Normalisation: when the largest metric of a frame reaches NORM_TRIG,
  // every metric read in the next frame is reduced by NORM_SUB.
  localparam smetric_t NORM_TRIG = smetric_t'(1 << (SM_W - 1));
  localparam smetric_t NORM_SUB  = smetric_t'(1 << (SM_W - 2));

  // One word entry of LUT_Memory.
  typedef struct packed {
    logic [TOPO_W-1:0]   topo;    // topology in the topology ROM
    logic [LOC_W:0]      nstates; // number of states, 2 .. 64
    logic [STATE_AW-1:0] base;    // first state's address in A/B/S memories
  } lut_entry_t;
  localparam int LUT_W = $bits(lut_entry_t);

  // One topology ROM entry: elastic storage controls and slot valid mask.
  typedef struct packed {
    logic [NSLOT-1:0] shift; // 1: register loads from upstream, 0: recirculate
    logic [NSLOT-1:0] valid; // slot holds a predecessor of the state computed
  } topo_entry_t;

  // CTLPORT bits (all 0 at reset).
  localparam int CTL_DOWNLOAD  = 0;
  localparam int CTL_START     = 1;
  localparam int CTL_FRAMESYNC = 2;
  localparam int CTL_END       = 3;

  // Host register map (I/O offsets).
  typedef enum logic [2:0] {
    REG_CTL     = 3'd0, // CTLPORT
    REG_VQ      = 3'd1, // VQ index of the next frame
    REG_ADDR_LO = 3'd2, // download address bits 15:0
    REG_ADDR_HI = 3'd3, // download address bits 27:16, target memory in 15:14
    REG_DATA    = 3'd4, // download data; address increments after each write
    REG_NWORDS  = 3'd5, // number of vocabulary words
    REG_STATUS  = 3'd6, // read: status flags
    REG_RESULT  = 3'd7  // read: recognised word index and valid flag
  } reg_t;

  // Download targets.
  typedef enum logic [1:0] {
    MEM_A   = 2'd0, // byte address {state, slot}
    MEM_B   = 2'd1, // byte address {state, VQ index}
    MEM_LUT = 2'd2  // 16-bit halfword address {word, half}
  } mem_sel_t;

endpackage
