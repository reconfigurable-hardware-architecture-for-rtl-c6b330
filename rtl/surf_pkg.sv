// surf_pkg: types and sizes shared by the reconfigurable SURF descriptor
// extraction fabric.
//
// Two descriptor extraction units (one per input image) each own two
// accelerator slots and an input and output memory split into two halves,
// so the fabric has four memory halves and four accelerators. A half is
// named by {unit, half}; an accelerator slot by {unit, slot}, flattened to
// index unit*2 + slot.
//
// Sizes: the input memory of one unit is 64 kB and its output memory 2 MB.
// With an 8-byte interest point record and a 64-entry descriptor of 32-bit
// words, both hold 8192 interest points, so each half holds 4096. The record
// layout and the word width are this design's choice; the 64-entry
// descriptor is standard SURF.
package surf_pkg;

  localparam int N_UNITS    = 2;   // extraction units (images A and B)
  localparam int N_SLOTS    = 2;   // accelerator modules per unit
  localparam int N_ACC      = N_UNITS * N_SLOTS;
  localparam int N_HALF     = N_UNITS * 2;

  localparam int DEF_ROWS       = 4096;  // interest points per memory half
  localparam int DEF_DESC_WORDS = 64;    // descriptor length in words
  localparam int DESC_W         = 32;    // descriptor word width (single float)

  // Interest point record, 64 bits: position, scale and orientation as
  // unsigned fixed-point fields; the accelerator interprets them.
  typedef struct packed {
    logic [15:0] x;
    logic [15:0] y;
    logic [15:0] scale;
    logic [15:0] orient;
  } ip_t;

  typedef logic [DESC_W-1:0] desc_word_t;

  // Which memory half an accelerator is coupled to.
  typedef struct packed {
    logic unit;   // 0 = image A unit, 1 = image B unit
    logic half;   // half of that unit's memories
  } half_id_t;

  // Reconfiguration state of the fabric.
  typedef enum logic [1:0] {
    MODE_NORMAL    = 2'd0,  // every unit on its own memories
    MODE_A_HELPS_B = 2'd1,  // unit A done: A's accelerators on B's half 1
    MODE_B_HELPS_A = 2'd2   // unit B done: B's accelerators on A's half 1
  } mode_e;

endpackage
