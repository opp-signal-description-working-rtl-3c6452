// opp_pkg: constants and types shared by the core-clock side of the Output
// Port Processor (OPP).
//
// A cell crosses the switch core as sixteen 32-bit words, one per core clock
// (CLK); CELL_CLK marks one clock in sixteen. The 32-bit word reaches the OPP
// as four 8-bit slices, each from one slice of the bit-sliced switch element
// (SE), together with one control bit and one parity bit per slice.
// These numbers are those of the OPP pin description. The rx_word_t struct
// bundles one received word with its cell position and parity check result;
// its layout is this design's own.
package opp_pkg;

  localparam int unsigned WORDS_PER_CELL = 16;  // CLK periods per cell time
  localparam int unsigned WORD_IDX_W     = $clog2(WORDS_PER_CELL);
  localparam int unsigned SE_SLICES      = 4;   // bit slices of one SE
  localparam int unsigned SLICE_W        = 8;   // data bits per slice
  localparam int unsigned WORD_W         = SE_SLICES * SLICE_W;  // 32
  localparam int unsigned TS_W           = 32;  // time stamp width
  localparam int unsigned SAMPLE_LEAD    = 2;   // RESET/CLR_ERR/TIME_SYNC
                                                // sampled 2 edges before
                                                // the CELL_CLK edge

  typedef logic [WORD_IDX_W-1:0] word_idx_t;

  // One word received from the SE slices, after the input register.
  typedef struct packed {
    logic [WORD_W-1:0]    data;    // slice s on bits 8s+7..8s
    logic [SE_SLICES-1:0] ctrl;    // CTRL bit of slice s on bit s
    word_idx_t            word;    // position of the word in its cell
    logic                 soc;     // word == 0
    logic [SE_SLICES-1:0] perr;    // odd parity failed on slice s
  } rx_word_t;

  // Odd parity bit for a vector: the value that makes the total count of ones
  // (vector plus parity bit) odd.
  function automatic logic odd_parity32(input logic [WORD_W-1:0] v);
    return ~(^v);
  endfunction

endpackage
