// hipnet_pkg: widths, types, pipeline latencies and saturating arithmetic shared by
// the pipelined neuron training datapath.
//
// Number formats (all two's complement):
//   weight_t  12-bit stored weight. Its value is w/256; the forward path uses only
//             its 6 most significant bits (value w[11:6]/4).
//   psum_t    sum of three 6-bit weight fields (one synapse unit, 8 bits).
//   sum_t     sum of nine weight fields plus the bias field (10 bits, cannot overflow).
//   err_t     PLA output o_j - d_j, with o_j in units of 1/64 and d_j in {0, 64}.
//   esum_t    sum of three consecutive errors (9 bits).
//   delta_t   accumulated weight increment sent back to the synapse units (8 bits,
//             three 6-bit per-pattern increments), in weight LSBs.
// The 12-bit weight, 6-bit forward field and 6-bit output come from the HiPNeT-1 paper;
// the binary point positions and the 8-bit accumulated increment are this design's choice.
package hipnet_pkg;

  localparam int unsigned WEIGHT_W   = 12;  // stored weight precision
  localparam int unsigned FWDW_W     = 6;   // weight MSBs used in the forward sum
  localparam int unsigned FEAT_W     = 7;   // feature address (127 features, 128 words)
  localparam int unsigned N_WORDS    = 128; // words per weight bank
  localparam int unsigned OUT_W      = 6;   // neuron output o_j
  localparam int unsigned PSUM_W     = FWDW_W + 2;
  localparam int unsigned SUM_W      = FWDW_W + 4;
  localparam int unsigned ERR_W      = OUT_W + 1;
  localparam int unsigned ESUM_W     = ERR_W + 2;
  localparam int unsigned DELTA_W    = 8;
  localparam int unsigned ALPHA_W    = 3;
  localparam int unsigned CLASS_W    = 6;   // up to 64 output neurons / phonemes

  // Pipeline geometry, in cycles, counted from the cycle a feature is at a synapse
  // unit's feature input.
  localparam int unsigned SU_PER_NEURON = 3;  // past, present, future banks
  localparam int unsigned SU_STEP       = 3;  // feature delay between synapse units
  localparam int unsigned UPD_DELAY     = 9;  // feature input -> its weight update
  localparam int unsigned RW_DELAY      = 7;  // read weight on bus -> its weight update
  localparam int unsigned PLA_DELAY     = 5;  // newest frame of a pattern -> PLA cycle
  localparam int unsigned FWD_WINDOW    = 9;  // updates not yet visible to a read

  typedef logic        [FEAT_W-1:0]   feat_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [FWDW_W-1:0]   wfield_t;
  typedef logic signed [PSUM_W-1:0]   psum_t;
  typedef logic signed [SUM_W-1:0]    sum_t;
  typedef logic        [OUT_W-1:0]    out_t;
  typedef logic signed [ERR_W-1:0]    err_t;
  typedef logic signed [ESUM_W-1:0]   esum_t;
  typedef logic signed [DELTA_W-1:0]  delta_t;
  typedef logic        [ALPHA_W-1:0]  alpha_t;
  typedef logic        [CLASS_W-1:0]  class_t;

  // Host access: which storage of a neuron an I/O transfer addresses.
  typedef enum logic [1:0] {
    IO_BANK_PAST    = 2'd0,
    IO_BANK_PRESENT = 2'd1,
    IO_BANK_FUTURE  = 2'd2,
    IO_BIAS         = 2'd3
  } io_sel_e;

  // Forward field of a stored weight.
  function automatic wfield_t wfield(input weight_t w);
    return w[WEIGHT_W-1 -: FWDW_W];
  endfunction

  // Weight plus increment, clamped to the 12-bit range.
  localparam weight_t WEIGHT_MAX = weight_t'((1 << (WEIGHT_W-1)) - 1);
  localparam weight_t WEIGHT_MIN = weight_t'(1 << (WEIGHT_W-1));

  function automatic weight_t sat_weight_add(input weight_t w, input delta_t d);
    logic signed [WEIGHT_W:0] s;
    s = (WEIGHT_W+1)'(w) + (WEIGHT_W+1)'(d);
    if (s > (WEIGHT_W+1)'(WEIGHT_MAX))      return WEIGHT_MAX;
    else if (s < (WEIGHT_W+1)'(WEIGHT_MIN)) return WEIGHT_MIN;
    else                                    return s[WEIGHT_W-1:0];
  endfunction

endpackage
