// xsmul_pkg: shared constants and types of the extended schoolbook multiplier
// (XSMUL) instruction set extension.
//
// The XSMUL works on N coefficients ("chunks") of W bits. Polynomial modes
// treat each chunk as an independent coefficient; integer modes treat the N
// chunks as one N*W-bit little-endian integer (N = 16, W = 17 gives 272 bits).
// Integer addition and subtraction use wider W2-bit chunks. Operands live in
// CPU register halves of XS_SLOT bits. The numbers N = 16, W = 17, W2 = 48,
// the operation codes and the latencies follow the published design; the
// control structs and the slot width used to couple the CPU registers are this
// implementation's own choice.
package xsmul_pkg;

  localparam int unsigned XS_N    = 16;  // multiply & accumulate units
  localparam int unsigned XS_W    = 17;  // multiplication chunk width
  localparam int unsigned XS_W2   = 48;  // addition/subtraction chunk width
  localparam int unsigned XS_SLOT = 16;  // width of one CPU register half
  localparam int unsigned XS_PM_E = 255; // pseudo-Mersenne prime p = 2^255 - 19
  localparam int unsigned XS_PM_K = 19;

  // rs1 field of pq.xsmul: arithmetic modes
  typedef enum logic [3:0] {
    MODE_POLY_MUL = 4'h0,
    MODE_CONV     = 4'h1,
    MODE_MUL_LO   = 4'h2,
    MODE_MUL_HI   = 4'h3,
    MODE_MUL_P25519 = 4'h4,
    MODE_VEC_ADD  = 4'h5,
    MODE_VEC_MAC  = 4'h6,
    MODE_INT_ADD  = 4'h7,
    MODE_INT_SUB  = 4'h8,
    MODE_RING_RED = 4'h9
  } xs_mode_e;

  // rs1 field of pq.xsmul_cfg: configuration operations
  typedef enum logic [1:0] {
    CFG_CLEAR  = 2'h0,
    CFG_BARREL = 2'h1,
    CFG_SHADOW = 2'h2,
    CFG_STALL  = 2'h3
  } xs_cfg_e;

  // Control interface from the instruction decoder (the signal list of the
  // XSMUL control port).
  typedef struct packed {
    logic     enable;          // an XSMUL instruction sits in the ID stage
    logic     go;              // start the arithmetic mode below
    xs_mode_e mode;
    logic     clear;           // clear the multiply & accumulate registers
    logic     barrel_shift;    // xr <- r, b <- xr in one cycle
    logic     shadow_load;     // a <- sa, b <- sb in one cycle
    logic     activate_stall;  // hold the ID stage until ready
  } xs_ctrl_t;

  // Per-cycle strobes from the sequencer to the datapath.
  typedef struct packed {
    logic       clr_acc;   // clear MAC registers (start of a fresh product)
    logic       p_en;      // capture products a*b
    logic [4:0] feed_idx;  // which chunk of a is multiplied
    logic       a_one;     // multiply b by 1 (vector addition)
    logic       a_slot0;   // multiply b by the scalar in a slot 0
    logic       acc_en;    // update the accumulators
    logic       p_use;     // add the product (0: carry-only step)
    logic       ext_add;   // add the xr bank instead of the left neighbour
    logic [4:0] step;      // accumulation step (for negacyclic signs)
    logic       cap_en;    // store the rightmost output chunk
    logic [5:0] cap_idx;   // index of that chunk in the result
    logic       fold_en;   // pseudo-Mersenne fold of the emerging chunk
    logic       add_start; // integer add/sub: load carry
    logic       add_step;  // integer add/sub: process one W2 chunk
    logic [3:0] add_idx;
    logic       last;      // final cycle: write results back
  } xs_strobe_t;

  // Write-back bundle from the XSMUL to the coupled register halves.
  typedef struct packed {
    logic r_we;       // load the r bank
    logic xr_from_r;  // together with r_we: old r moves to xr (result chain)
    logic xr0_we;     // write slot 0 of xr (integer result bits above 256)
    logic [XS_SLOT-1:0] xr0_data;
  } xs_wb_ctl_t;

  // Number of W2-bit chunks that cover an N*W-bit integer.
  function automatic int unsigned xs_add_chunks(int unsigned n, int unsigned w, int unsigned w2);
    return (n * w + w2 - 1) / w2;
  endfunction

  // Latency in CPU cycles of each arithmetic mode, from the cycle the
  // instruction is issued to the cycle it leaves the ID stage (inclusive).
  function automatic int unsigned xs_latency(xs_mode_e m, int unsigned n, int unsigned nadd);
    case (m)
      MODE_POLY_MUL, MODE_CONV, MODE_MUL_LO: return n + 3;
      MODE_MUL_HI:                           return n;
      MODE_MUL_P25519:                       return 2 * n + 3;
      MODE_INT_ADD, MODE_INT_SUB:            return nadd + 1;
      default:                               return 3;
    endcase
  endfunction

endpackage
