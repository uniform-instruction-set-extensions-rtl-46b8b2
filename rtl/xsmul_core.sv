// xsmul_core: the extended schoolbook multiplier (XSMUL) itself.
//
// It reads its operands straight from the coupled CPU register halves (banks a,
// b, r and xr of N slots of 16 bits each) and writes its results back to the r
// bank (and, for some modes, xr). Inside are the sequencer (xsmul_ctrl), the N
// multiply & accumulate units (xsmul_array), the 2^255 - 19 fold stage
// (xsmul_pmred) and the 48-bit chunk adder (xsmul_addsub).
//
// Operand formats (this implementation's register coupling):
//  * polynomial modes: slot j of a bank is coefficient j; results are kept
//    modulo 2^16 (enough for power-of-two moduli such as Saber's 2^13).
//  * integer modes: the N slots of a bank form one 16N-bit little-endian
//    integer, split into N chunks of W bits (N*W = 272 bits for N = 16). The
//    result's low 16N bits go to r, bits 16N and up go to xr slot 0.
// Modes (rs1 of pq.xsmul), with the operation performed:
//   0 polynomial mul.   r <- next N coefficients of a*b; the units keep the
//                       upper partial sums so the next block of a continues
//                       the product; the old r moves to xr (result chain)
//   1 convolution       r <- a*b mod (X^N + 1)
//   2 lower-half mul.   r,xr0 <- (A*B) mod 2^(N*W); upper half stays inside
//   3 higher-half mul.  r,xr0 <- (A*B) >> (N*W), drained from mode 2's state
//   4 mul. mod 2^255-19 r,xr0 <- A*B folded once: r_l + 19*r_h (< 2^263)
//   5 vector add.       r_j <- xr_j + b_j
//   6 vector mul.& add. r_j <- xr_j + a_0 * b_j
//   7 integer add.      r,xr0 <- A + B   (W2-bit chunks)
//   8 integer sub.      r,xr0 <- A - B mod 2^(N*W)
//   9 ring reduction    r <- Y * r mod (Y^N + 1) (negacyclic shift by one)
// The set of modes, their latencies and the clear / barrel shift / shadow load
// configuration operations follow the published design; the operand banks of
// the vector modes and the placement of integer results are this
// implementation's choices. Clear (ctrl_i.clear while idle) zeroes the units.
// Timing: see xsmul_ctrl; write-back happens at the end of the last cycle.
module xsmul_core import xsmul_pkg::*; #(
  parameter int unsigned N    = XS_N,
  parameter int unsigned W    = XS_W,
  parameter int unsigned W2   = XS_W2,
  parameter int unsigned SLOT = XS_SLOT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  xs_ctrl_t               ctrl_i,
  input  logic [N-1:0][SLOT-1:0] a_i,
  input  logic [N-1:0][SLOT-1:0] b_i,
  input  logic [N-1:0][SLOT-1:0] r_i,
  input  logic [N-1:0][SLOT-1:0] xr_i,
  output logic                   ready_o,
  output logic                   busy_o,
  output xs_wb_ctl_t             wb_o,
  output logic [N-1:0][SLOT-1:0] r_o
);

  localparam int unsigned IW   = N * W;                      // integer width
  localparam int unsigned NADD = (IW + W2 - 1) / W2;
  localparam int unsigned FOLD = XS_PM_E / W;

  xs_strobe_t st;
  xs_mode_e   mode;
  logic       active;

  xsmul_ctrl #(.N(N), .NADD(NADD), .FOLD(FOLD)) u_ctrl (
    .clk, .rst_n, .ctrl_i, .ready_o, .busy_o,
    .mode_o (mode), .active_o (active), .st_o (st)
  );

  // ---------------- operand chunking ----------------
  logic                    int_mode;
  logic [IW-1:0]           a_int, b_int;
  logic [N-1:0][W-1:0]     a_poly, b_poly, xr_poly, a_chunk, b_chunk;

  always_comb begin
    int_mode  = (mode == MODE_MUL_LO) || (mode == MODE_MUL_HI) || (mode == MODE_MUL_P25519);
    a_int = IW'(a_i);
    b_int = IW'(b_i);
    for (int j = 0; j < N; j++) begin
      a_poly[j]  = W'(a_i[j]);
      b_poly[j]  = W'(b_i[j]);
      xr_poly[j] = W'(xr_i[j]);
      a_chunk[j] = int_mode ? a_int[j*W +: W] : a_poly[j];
      b_chunk[j] = int_mode ? b_int[j*W +: W] : b_poly[j];
    end
  end

  logic [W-1:0] a_feed;
  always_comb begin
    if (st.a_one)        a_feed = W'(1);
    else if (st.a_slot0) a_feed = a_poly[0];
    else                 a_feed = a_chunk[st.feed_idx[$clog2(N)-1:0]];
  end

  // ---------------- multiply & accumulate units ----------------
  logic [N-1:0][W-1:0] low, sum_low;
  logic [W-1:0]        out_next;
  logic                cfg_clear;

  assign cfg_clear = !busy_o && ctrl_i.enable && ctrl_i.clear && !ctrl_i.go;

  xsmul_array #(.N(N), .W(W)) u_array (
    .clk, .rst_n,
    .clear      (st.clr_acc || cfg_clear),
    .a_i        (a_feed),
    .b_i        (b_chunk),
    .ext_i      (xr_poly),
    .p_en       (st.p_en),
    .acc_en     (st.acc_en),
    .p_use      (st.p_use),
    .ext_add_i  (st.ext_add),
    .conv_i     (mode == MODE_CONV),
    .int_i      (int_mode),
    .step_i     (st.step),
    .low_o      (low),
    .carry_o    (),
    .sum_low_o  (sum_low),
    .out_o      (),
    .out_next_o (out_next)
  );

  // ---------------- result buffer and 2^255-19 fold ----------------
  logic [N-1:0][W-1:0] res_q, res_d;
  logic [W-1:0]        fold_low;
  logic [$clog2(N)-1:0] fold_pos;   // position that chunk cap_idx folds onto

  assign fold_pos = $clog2(N)'(st.cap_idx - 6'(FOLD));

  xsmul_pmred #(.W(W), .K(XS_PM_K)) u_pmred (
    .clk, .rst_n,
    .clr     (st.clr_acc),
    .en      (st.fold_en),
    .chunk_i (out_next),
    .low_i   (res_q[fold_pos]),
    .low_o   (fold_low)
  );

  always_comb begin
    res_d = res_q;
    if (st.clr_acc) res_d = '0;
    if (st.cap_en)  res_d[st.cap_idx[$clog2(N)-1:0]] = out_next;
    if (st.fold_en) res_d[fold_pos] = fold_low;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_q <= '0;
    else        res_q <= res_d;
  end

  // ---------------- integer addition / subtraction ----------------
  logic [IW-1:0] add_next;

  xsmul_addsub #(.WIDTH(IW), .W2(W2), .NCH(NADD)) u_addsub (
    .clk, .rst_n,
    .start      (st.add_start),
    .sub_i      (mode == MODE_INT_SUB),
    .step       (st.add_step),
    .idx_i      (st.add_idx),
    .a_i        (a_int),
    .b_i        (b_int),
    .res_o      (),
    .res_next_o (add_next)
  );

  // ---------------- write-back ----------------
  logic [IW-1:0] int_res;
  logic [N*SLOT-1:0] int_low;

  always_comb begin
    int_res = (mode == MODE_INT_ADD || mode == MODE_INT_SUB) ? add_next : IW'(res_d);
    int_low = int_res[N*SLOT-1:0];
    wb_o    = '0;
    r_o     = r_i;
    if (active && st.last) begin
      wb_o.r_we = 1'b1;
      unique case (mode)
        MODE_POLY_MUL: begin
          wb_o.xr_from_r = 1'b1;
          for (int j = 0; j < N; j++) r_o[j] = res_d[j][SLOT-1:0];
        end
        MODE_CONV:
          for (int j = 0; j < N; j++) r_o[j] = low[(j + 1) % N][SLOT-1:0];
        MODE_VEC_ADD, MODE_VEC_MAC:
          for (int j = 0; j < N; j++) r_o[j] = sum_low[j][SLOT-1:0];
        MODE_RING_RED:
          for (int j = 0; j < N; j++) r_o[j] = (j == 0) ? SLOT'(-r_i[N-1]) : r_i[j-1];
        default: begin  // integer modes
          r_o = int_low;
          wb_o.xr0_we   = 1'b1;
          wb_o.xr0_data = SLOT'(int_res >> (N * SLOT));
        end
      endcase
    end
  end

endmodule
