// xsmul_ctrl: the XSMUL's finite state machine.
//
// It accepts the control interface of the decoder (go, enable, mode, clear,
// barrel shift, shadow load, activate stall) and turns an arithmetic mode into
// a fixed schedule of datapath strobes, so that every mode takes a constant
// number of cycles (constant-time operation). Cycle 0 is the issue cycle, in
// which go is seen; the mode then runs for L cycles in total and writes its
// results back at the end of cycle L-1. With N units and NADD addition chunks:
//   polynomial mul., convolution, lower-half integer mul.  L = N + 3
//   higher-half integer mul. (continues a lower half)      L = N
//   integer mul. with reduction modulo 2^255 - 19          L = 2N + 3
//   vector add., vector mul.& add., ring reduction         L = 3
//   integer add., integer sub.                             L = NADD + 1
// For N = 16 and NADD = 6 these are 19, 16, 35, 3 and 7 cycles, the published
// latencies. The schedules inside those cycles are this implementation's own:
// a chunk of a is multiplied in cycles 1..N, accumulated one cycle later, and
// the rightmost unit's output is stored in the same cycle it is formed.
// ready is low from the issue cycle of a multi-cycle mode until its last
// cycle; it is high while idle, so configuration operations take one cycle.
module xsmul_ctrl import xsmul_pkg::*; #(
  parameter int unsigned N    = XS_N,
  parameter int unsigned NADD = 6,
  parameter int unsigned FOLD = 15   // chunk index of bit 255 (255 / W)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  xs_ctrl_t   ctrl_i,
  output logic       ready_o,
  output logic       busy_o,
  output xs_mode_e   mode_o,    // mode of the running (or starting) operation
  output logic       active_o,  // an arithmetic mode runs in this cycle
  output xs_strobe_t st_o
);

  logic       busy_q;
  xs_mode_e   mode_q;
  logic [6:0] cnt_q;
  logic       start;
  xs_mode_e   cur_mode;
  logic [6:0] cur_cnt;
  logic [6:0] lat;

  assign start    = !busy_q && ctrl_i.enable && ctrl_i.go;
  assign cur_mode = busy_q ? mode_q : ctrl_i.mode;
  assign cur_cnt  = busy_q ? cnt_q : '0;
  assign lat      = 7'(xs_latency(cur_mode, N, NADD));
  assign active_o = busy_q || start;
  assign mode_o   = cur_mode;
  assign busy_o   = busy_q;

  // Strobe schedule as a function of (mode, cycle).
  always_comb begin
    int unsigned c;
    c    = 32'(cur_cnt);
    st_o = '0;
    if (active_o) begin
      st_o.last = (cur_cnt == lat - 7'd1);
      unique case (cur_mode)
        MODE_POLY_MUL, MODE_CONV, MODE_MUL_LO, MODE_MUL_P25519: begin
          st_o.clr_acc  = (c == 0) && (cur_mode != MODE_POLY_MUL);
          st_o.p_en     = (c >= 1) && (c <= N);
          st_o.feed_idx = 5'(c - 1);
          if (cur_mode == MODE_MUL_P25519) begin
            st_o.acc_en = (c >= 2) && (c <= 2 * N + 1);
            st_o.p_use  = (c <= N + 1);
            st_o.step   = 5'(c - 2);
            st_o.cap_idx = 6'(c - 2);
            st_o.cap_en  = st_o.acc_en && (c - 2 < FOLD);
            st_o.fold_en = st_o.acc_en && (c - 2 >= FOLD) && (c - 2 - FOLD < N);
          end else begin
            st_o.acc_en  = (c >= 2) && (c <= N + 1);
            st_o.p_use   = 1'b1;
            st_o.step    = 5'(c - 2);
            st_o.cap_idx = 6'(c - 2);
            st_o.cap_en  = st_o.acc_en && (cur_mode != MODE_CONV);
          end
        end
        MODE_MUL_HI: begin
          st_o.acc_en  = 1'b1;
          st_o.p_use   = 1'b0;
          st_o.step    = 5'(c);
          st_o.cap_idx = 6'(c);
          st_o.cap_en  = 1'b1;
        end
        MODE_VEC_ADD, MODE_VEC_MAC: begin
          st_o.p_en    = (c == 1);
          st_o.a_one   = (cur_mode == MODE_VEC_ADD);
          st_o.a_slot0 = (cur_mode == MODE_VEC_MAC);
          st_o.acc_en  = (c == 2);
          st_o.p_use   = 1'b1;
          st_o.ext_add = 1'b1;
        end
        MODE_INT_ADD, MODE_INT_SUB: begin
          st_o.add_start = (c == 0);
          st_o.add_step  = (c >= 1);
          st_o.add_idx   = 4'(c - 1);
        end
        default: ;  // ring reduction: result formed in the last cycle
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      mode_q <= MODE_POLY_MUL;
      cnt_q  <= '0;
    end else if (start) begin
      busy_q <= (lat > 7'd1);
      mode_q <= ctrl_i.mode;
      cnt_q  <= 7'd1;
    end else if (busy_q) begin
      if (st_o.last) busy_q <= 1'b0;
      cnt_q <= cnt_q + 7'd1;
    end
  end

  assign ready_o = busy_q ? st_o.last : !start;

  // While an operation runs, the ID stage is stalled on it: no configuration
  // operation may arrive before its last cycle.
  a_no_cfg_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (busy_q && !st_o.last) |-> !(ctrl_i.enable &&
      (ctrl_i.clear || ctrl_i.barrel_shift || ctrl_i.shadow_load)))
    else $error("XSMUL configuration issued while busy");

endmodule
