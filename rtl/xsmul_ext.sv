// xsmul_ext: the XSMUL instruction set extension as it sits in the
// instruction decode (ID) stage of a small RISC-V core.
//
// The decoder recognises pq.xsmul / pq.xsmul_cfg in the instruction held in
// ID and drives the XSMUL's control interface. The XSMUL core works directly
// on the coupled CPU register halves (xsmul_regbank); configuration operations
// (clear, barrel shift, shadow load) complete in the issue cycle. stall_o is
// the "activate stall" request to the IF/ID pipeline register: it is high while
// an XSMUL instruction is in ID and the XSMUL is not ready, so a mode of
// latency L keeps its instruction in ID for exactly L cycles. The host core's
// own register files, decoder and pipeline are outside this module: the CPU's
// access to the coupled registers is the cpu_* port. The partition follows
// the published ID-stage integration; port names and the register port are
// this implementation's own.
module xsmul_ext import xsmul_pkg::*; #(
  parameter int unsigned N    = XS_N,
  parameter int unsigned W    = XS_W,
  parameter int unsigned W2   = XS_W2,
  parameter int unsigned SLOT = XS_SLOT,
  localparam int unsigned IB  = (N / 2 > 1) ? $clog2(N / 2) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction in the ID stage
  input  logic              id_valid_i,
  input  logic [31:0]       id_instr_i,
  output logic              stall_o,      // activate stall -> IF/ID
  output logic              ready_o,      // XSMUL ready -> ID
  output logic              illegal_o,
  // CPU access to the coupled register halves
  input  logic              cpu_we_i,
  input  logic [2:0]        cpu_wbank_i,
  input  logic [IB-1:0]     cpu_widx_i,
  input  logic [2*SLOT-1:0] cpu_wdata_i,
  input  logic [2:0]        cpu_rbank_i,
  input  logic [IB-1:0]     cpu_ridx_i,
  output logic [2*SLOT-1:0] cpu_rdata_o
);

  xs_ctrl_t              ctrl;
  xs_wb_ctl_t            wb;
  logic [N-1:0][SLOT-1:0] a, b, r, xr, wb_r;
  logic                  busy;
  logic                  cfg_ok;

  xsmul_decoder u_dec (
    .valid_i   (id_valid_i),
    .instr_i   (id_instr_i),
    .ctrl_o    (ctrl),
    .illegal_o (illegal_o)
  );

  // configuration transfers happen once, in a cycle where the XSMUL is idle
  assign cfg_ok = ctrl.enable && !busy;

  xsmul_regbank #(.N(N), .SLOT(SLOT)) u_regs (
    .clk, .rst_n,
    .cpu_we       (cpu_we_i),
    .cpu_wbank    (cpu_wbank_i),
    .cpu_widx     (cpu_widx_i),
    .cpu_wdata    (cpu_wdata_i),
    .cpu_rbank    (cpu_rbank_i),
    .cpu_ridx     (cpu_ridx_i),
    .cpu_rdata    (cpu_rdata_o),
    .barrel_shift (cfg_ok && ctrl.barrel_shift),
    .shadow_load  (cfg_ok && ctrl.shadow_load),
    .wb_i         (wb),
    .wb_r_i       (wb_r),
    .a_o (a), .b_o (b), .r_o (r), .xr_o (xr)
  );

  xsmul_core #(.N(N), .W(W), .W2(W2), .SLOT(SLOT)) u_core (
    .clk, .rst_n,
    .ctrl_i  (ctrl),
    .a_i     (a),
    .b_i     (b),
    .r_i     (r),
    .xr_i    (xr),
    .ready_o (ready_o),
    .busy_o  (busy),
    .wb_o    (wb),
    .r_o     (wb_r)
  );

  assign stall_o = ctrl.enable && ctrl.activate_stall && !ready_o;

endmodule
