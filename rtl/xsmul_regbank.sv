// xsmul_regbank: the CPU register halves coupled to the XSMUL.
//
// The XSMUL has no operand ports of its own: its inputs and outputs are wired
// to CPU registers. Six banks of N/2 32-bit registers are modelled, each seen
// by the XSMUL as N slots of 16 bits (register i holds slot 2i in bits 15:0 and
// slot 2i+1 in bits 31:16):
//   a, b   operand banks          (floating point registers)
//   r, xr  result banks           (floating point registers)
//   sa, sb shadow operand banks   (general purpose registers, CPU port only)
// The CPU reads and writes them as ordinary registers (bank select + index).
// Two one-cycle transfers move whole banks at once: shadow load (a <- sa,
// b <- sb) and barrel shift (xr <- r, b <- xr). XSMUL write-back loads r and,
// in polynomial multiplication, moves the old r into xr, which makes r and xr
// one result chain; integer modes also write xr slot 0. The bank list and the
// two transfers follow the published register coupling; the address map,
// the priority (write-back over transfers over CPU writes) and the reset to
// zero are this implementation's own.
// Timing: all writes take effect at the clock edge; reads are combinational.
module xsmul_regbank import xsmul_pkg::*; #(
  parameter int unsigned N    = XS_N,
  parameter int unsigned SLOT = XS_SLOT,
  localparam int unsigned NR  = N / 2,
  localparam int unsigned IB  = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // CPU register port
  input  logic                   cpu_we,
  input  logic [2:0]             cpu_wbank,   // 0 a, 1 b, 2 r, 3 xr, 4 sa, 5 sb
  input  logic [IB-1:0]          cpu_widx,
  input  logic [2*SLOT-1:0]      cpu_wdata,
  input  logic [2:0]             cpu_rbank,
  input  logic [IB-1:0]          cpu_ridx,
  output logic [2*SLOT-1:0]      cpu_rdata,
  // configuration transfers
  input  logic                   barrel_shift,
  input  logic                   shadow_load,
  // XSMUL write-back
  input  xs_wb_ctl_t             wb_i,
  input  logic [N-1:0][SLOT-1:0] wb_r_i,
  // bank contents seen by the XSMUL
  output logic [N-1:0][SLOT-1:0] a_o,
  output logic [N-1:0][SLOT-1:0] b_o,
  output logic [N-1:0][SLOT-1:0] r_o,
  output logic [N-1:0][SLOT-1:0] xr_o
);

  typedef logic [N-1:0][SLOT-1:0] bank_t;

  bank_t bank_q [6];
  bank_t bank_d [6];

  always_comb begin
    for (int k = 0; k < 6; k++) bank_d[k] = bank_q[k];
    // CPU register write
    if (cpu_we && cpu_wbank < 3'd6) begin
      bank_d[cpu_wbank][2*cpu_widx]     = cpu_wdata[SLOT-1:0];
      bank_d[cpu_wbank][2*cpu_widx + 1] = cpu_wdata[2*SLOT-1:SLOT];
    end
    // configuration transfers, all sources read before the edge
    if (barrel_shift) begin
      bank_d[3] = bank_q[2];  // xr <- r
      bank_d[1] = bank_q[3];  // b  <- xr
    end
    if (shadow_load) begin
      bank_d[0] = bank_q[4];  // a <- sa
      bank_d[1] = bank_q[5];  // b <- sb
    end
    // XSMUL write-back
    if (wb_i.r_we) begin
      if (wb_i.xr_from_r) bank_d[3] = bank_q[2];
      bank_d[2] = wb_r_i;
    end
    if (wb_i.xr0_we) bank_d[3][0] = wb_i.xr0_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 6; k++) bank_q[k] <= '0;
    end else begin
      for (int k = 0; k < 6; k++) bank_q[k] <= bank_d[k];
    end
  end

  always_comb begin
    cpu_rdata = '0;
    if (cpu_rbank < 3'd6)
      cpu_rdata = {bank_q[cpu_rbank][2*cpu_ridx + 1], bank_q[cpu_rbank][2*cpu_ridx]};
  end

  assign a_o  = bank_q[0];
  assign b_o  = bank_q[1];
  assign r_o  = bank_q[2];
  assign xr_o = bank_q[3];

endmodule
