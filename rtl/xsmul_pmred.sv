// xsmul_pmred: pseudo-Mersenne fold stage for multiplication modulo
// p = 2^E - K (Curve25519: E = 255, K = 19).
//
// When E is a multiple of the chunk width W, bit E is the start of chunk E/W,
// so the product r = r_h * 2^E + r_l satisfies r = K * r_h + r_l (mod p). The
// chunks of r_h leave the multiplier array one per cycle, lowest first, while
// the chunks of r_l are already stored. For every emerging chunk c of r_h this
// stage computes K*c + (stored chunk at the fold position) + its carry, hands
// back the new W-bit chunk and keeps the carry for the next position. The fold
// is a single weak reduction step: for two 256-bit operands the result is below
// 2^263. The published design merges this multiply-add into the rightmost
// multiply & accumulate unit; here it is a separate small stage behind it with
// the same cycle behaviour (no extra cycle).
// Timing: chunk_i/low_i in, low_o combinational, carry stored on en.
module xsmul_pmred #(
  parameter int unsigned W = 17,
  parameter int unsigned K = 19
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,     // start of a new product: carry <- 0
  input  logic         en,      // fold chunk_i into low_i
  input  logic [W-1:0] chunk_i, // emerging chunk of the high part
  input  logic [W-1:0] low_i,   // stored chunk at the fold position
  output logic [W-1:0] low_o    // new chunk at the fold position
);

  localparam int unsigned KB = $clog2(K + 1);
  logic [W+KB:0]   acc;
  logic [KB:0]     carry_q;

  always_comb begin
    acc = (W+KB+1)'(chunk_i) * (W+KB+1)'(K) + (W+KB+1)'(low_i) + (W+KB+1)'(carry_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   carry_q <= '0;
    else if (clr) carry_q <= '0;
    else if (en)  carry_q <= acc[W+KB:W];
  end

  assign low_o = acc[W-1:0];

endmodule
