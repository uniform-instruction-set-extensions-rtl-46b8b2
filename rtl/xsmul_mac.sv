// xsmul_mac: one multiply & accumulate unit of the XSMUL.
//
// A W x W product a*b is captured in a pipeline register (p_en). In an
// accumulate cycle (acc_en) the unit adds, with configurable signs, the product
// (sub_p negates it, p_use=0 drops it), the addend chosen by the array's input
// multiplexer (add_i: left neighbour's low part, wrapped-around result or an
// external vector operand) and, in integer modes (use_carry), its own carry.
// The 2W+1-bit sum is stored as a (W+1)-bit carry and a W-bit low part: the low
// part moves on to the unit on the right, the carry stays and is added in the
// next cycle. The register split, the product pipeline register and the
// configurable signs follow the published unit; the synchronous clear and the
// separate enables are this implementation's own.
// Timing: product register one cycle after a/b, result register one cycle
// after that. sum_low_o is the combinational low part that is being stored.
module xsmul_mac #(
  parameter int unsigned W = 17
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,     // synchronous clear of all registers
  input  logic [W-1:0]   a_i,
  input  logic [W-1:0]   b_i,
  input  logic           p_en,
  input  logic           acc_en,
  input  logic           p_use,
  input  logic           sub_p,
  input  logic           use_carry,
  input  logic [W-1:0]   add_i,
  output logic [W-1:0]   low_o,
  output logic [W:0]     carry_o,
  output logic [W-1:0]   sum_low_o
);

  logic [2*W-1:0] prod_q;
  logic [W:0]     carry_q;
  logic [W-1:0]   low_q;
  logic [2*W:0]   sum;
  logic [2*W:0]   p_term;

  always_comb begin
    p_term = p_use ? {1'b0, prod_q} : '0;
    if (sub_p) p_term = -p_term;
    sum = p_term + {{(W+1){1'b0}}, add_i} + (use_carry ? {{W{1'b0}}, carry_q} : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q  <= '0;
      carry_q <= '0;
      low_q   <= '0;
    end else if (clear) begin
      prod_q  <= '0;
      carry_q <= '0;
      low_q   <= '0;
    end else begin
      if (p_en) prod_q <= a_i * b_i;
      if (acc_en) begin
        low_q   <= sum[W-1:0];
        carry_q <= use_carry ? sum[2*W:W] : '0;
      end
    end
  end

  assign low_o     = low_q;
  assign carry_o   = carry_q;
  assign sum_low_o = sum[W-1:0];

endmodule
