// xsmul_array: the N cascaded multiply & accumulate units of the XSMUL.
//
// Unit j multiplies the broadcast coefficient a by its own b_j. The units are
// chained right to left: unit j adds the low part of unit j+1, so the rightmost
// unit (j = 0) emits one result coefficient r_k per accumulate step. Unit N-1
// adds zero (plain schoolbook product), or the rightmost unit's low part
// (wrapped convolution, conv_i). In convolution mode unit j subtracts its
// product whenever step_i + j >= N, which turns the cyclic wrap into the
// negacyclic reduction modulo X^N + 1. With ext_add_i every unit instead adds
// its own external operand ext_i (vector addition / multiply-add). Integer
// modes (int_i) keep the carries. The chain and wrap-around follow the
// published structure; the per-unit sign rule for X^N + 1 is this
// implementation's way of using the configurable adder signs.
// Outputs: low and carry registers of every unit, and out_o / out_next_o, the
// rightmost unit's stored and about-to-be-stored low part.
module xsmul_array #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 17
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [W-1:0]         a_i,
  input  logic [N-1:0][W-1:0]  b_i,
  input  logic [N-1:0][W-1:0]  ext_i,
  input  logic                 p_en,
  input  logic                 acc_en,
  input  logic                 p_use,
  input  logic                 ext_add_i,
  input  logic                 conv_i,
  input  logic                 int_i,
  input  logic [4:0]           step_i,
  output logic [N-1:0][W-1:0]  low_o,
  output logic [N-1:0][W:0]    carry_o,
  output logic [N-1:0][W-1:0]  sum_low_o,
  output logic [W-1:0]         out_o,
  output logic [W-1:0]         out_next_o
);

  logic [N-1:0][W-1:0] add_in;
  logic [N-1:0]        sub_p;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      if (ext_add_i)      add_in[j] = ext_i[j];
      else if (j < N - 1) add_in[j] = low_o[(j + 1) % N];
      else                add_in[j] = conv_i ? low_o[0] : '0;
      sub_p[j] = conv_i && ((32'(step_i) + 32'(j)) >= 32'(N));
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_unit
    xsmul_mac #(.W(W)) u_mac (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (clear),
      .a_i       (a_i),
      .b_i       (b_i[j]),
      .p_en      (p_en),
      .acc_en    (acc_en),
      .p_use     (p_use),
      .sub_p     (sub_p[j]),
      .use_carry (int_i),
      .add_i     (add_in[j]),
      .low_o     (low_o[j]),
      .carry_o   (carry_o[j]),
      .sum_low_o (sum_low_o[j])
    );
  end

  assign out_o      = low_o[0];
  assign out_next_o = sum_low_o[0];

endmodule
