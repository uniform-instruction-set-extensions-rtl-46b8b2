// xsmul_addsub: integer addition and subtraction of two WIDTH-bit integers in
// W2-bit chunks with a 1-bit carry path.
//
// start loads the carry (0 for addition, 1 for subtraction, where the second
// operand is inverted: a - b = a + ~b + 1). Each step cycle adds chunk idx_i of
// both operands plus the carry, stores the W2-bit sum into the result register
// and keeps the carry-out for the next chunk, lowest chunk first. Results wrap
// modulo 2^WIDTH (a borrow is simply lost). The chunk width W2 = 48 and the
// separate 1-bit carry path follow the published design, which uses the 48-bit
// adder of a DSP slice; processing one chunk per cycle through one adder is
// this implementation's choice and gives NCH + 1 cycles for one operation.
// res_next_o is the result including the chunk being processed this cycle.
module xsmul_addsub #(
  parameter int unsigned WIDTH = 272,
  parameter int unsigned W2    = 48,
  parameter int unsigned NCH   = (WIDTH + W2 - 1) / W2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             sub_i,
  input  logic             step,
  input  logic [3:0]       idx_i,
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic [WIDTH-1:0] res_o,
  output logic [WIDTH-1:0] res_next_o
);

  localparam int unsigned PW = NCH * W2;

  logic [PW-1:0]  a_pad, b_pad, res_q, res_d;
  logic [W2-1:0]  a_ch, b_ch;
  logic [W2:0]    sum;
  logic           carry_q, sub_q;

  always_comb begin
    a_pad = PW'(a_i);
    b_pad = PW'(b_i);
    a_ch  = a_pad[idx_i * W2 +: W2];
    b_ch  = b_pad[idx_i * W2 +: W2];
    if (sub_q) b_ch = ~b_ch;
    sum   = {1'b0, a_ch} + {1'b0, b_ch} + {{W2{1'b0}}, carry_q};
    res_d = res_q;
    if (step) res_d[idx_i * W2 +: W2] = sum[W2-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q   <= '0;
      carry_q <= 1'b0;
      sub_q   <= 1'b0;
    end else if (start) begin
      res_q   <= '0;
      carry_q <= sub_i;
      sub_q   <= sub_i;
    end else if (step) begin
      res_q   <= res_d;
      carry_q <= sum[W2];
    end
  end

  assign res_o      = res_q[WIDTH-1:0];
  assign res_next_o = res_d[WIDTH-1:0];

endmodule
