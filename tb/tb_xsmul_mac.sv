// tb_xsmul_mac: self-checking test of one multiply & accumulate unit.
// Random products are captured and accumulated with every combination of
// product sign, product use, carry use and addend; a behavioural model of the
// 2W+1-bit sum and its (W+1)/W split gives the expected registers. Also checks
// the one-cycle product pipeline (the product appears only after p_en) and the
// synchronous clear.
module tb_xsmul_mac;
  localparam int unsigned W = 17;
  logic clk = 0, rst_n = 0;
  logic clear, p_en, acc_en, p_use, sub_p, use_carry;
  logic [W-1:0] a, b, add, low, sum_low;
  logic [W:0] carry;
  int checks = 0, failures = 0;

  xsmul_mac #(.W(W)) dut (.clk, .rst_n, .clear, .a_i(a), .b_i(b), .p_en, .acc_en,
    .p_use, .sub_p, .use_carry, .add_i(add), .low_o(low), .carry_o(carry), .sum_low_o(sum_low));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [2*W-1:0] m_prod;
  logic [W:0]     m_carry;
  logic [W-1:0]   m_low;
  logic [2*W:0]   m_sum;

  initial begin
    {clear, p_en, acc_en, p_use, sub_p, use_carry} = '0;
    a = '0; b = '0; add = '0;
    m_prod = '0; m_carry = '0; m_low = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      // capture a product
      @(negedge clk);
      a = W'($urandom); b = W'($urandom);
      if (it % 7 == 0) begin a = '1; b = '1; end
      p_en = 1; acc_en = 0;
      @(posedge clk); #1;
      m_prod = a * b;
      p_en = 0;
      // the accumulator must not have moved
      check("hold low", 64'(low), 64'(m_low));
      // accumulate
      @(negedge clk);
      add = W'($urandom);
      if (it % 7 == 0) add = '1;
      p_use = (it % 5) != 4;
      sub_p = (it % 3) == 2;
      use_carry = (it % 4) < 2;
      acc_en = 1;
      m_sum = p_use ? (2*W+1)'(m_prod) : '0;
      if (sub_p) m_sum = -m_sum;
      m_sum = m_sum + (2*W+1)'(add) + (use_carry ? (2*W+1)'(m_carry) : '0);
      #1 check("sum_low comb", 64'(sum_low), 64'(m_sum[W-1:0]));
      @(posedge clk); #1;
      acc_en = 0;
      m_low = m_sum[W-1:0];
      m_carry = use_carry ? m_sum[2*W:W] : '0;
      check("low", 64'(low), 64'(m_low));
      check("carry", 64'(carry), 64'(m_carry));
      if (it % 50 == 49) begin
        @(negedge clk); clear = 1;
        @(posedge clk); #1 clear = 0;
        m_low = '0; m_carry = '0; m_prod = '0;
        check("clear low", 64'(low), 0);
        check("clear carry", 64'(carry), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
