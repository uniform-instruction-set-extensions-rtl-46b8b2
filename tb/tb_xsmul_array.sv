// tb_xsmul_array: self-checking test of the chain of multiply & accumulate
// units on its own, driven the way the sequencer drives it.
//  * polynomial mode: one a coefficient per cycle; the rightmost output must
//    be the schoolbook product coefficient r_k (mod 2^W), and after N steps
//    units 1..N-1 must hold the partial sums of r_N .. r_2N-2;
//  * convolution mode: after N steps unit (c+1) mod N holds coefficient c of
//    a*b mod (X^N + 1);
//  * integer mode: 2N steps (N with products, N carry-only) emit the W-bit
//    chunks of the integer product;
//  * external-add mode: every unit stores b_j + ext_j.
// Uses N = 4 units to keep the expected values easy to follow.
module tb_xsmul_array;
  localparam int unsigned N = 4, W = 17;
  logic clk = 0, rst_n = 0;
  logic clear, p_en, acc_en, p_use, ext_add, conv, intm;
  logic [4:0] step;
  logic [W-1:0] a, out_q, out_next;
  logic [N-1:0][W-1:0] b, ext, low, sum_low;
  logic [N-1:0][W:0] carry;
  int checks = 0, failures = 0;

  xsmul_array #(.N(N), .W(W)) dut (.clk, .rst_n, .clear, .a_i(a), .b_i(b), .ext_i(ext),
    .p_en, .acc_en, .p_use, .ext_add_i(ext_add), .conv_i(conv), .int_i(intm), .step_i(step),
    .low_o(low), .carry_o(carry), .sum_low_o(sum_low), .out_o(out_q), .out_next_o(out_next));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  logic [W-1:0] av [2*N];
  logic [W-1:0] pc [2*N];
  logic [W-1:0] em [2*N];
  logic [255:0] ai, bi, pi;

  // feed av[0..n-1], products in cycle k, accumulate in cycle k+1
  task automatic run(int steps, int nprod);
    for (int c = 0; c <= steps; c++) begin
      @(negedge clk);
      p_en   = (c < nprod);
      a      = (c < nprod) ? av[c] : '0;
      acc_en = (c >= 1);
      p_use  = (c >= 1) && (c <= nprod);
      step   = 5'(c - 1);
      if (c >= 1 && c <= 2 * N) begin
        #1 em[c - 1] = out_next;
      end
    end
    @(posedge clk); #1;
    {p_en, acc_en, p_use} = '0;
  endtask

  task automatic do_clear();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
  endtask

  initial begin
    {clear, p_en, acc_en, p_use, ext_add, conv, intm} = '0;
    step = '0; a = '0; b = '0; ext = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int j = 0; j < N; j++) begin b[j] = W'($urandom); av[j] = W'($urandom); ext[j] = W'($urandom); end
      if (t == 0) for (int j = 0; j < N; j++) begin b[j] = '1; av[j] = '1; end
      // polynomial
      conv = 0; intm = 0; ext_add = 0;
      for (int k = 0; k < 2 * N; k++) pc[k] = '0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) pc[i + j] += av[i] * b[j];
      do_clear();
      run(N, N);
      for (int k = 0; k < N; k++) check("poly out", 128'(em[k]), 128'(pc[k]));
      for (int j = 1; j < N; j++) check("poly partial", 128'(low[j]), 128'(pc[N - 1 + j]));
      // negacyclic convolution
      conv = 1;
      for (int k = 0; k < N; k++) pc[k] = '0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        if (i + j < N) pc[i + j] += av[i] * b[j]; else pc[i + j - N] -= av[i] * b[j];
      do_clear();
      run(N, N);
      for (int c = 0; c < N; c++) check("conv coeff", 128'(low[(c + 1) % N]), 128'(pc[c]));
      // integer product
      conv = 0; intm = 1;
      ai = '0; bi = '0;
      for (int j = 0; j < N; j++) begin ai |= 256'(av[j]) << (W * j); bi |= 256'(b[j]) << (W * j); end
      pi = ai * bi;
      do_clear();
      run(2 * N, N);
      for (int k = 0; k < 2 * N; k++) check("int chunk", 128'(em[k]), 128'(pi[W * k +: W]));
      for (int j = 0; j < N; j++) check("carries drained", 128'(carry[j]), 0);
      // external add: unit j <- b_j * 1 + ext_j
      intm = 0; ext_add = 1;
      @(negedge clk); p_en = 1; a = W'(1);
      @(negedge clk); p_en = 0; acc_en = 1; p_use = 1;
      @(negedge clk); acc_en = 0; p_use = 0; ext_add = 0;
      for (int j = 0; j < N; j++) check("ext add", 128'(low[j]), 128'(W'(b[j] + ext[j])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
