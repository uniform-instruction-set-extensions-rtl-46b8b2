// tb_xsmul_addsub: self-checking test of the chunked integer adder/subtractor.
// 272-bit random operands (plus carry- and borrow-chain corner cases) are
// added and subtracted one 48-bit chunk per cycle; the result must equal the
// wide sum/difference modulo 2^272, after exactly 6 chunk steps.
module tb_xsmul_addsub;
  localparam int unsigned WIDTH = 272, W2 = 48, NCH = 6;
  logic clk = 0, rst_n = 0;
  logic start, sub, step;
  logic [3:0] idx;
  logic [WIDTH-1:0] a, b, res, res_next;
  int checks = 0, failures = 0;

  xsmul_addsub #(.WIDTH(WIDTH), .W2(W2)) dut (.clk, .rst_n, .start, .sub_i(sub), .step,
    .idx_i(idx), .a_i(a), .b_i(b), .res_o(res), .res_next_o(res_next));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic s);
    @(negedge clk); start = 1; sub = s;
    @(negedge clk); start = 0;
    for (int i = 0; i < NCH; i++) begin
      step = 1; idx = 4'(i);
      if (i == NCH - 1) begin
        #1 checks++;
        if (res_next !== (s ? a - b : a + b)) begin failures++; $display("FAIL res_next"); end
      end
      @(negedge clk);
    end
    step = 0;
    checks++;
    if (res !== (s ? a - b : a + b)) begin
      failures++;
      $display("FAIL %s: a %h b %h got %h", s ? "sub" : "add", a, b, res);
    end
  endtask

  initial begin
    start = 0; sub = 0; step = 0; idx = '0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 9; i++) begin a[32*i +: 32] = $urandom; b[32*i +: 32] = $urandom; end
      if (t == 0) begin a = '1; b = 1; end          // carry through every chunk
      if (t == 1) begin a = '0; b = 1; end          // borrow through every chunk
      if (t == 2) begin a = '1; b = '1; end
      run(0);
      run(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
