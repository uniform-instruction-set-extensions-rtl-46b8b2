// tb_xsmul_pmred: self-checking test of the 2^255 - 19 fold stage.
// A random wide value r = r_h * 2^255 + r_l is presented the way the core does
// it: r_l as stored W-bit chunks, the chunks of r_h one per cycle. The folded
// chunks must equal the chunks of r_l + 19 * r_h, computed with wide integers.
module tb_xsmul_pmred;
  localparam int unsigned W = 17, K = 19, NCH = 16;
  logic clk = 0, rst_n = 0;
  logic clr, en;
  logic [W-1:0] chunk, low_in, low_out;
  int checks = 0, failures = 0;

  xsmul_pmred #(.W(W), .K(K)) dut (.clk, .rst_n, .clr, .en, .chunk_i(chunk), .low_i(low_in), .low_o(low_out));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NCH*W-1:0] rl, exp_v, got_v;
  logic [NCH*W-1:0] rh;   // only the low 257 bits are used

  initial begin
    clr = 0; en = 0; chunk = '0; low_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      rl = '0; rh = '0;
      for (int i = 0; i < 9; i++) begin rl[32*i +: 32] = $urandom; rh[32*i +: 32] = $urandom; end
      rl = rl & ((NCH*W)'(1) << 255) - 1;
      rh = rh & ((NCH*W)'(1) << 257) - 1;
      if (t == 0) begin rl = ((NCH*W)'(1) << 255) - 1; rh = ((NCH*W)'(1) << 257) - 1; end
      exp_v = rl + (NCH*W)'(K) * rh;
      got_v = rl;
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      for (int p = 0; p < NCH; p++) begin
        en = 1;
        chunk = rh[p*W +: W];
        low_in = got_v[p*W +: W];
        #1 got_v[p*W +: W] = low_out;
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (got_v !== exp_v) begin
        failures++;
        $display("FAIL fold: got %h exp %h", got_v, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
