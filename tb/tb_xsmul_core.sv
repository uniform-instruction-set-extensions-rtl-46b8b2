// tb_xsmul_core: self-checking test of the XSMUL core, every arithmetic mode.
// The register banks are modelled in the testbench (write-back applied as the
// core requests it). Expected values come from plain wide-integer arithmetic:
// schoolbook polynomial products, negacyclic convolution modulo X^16 + 1,
// 512-bit integer products split at 272 bits, one fold modulo 2^255 - 19
// (also checked against a full reduction modulo p), additions, subtractions
// and the negacyclic shift. Each mode's latency is checked against
// 19/19/19/16/35/3/3/7/7/3 cycles; configuration operations take one cycle.
module tb_xsmul_core;
  import xsmul_pkg::*;
  localparam int unsigned N = 16, W = 17, S = 16, IW = N * W;
  logic clk = 0, rst_n = 0;
  xs_ctrl_t ctrl;
  logic [N-1:0][S-1:0] A, B, R, XR, r_o;
  logic ready, busy;
  xs_wb_ctl_t wb;
  int checks = 0, failures = 0;

  xsmul_core dut (.clk, .rst_n, .ctrl_i(ctrl), .a_i(A), .b_i(B), .r_i(R), .xr_i(XR),
                  .ready_o(ready), .busy_o(busy), .wb_o(wb), .r_o);

  always #5 clk = ~clk;
  always @(posedge clk) if (wb.r_we) begin
    if (wb.xr_from_r) XR <= R;
    R <= r_o;
    if (wb.xr0_we) XR[0] <= wb.xr0_data;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [IW-1:0] got, logic [IW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s:\n  got %h\n  exp %h", what, got, exp);
    end
  endtask

  // issue one operation, return the number of cycles it held the ID stage
  task automatic issue(xs_ctrl_t c, output int lat);
    @(negedge clk);
    ctrl = c;
    lat = 0;
    forever begin
      #1 lat++;
      if (ready) break;
      @(negedge clk);
    end
    @(posedge clk);
    @(negedge clk) ctrl = '0;
  endtask

  task automatic op(xs_mode_e m, int exp_lat);
    xs_ctrl_t c; int lat;
    c = '0; c.enable = 1; c.go = 1; c.mode = m; c.activate_stall = 1;
    issue(c, lat);
    check($sformatf("latency of mode %0d", m), IW'(lat), IW'(exp_lat));
  endtask

  task automatic clear_units();
    xs_ctrl_t c; int lat;
    c = '0; c.enable = 1; c.clear = 1;
    issue(c, lat);
    check("clear latency", IW'(lat), 1);
  endtask

  function automatic logic [N-1:0][S-1:0] rnd_bank();
    logic [N-1:0][S-1:0] v;
    for (int j = 0; j < N; j++) v[j] = S'($urandom);
    return v;
  endfunction

  logic [IW-1:0] got272;
  logic [543:0]  prod;
  logic [S-1:0]  pc [0:63];
  logic [S-1:0]  e [N];
  logic [N-1:0][S-1:0] A1, A2, exp_b;
  logic [IW-1:0] fexp;
  logic [IW-1:0] pmod;

  initial begin
    ctrl = '0; A = '0; B = '0; R = '0; XR = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- polynomial multiplication, a of 32 coefficients in two blocks ----
    for (int t = 0; t < 3; t++) begin
      A1 = rnd_bank(); A2 = rnd_bank(); B = rnd_bank();
      for (int k = 0; k < 64; k++) pc[k] = '0;
      for (int i = 0; i < 2 * N; i++)
        for (int j = 0; j < N; j++)
          pc[i + j] += (i < N ? A1[i] : A2[i - N]) * B[j];
      clear_units();
      A = A1; op(MODE_POLY_MUL, 19);
      for (int j = 0; j < N; j++) exp_b[j] = pc[j];
      check("poly block 0", IW'(R), IW'(exp_b));
      A = A2; op(MODE_POLY_MUL, 19);
      for (int j = 0; j < N; j++) exp_b[j] = pc[N + j];
      check("poly block 1", IW'(R), IW'(exp_b));
      for (int j = 0; j < N; j++) exp_b[j] = pc[j];
      check("poly chain xr", IW'(XR), IW'(exp_b));
      A = '0; op(MODE_POLY_MUL, 19);
      for (int j = 0; j < N; j++) exp_b[j] = pc[2 * N + j];
      check("poly block 2", IW'(R), IW'(exp_b));
    end

    // ---- negacyclic convolution ----
    for (int t = 0; t < 6; t++) begin
      A = rnd_bank(); B = rnd_bank();
      if (t == 0) begin A = '1; B = '1; end
      for (int k = 0; k < N; k++) e[k] = '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (i + j < N) e[i + j] += A[i] * B[j];
          else           e[i + j - N] -= A[i] * B[j];
      op(MODE_CONV, 19);
      for (int j = 0; j < N; j++) exp_b[j] = e[j];
      check("convolution", IW'(R), IW'(exp_b));
    end

    // ---- integer multiplication, lower and higher half ----
    for (int t = 0; t < 6; t++) begin
      A = rnd_bank(); B = rnd_bank();
      if (t == 0) begin A = '1; B = '1; end
      prod = 544'(A) * 544'(B);
      op(MODE_MUL_LO, 19);
      got272 = {XR[0], R};
      check("int mul low half", got272, prod[IW-1:0]);
      op(MODE_MUL_HI, 16);
      got272 = {XR[0], R};
      check("int mul high half", got272, prod[2*IW-1:IW]);
    end

    // ---- multiplication with folding modulo 2^255 - 19 ----
    pmod = (IW'(1) << 255) - 19;
    for (int t = 0; t < 8; t++) begin
      A = rnd_bank(); B = rnd_bank();
      if (t == 0) begin A = '1; B = '1; end
      if (t == 1) begin A = '0; A[0] = 16'd5; B = '0; B[15] = 16'h8000; end
      prod = 544'(A) * 544'(B);
      fexp = IW'(prod[254:0]) + IW'(19) * IW'(prod >> 255);
      op(MODE_MUL_P25519, 35);
      got272 = {XR[0], R};
      check("mul mod p fold", got272, fexp);
      check("mul mod p congruent", IW'(544'(got272) % 544'(pmod)), IW'(prod % 544'(pmod)));
      check("fold below 2^263", IW'(got272 >> 263), '0);
    end

    // ---- vector addition and vector multiply & add ----
    for (int t = 0; t < 4; t++) begin
      A = rnd_bank(); B = rnd_bank(); XR = rnd_bank();
      @(negedge clk);
      for (int j = 0; j < N; j++) exp_b[j] = XR[j] + B[j];
      op(MODE_VEC_ADD, 3);
      check("vector add", IW'(R), IW'(exp_b));
      XR = rnd_bank();
      @(negedge clk);
      for (int j = 0; j < N; j++) exp_b[j] = XR[j] + A[0] * B[j];
      op(MODE_VEC_MAC, 3);
      check("vector mul & add", IW'(R), IW'(exp_b));
    end

    // ---- integer addition / subtraction in 48-bit chunks ----
    for (int t = 0; t < 6; t++) begin
      A = rnd_bank(); B = rnd_bank();
      if (t == 0) begin A = '1; B = '0; B[0] = 1; end
      op(MODE_INT_ADD, 7);
      got272 = {XR[0], R};
      check("int add", got272, IW'(A) + IW'(B));
      op(MODE_INT_SUB, 7);
      got272 = {XR[0], R};
      check("int sub", got272, IW'(A) - IW'(B));
    end

    // ---- ring reduction: multiply by Y modulo Y^16 + 1 ----
    for (int t = 0; t < 3; t++) begin
      R = rnd_bank();
      @(negedge clk);
      for (int j = 0; j < N; j++) exp_b[j] = (j == 0) ? -R[N-1] : R[j-1];
      op(MODE_RING_RED, 3);
      check("ring reduction", IW'(R), IW'(exp_b));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
