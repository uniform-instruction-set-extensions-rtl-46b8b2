// tb_saber_toomcook: workload test - Saber polynomial multiplication in
// Z_2^13[X]/(X^256 + 1) by Toom-Cook-4-way on the XSMUL. Each operand is cut
// into four 64-coefficient parts (Y = X^64) and evaluated at the seven points
// inf, 2, 1, -1, 1/2, -1/2, 0; the points 1/2 and -1/2 are scaled by 8 so
// that only integers occur. The seven 64 x 64 products are schoolbook products
// with the chained polynomial multiplication mode. Interpolation multiplies
// the products by the division-free matrix 360 * E'^-1 (E' being the 7 x 7
// evaluation matrix of the product at the same points), then every
// coefficient is shifted right by 3 bits (the factor 1/8) and multiplied by
// 4005, the inverse of 45 modulo 2^13. The matrix is worked out by the
// testbench by exact rational inversion of E'. Every linear combination
// (evaluation and interpolation) runs on the XSMUL as a chain of vector
// multiply & add operations r = xr + l * b, with a barrel shift moving each
// partial sum from r to xr; the scaling by 4005 is one more vector multiply &
// add with xr = 0, and the recombination and the reduction modulo X^256 + 1
// are vector additions and subtractions. The host (the testbench) does the
// 3-bit shift and places blocks. The result is compared, modulo q = 2^13,
// with a direct negacyclic product, and every instruction's latency is
// checked.
module tb_saber_toomcook;
  import xsmul_pkg::*;
  localparam int unsigned N = 16, NPOLY = 256, MAXP = 2 * NPOLY;
  typedef logic [15:0] poly_t [MAXP];
  logic clk = 0, rst_n = 0;
  logic id_valid, stall, ready, illegal;
  logic [31:0] instr;
  logic cpu_we;
  logic [2:0] wbank, rbank, widx, ridx;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  int n_poly = 0, n_vadd = 0, n_vsub = 0, n_vmac = 0, n_barrel = 0;

  xsmul_ext dut (.clk, .rst_n, .id_valid_i(id_valid), .id_instr_i(instr), .stall_o(stall),
    .ready_o(ready), .illegal_o(illegal), .cpu_we_i(cpu_we), .cpu_wbank_i(wbank),
    .cpu_widx_i(widx), .cpu_wdata_i(wdata), .cpu_rbank_i(rbank), .cpu_ridx_i(ridx),
    .cpu_rdata_o(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic wr(int bank, int idx, logic [31:0] d);
    @(negedge clk);
    cpu_we = 1; wbank = 3'(bank); widx = 3'(idx); wdata = d;
    @(posedge clk);
    #1 cpu_we = 0;
  endtask

  task automatic rd(int bank, int idx, output logic [31:0] d);
    rbank = 3'(bank); ridx = 3'(idx);
    #1 d = rdata;
  endtask

  task automatic exec(logic [2:0] f3, logic [4:0] rs1, output int lat);
    @(negedge clk);
    id_valid = 1;
    instr = {7'd0, 5'd0, rs1, f3, 5'd0, 7'b0001011};
    lat = 0;
    forever begin
      #1 lat++;
      if (!stall) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1 id_valid = 0;
  endtask

  task automatic xsmul(xs_mode_e m);
    int lat;
    exec(3'b000, 5'(m), lat);
    check($sformatf("ID cycles of mode %0d", m), 32'(lat), 32'(xs_latency(m, N, 6)));
  endtask

  task automatic load_blk(int bank, poly_t p, int off);
    for (int i = 0; i < N / 2; i++) wr(bank, i, {p[off + 2*i + 1], p[off + 2*i]});
  endtask

  task automatic read_blk(inout poly_t p, input int off);
    logic [31:0] d;
    for (int i = 0; i < N / 2; i++) begin
      rd(2, i, d);
      p[off + 2*i] = d[15:0];
      p[off + 2*i + 1] = d[31:16];
    end
  endtask

  // z[zo..zo+n) = x[xo..) +/- y[yo..), block by block on the XSMUL
  task automatic vop(inout poly_t z, input int zo, input poly_t x, input int xo,
                     input poly_t y, input int yo, input int n, input bit sub);
    poly_t m1;
    if (sub) begin
      foreach (m1[i]) m1[i] = '0;
      m1[0] = 16'hffff;
      load_blk(0, m1, 0);
    end
    for (int k = 0; k < n; k += N) begin
      load_blk(3, x, xo + k);
      load_blk(1, y, yo + k);
      if (sub) begin xsmul(MODE_VEC_MAC); n_vsub++; end
      else     begin xsmul(MODE_VEC_ADD); n_vadd++; end
      read_blk(z, zo + k);
    end
  endtask

  // full product (2n coefficients) of two n-coefficient polynomials by schoolbook
  task automatic school(input poly_t a, input poly_t b, input int n, output poly_t z);
    poly_t zero, prod;
    int lat;
    foreach (zero[i]) zero[i] = '0;
    z = zero;
    prod = zero;
    for (int j = 0; j < n / N; j++) begin
      load_blk(1, b, j * N);
      exec(3'b001, 5'(CFG_CLEAR), lat);
      check("ID cycles of clear", 32'(lat), 1);
      for (int i = 0; i <= n / N; i++) begin
        if (i < n / N) load_blk(0, a, i * N);
        else           load_blk(0, zero, 0);
        xsmul(MODE_POLY_MUL);
        n_poly++;
        read_blk(prod, i * N);
      end
      // accumulate the n + 16 coefficients at offset 16 j; the chain is
      // finished first, as vector operations use the same units
      vop(z, j * N, z, j * N, prod, 0, n + N, 1'b0);
    end
  endtask

  // z[0..n) = sum_i l[i] * src[i][0..n), as r = xr + l * b chained by barrel shift
  task automatic lincomb(output poly_t z, input poly_t src [7], input int l [7], input int n);
    poly_t zero;
    int lat, first;
    foreach (zero[i]) zero[i] = '0;
    z = zero;
    for (int k = 0; k < n; k += N) begin
      load_blk(3, zero, 0);
      first = 1;
      for (int i = 0; i < 7; i++) begin
        if (l[i] == 0) continue;
        if (!first) begin
          exec(3'b001, 5'(CFG_BARREL), lat);
          check("ID cycles of barrel shift", 32'(lat), 1);
          n_barrel++;
        end
        wr(0, 0, {16'd0, 16'(l[i])});
        load_blk(1, src[i], k);
        xsmul(MODE_VEC_MAC);
        n_vmac++;
        first = 0;
      end
      read_blk(z, k);
    end
  endtask

  // ---- exact rational inversion of the 7 x 7 evaluation matrix ----
  function automatic longint gcd(longint x, longint y);
    if (x < 0) x = -x;
    if (y < 0) y = -y;
    while (y != 0) begin longint t = x % y; x = y; y = t; end
    return x;
  endfunction

  longint num [7][14], den [7][14];

  task automatic norm(int i, int j);
    longint g;
    if (den[i][j] < 0) begin num[i][j] = -num[i][j]; den[i][j] = -den[i][j]; end
    g = gcd(num[i][j], den[i][j]);
    if (g > 1) begin num[i][j] /= g; den[i][j] /= g; end
  endtask

  // row r -= f * row p, f = fn / fd
  task automatic row_sub(int r, int p, longint fn, longint fd);
    for (int j = 0; j < 14; j++) begin
      num[r][j] = num[r][j] * fd * den[p][j] - fn * num[p][j] * den[r][j];
      den[r][j] = den[r][j] * fd * den[p][j];
      norm(r, j);
    end
  endtask

  // 64-scaled evaluation of the product c(Y) = sum C_k Y^k at point i
  function automatic longint emat(int i, int k);
    case (i)
      0: return (k == 6) ? 1 : 0;                              // inf
      1: return longint'(1) << k;                              // 2
      2: return 1;                                             // 1
      3: return (k % 2) ? -1 : 1;                              // -1
      4: return longint'(1) << (6 - k);                        // 64 * (1/2)^k
      5: return ((k % 2) ? -1 : 1) * (longint'(1) << (6 - k)); // 64 * (-1/2)^k
      default: return (k == 0) ? 1 : 0;                        // 0
    endcase
  endfunction

  int imat [7][7];   // 360 * E'^-1

  task automatic build_imat();
    longint fn, fd, t;
    int p;
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 14; j++) begin
        num[i][j] = (j < 7) ? emat(i, j) : ((j - 7 == i) ? 1 : 0);
        den[i][j] = 1;
      end
    for (int c = 0; c < 7; c++) begin
      p = c;
      while (num[p][c] == 0) p++;
      if (p != c)
        for (int j = 0; j < 14; j++) begin
          t = num[p][j]; num[p][j] = num[c][j]; num[c][j] = t;
          t = den[p][j]; den[p][j] = den[c][j]; den[c][j] = t;
        end
      fn = num[c][c]; fd = den[c][c];
      for (int j = 0; j < 14; j++) begin
        num[c][j] = num[c][j] * fd;
        den[c][j] = den[c][j] * fn;
        norm(c, j);
      end
      for (int r = 0; r < 7; r++)
        if (r != c && num[r][c] != 0) row_sub(r, c, num[r][c], den[r][c]);
    end
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        checks++;
        if ((360 * num[i][j + 7]) % den[i][j + 7] != 0) begin
          failures++;
          $display("FAIL 360 * E'^-1 [%0d][%0d] is not an integer", i, j);
        end
        imat[i][j] = int'(360 * num[i][j + 7] / den[i][j + 7]);
      end
  endtask

  // 8-scaled evaluation of an operand a(Y) = sum A_k Y^k (k < 4) at point i
  function automatic int amat(int i, int k);
    case (i)
      0: return (k == 3) ? 1 : 0;
      1: return 1 << k;
      2: return 1;
      3: return (k % 2) ? -1 : 1;
      4: return 1 << (3 - k);
      5: return ((k % 2) ? -1 : 1) * (1 << (3 - k));
      default: return (k == 0) ? 1 : 0;
    endcase
  endfunction

  poly_t pa, pb, zero, full, red, t;
  poly_t pa_part [7], pb_part [7], ea [7], eb [7], w [7], cc [7], sc [7];
  int l [7];
  logic [15:0] ref_r [NPOLY];
  longint unsigned t0;
  localparam int unsigned Q = 64;   // part length

  initial begin
    id_valid = 0; instr = '0; cpu_we = 0; wbank = 0; widx = 0; wdata = 0; rbank = 0; ridx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    foreach (zero[i]) zero[i] = '0;
    pa = zero; pb = zero;
    for (int k = 0; k < NPOLY; k++) begin
      pa[k] = 16'($urandom) & 16'h1fff;
      pb[k] = 16'($urandom) & 16'h1fff;
      ref_r[k] = '0;
    end
    for (int i = 0; i < NPOLY; i++)
      for (int k = 0; k < NPOLY; k++)
        if (i + k < NPOLY) ref_r[i + k] += pa[i] * pb[k];
        else               ref_r[i + k - NPOLY] -= pa[i] * pb[k];

    build_imat();
    t0 = cycle;
    // split into four parts
    for (int p = 0; p < 7; p++) begin pa_part[p] = zero; pb_part[p] = zero; end
    for (int p = 0; p < 4; p++)
      for (int k = 0; k < Q; k++) begin
        pa_part[p][k] = pa[p * Q + k];
        pb_part[p][k] = pb[p * Q + k];
      end
    // evaluation
    for (int i = 0; i < 7; i++) begin
      for (int k = 0; k < 7; k++) l[k] = (k < 4) ? amat(i, k) : 0;
      lincomb(ea[i], pa_part, l, Q);
      lincomb(eb[i], pb_part, l, Q);
    end
    // seven 64 x 64 products
    for (int i = 0; i < 7; i++) school(ea[i], eb[i], Q, w[i]);
    // interpolation: 360 * C_k, then >> 3 and * 4005
    for (int k = 0; k < 7; k++) begin
      for (int i = 0; i < 7; i++) l[i] = imat[k][i];
      lincomb(t, w, l, 2 * Q);
      for (int c = 0; c < 2 * Q; c++) t[c] = t[c] >> 3;
      for (int i = 0; i < 7; i++) l[i] = (i == 0) ? 4005 : 0;
      sc[0] = t;
      lincomb(cc[k], sc, l, 2 * Q);
    end
    // recombination: full = sum_k C_k * X^(64 k)
    full = zero;
    for (int k = 0; k < 7; k++) vop(full, k * Q, full, k * Q, cc[k], 0, 2 * Q, 1'b0);
    // reduction modulo X^256 + 1
    red = zero;
    vop(red, 0, full, 0, full, NPOLY, NPOLY, 1'b1);
    $display("Toom-Cook-4: %0d cycles, %0d polynomial mul., %0d vector mul.&add., %0d barrel shifts, %0d vector add., %0d vector sub.",
             cycle - t0, n_poly, n_vmac, n_barrel, n_vadd, n_vsub);
    for (int k = 0; k < NPOLY; k++)
      check($sformatf("coeff %0d mod q", k), 32'(red[k] & 16'h1fff), 32'(ref_r[k] & 16'h1fff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
