// tb_saber_karatsuba: workload test - Saber polynomial multiplication in
// Z_2^13[X]/(X^256 + 1) by 1-level and by 2-level Karatsuba on the XSMUL.
// The sub-products (degree 127 for one level, 63 for two) are computed by
// schoolbook with the chained polynomial multiplication mode: one pass over
// a sub-operand per 16-coefficient block of the other, plus a zero block that
// flushes the intermediate coefficients. The pass results for one block of b
// are accumulated only once its chain is finished, because vector operations
// use the same units that hold the chain's intermediate coefficients.
// All pre- and post-processing additions and subtractions of 16-coefficient
// blocks run on the XSMUL: vector addition (r = xr + b) and, for subtraction,
// vector multiply & add with the scalar -1 (r = xr + (-1) * b). Only the
// placement of blocks (the host's loads and stores) is done by the testbench.
// The final reduction modulo X^256 + 1 is one more vector subtraction per
// block. Results are compared with a direct negacyclic product modulo 2^16
// and modulo 2^13, and every instruction's latency is checked.
module tb_saber_karatsuba;
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
  int n_poly = 0, n_vadd = 0, n_vsub = 0;

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

  // one Karatsuba level; sub-products by schoolbook (lvl = 1) or by another level (lvl = 2)
  task automatic kara(input poly_t a, input poly_t b, input int n, input int lvl, output poly_t z);
    poly_t a0, a1, b0, b1, as, bs, p0, p1, p2, t;
    int h;
    h = n / 2;
    foreach (a0[i]) begin a0[i] = '0; a1[i] = '0; b0[i] = '0; b1[i] = '0; as[i] = '0; bs[i] = '0; z[i] = '0; end
    for (int i = 0; i < h; i++) begin
      a0[i] = a[i]; a1[i] = a[h + i]; b0[i] = b[i]; b1[i] = b[h + i];
    end
    vop(as, 0, a0, 0, a1, 0, h, 1'b0);
    vop(bs, 0, b0, 0, b1, 0, h, 1'b0);
    if (lvl > 1) begin
      kara1(a0, b0, h, p0); kara1(a1, b1, h, p2); kara1(as, bs, h, p1);
    end else begin
      school(a0, b0, h, p0); school(a1, b1, h, p2); school(as, bs, h, p1);
    end
    // p1 = p1 - p0 - p2
    vop(p1, 0, p1, 0, p0, 0, n, 1'b1);
    vop(p1, 0, p1, 0, p2, 0, n, 1'b1);
    // z = p0 + X^h p1 + X^n p2
    t = p0;
    for (int i = 0; i < n; i++) t[n + i] = p2[i];
    vop(t, h, t, h, p1, 0, n, 1'b0);
    z = t;
  endtask

  // same as kara with lvl = 1 (kept separate: no recursive task calls)
  task automatic kara1(input poly_t a, input poly_t b, input int n, output poly_t z);
    poly_t a0, a1, b0, b1, as, bs, p0, p1, p2, t;
    int h;
    h = n / 2;
    foreach (a0[i]) begin a0[i] = '0; a1[i] = '0; b0[i] = '0; b1[i] = '0; as[i] = '0; bs[i] = '0; end
    for (int i = 0; i < h; i++) begin
      a0[i] = a[i]; a1[i] = a[h + i]; b0[i] = b[i]; b1[i] = b[h + i];
    end
    vop(as, 0, a0, 0, a1, 0, h, 1'b0);
    vop(bs, 0, b0, 0, b1, 0, h, 1'b0);
    school(a0, b0, h, p0); school(a1, b1, h, p2); school(as, bs, h, p1);
    vop(p1, 0, p1, 0, p0, 0, n, 1'b1);
    vop(p1, 0, p1, 0, p2, 0, n, 1'b1);
    t = p0;
    for (int i = 0; i < n; i++) t[n + i] = p2[i];
    vop(t, h, t, h, p1, 0, n, 1'b0);
    z = t;
  endtask

  poly_t pa, pb, full, red;
  logic [15:0] ref_r [NPOLY];
  longint unsigned t0;

  initial begin
    id_valid = 0; instr = '0; cpu_we = 0; wbank = 0; widx = 0; wdata = 0; rbank = 0; ridx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    foreach (pa[i]) begin pa[i] = '0; pb[i] = '0; red[i] = '0; end
    for (int k = 0; k < NPOLY; k++) begin
      pa[k] = 16'($urandom) & 16'h1fff;
      pb[k] = 16'($urandom) & 16'h1fff;
      ref_r[k] = '0;
    end
    for (int i = 0; i < NPOLY; i++)
      for (int k = 0; k < NPOLY; k++)
        if (i + k < NPOLY) ref_r[i + k] += pa[i] * pb[k];
        else               ref_r[i + k - NPOLY] -= pa[i] * pb[k];

    for (int lvl = 1; lvl <= 2; lvl++) begin
      n_poly = 0; n_vadd = 0; n_vsub = 0;
      t0 = cycle;
      kara(pa, pb, NPOLY, lvl, full);
      // reduction modulo X^256 + 1
      vop(red, 0, full, 0, full, NPOLY, NPOLY, 1'b1);
      $display("Karatsuba %0d-level: %0d cycles, %0d polynomial mul., %0d vector add., %0d vector sub.",
               lvl, cycle - t0, n_poly, n_vadd, n_vsub);
      for (int k = 0; k < NPOLY; k++) begin
        check($sformatf("level %0d coeff %0d mod 2^16", lvl, k), 32'(red[k]), 32'(ref_r[k]));
        check($sformatf("level %0d coeff %0d mod q", lvl, k), 32'(red[k] & 16'h1fff),
              32'(ref_r[k] & 16'h1fff));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
