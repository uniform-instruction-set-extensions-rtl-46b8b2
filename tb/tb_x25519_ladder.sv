// tb_x25519_ladder: workload test - a complete X25519 scalar multiplication
// whose field multiplications, additions and subtractions all run on the XSMUL
// (modes 4, 7 and 8), driven through instructions and the CPU register port.
// The inverse z^(p-2) uses the usual chain of 254 squarings and 11
// multiplications.
// What the host core's software would do is done by the testbench: the second
// weak-reduction fold (r' = r mod 2^255 + 19 * (r >> 255), keeping values
// below 2p), the conditional swaps of the Montgomery ladder, and the final
// full reduction. Subtraction a - b is computed as (2p - b) + a, so no
// intermediate goes negative.
// The result is compared with the same ladder computed with plain wide-integer
// arithmetic, and with the published test vector of the X25519 function.
module tb_x25519_ladder;
  import xsmul_pkg::*;
  localparam int unsigned N = 16;
  localparam logic [511:0] P = (512'(1) << 255) - 512'(19);
  logic clk = 0, rst_n = 0;
  logic id_valid, stall, ready, illegal;
  logic [31:0] instr;
  logic cpu_we;
  logic [2:0] wbank, rbank, widx, ridx;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  int n_mul = 0, n_add = 0, n_sub = 0;

  xsmul_ext dut (.clk, .rst_n, .id_valid_i(id_valid), .id_instr_i(instr), .stall_o(stall),
    .ready_o(ready), .illegal_o(illegal), .cpu_we_i(cpu_we), .cpu_wbank_i(wbank),
    .cpu_widx_i(widx), .cpu_wdata_i(wdata), .cpu_rbank_i(rbank), .cpu_ridx_i(ridx),
    .cpu_rdata_o(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [511:0] got, logic [511:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s:\n  got %h\n  exp %h", what, got, exp); end
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

  task automatic load_int(int bank, logic [255:0] v);
    for (int i = 0; i < 8; i++) wr(bank, i, v[32*i +: 32]);
  endtask

  task automatic read_int(output logic [511:0] v);
    logic [31:0] d;
    v = '0;
    for (int i = 0; i < 8; i++) begin rd(2, i, d); v[32*i +: 32] = d; end
    rd(3, 0, d);
    v[271:256] = d[15:0];
  endtask

  task automatic xsmul(xs_mode_e m);
    @(negedge clk);
    id_valid = 1;
    instr = {7'd0, 5'd0, 5'(m), 3'b000, 5'd0, 7'b0001011};
    #1;
    while (stall) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 id_valid = 0;
  endtask

  // software part of the weak reduction: one more fold, result < 2p
  function automatic logic [511:0] fold(logic [511:0] v);
    return (v & ((512'(1) << 255) - 1)) + 512'(19) * (v >> 255);
  endfunction

  task automatic fmul(logic [511:0] x, logic [511:0] y, output logic [511:0] z);
    load_int(0, x[255:0]); load_int(1, y[255:0]);
    xsmul(MODE_MUL_P25519);
    read_int(z);
    z = fold(z);
    n_mul++;
  endtask

  task automatic fadd(logic [511:0] x, logic [511:0] y, output logic [511:0] z);
    load_int(0, x[255:0]); load_int(1, y[255:0]);
    xsmul(MODE_INT_ADD);
    read_int(z);
    z = fold(z);
    n_add++;
  endtask

  task automatic fsub(logic [511:0] x, logic [511:0] y, output logic [511:0] z);
    logic [511:0] t;
    load_int(0, 256'(2 * P)); load_int(1, y[255:0]);
    xsmul(MODE_INT_SUB);                 // 2p - y
    read_int(t);
    load_int(0, t[255:0]); load_int(1, x[255:0]);
    xsmul(MODE_INT_ADD);                 // + x
    read_int(z);
    z = fold(z);
    n_sub++;
  endtask

  // n successive squarings
  int n_sqr = 0;
  task automatic sqn(logic [511:0] x, int n, output logic [511:0] z);
    z = x;
    for (int i = 0; i < n; i++) begin fmul(z, z, z); n_sqr++; end
  endtask

  // ---- reference field arithmetic (plain wide integers) ----
  function automatic logic [511:0] rmul(logic [511:0] x, logic [511:0] y);
    return ((x % P) * (y % P)) % P;
  endfunction
  function automatic logic [511:0] radd(logic [511:0] x, logic [511:0] y);
    return ((x % P) + (y % P)) % P;
  endfunction
  function automatic logic [511:0] rsub(logic [511:0] x, logic [511:0] y);
    return ((x % P) + P - (y % P)) % P;
  endfunction
  function automatic logic [511:0] rpow(logic [511:0] x, logic [511:0] e);
    logic [511:0] r;
    r = 1;
    for (int i = 255; i >= 0; i--) begin
      r = rmul(r, r);
      if (e[i]) r = rmul(r, x);
    end
    return r;
  endfunction

  function automatic logic [255:0] le(logic [255:0] bytes_be);
    logic [255:0] v;
    for (int i = 0; i < 32; i++) v[8*i +: 8] = bytes_be[255 - 8*i -: 8];
    return v;
  endfunction

  function automatic logic [511:0] ref_ladder(logic [255:0] k, logic [511:0] u);
    logic [511:0] x1, x2, z2, x3, z3, a, aa, b, bb, e, c, d, da, cb, t;
    logic swap;
    x1 = u; x2 = 1; z2 = 0; x3 = u; z3 = 1; swap = 0;
    for (int i = 254; i >= 0; i--) begin
      swap ^= k[i];
      if (swap) begin t = x2; x2 = x3; x3 = t; t = z2; z2 = z3; z3 = t; end
      swap = k[i];
      a = radd(x2, z2); aa = rmul(a, a); b = rsub(x2, z2); bb = rmul(b, b);
      e = rsub(aa, bb); c = radd(x3, z3); d = rsub(x3, z3);
      da = rmul(d, a); cb = rmul(c, b);
      x3 = rmul(radd(da, cb), radd(da, cb));
      z3 = rmul(x1, rmul(rsub(da, cb), rsub(da, cb)));
      x2 = rmul(aa, bb);
      z2 = rmul(e, radd(aa, rmul(512'(121665), e)));
    end
    if (swap) begin t = x2; x2 = x3; x3 = t; t = z2; z2 = z3; z3 = t; end
    return rmul(x2, rpow(z2, P - 2));
  endfunction

  logic [255:0] k;
  logic [511:0] u, x1, x2, z2, x3, z3, a, aa, b, bb, e, c, d, da, cb, t, s1, s2, zi, res, refv;
  logic [511:0] i2, i9, i11, e5, e10, e20, e50, e100;
  int n0;
  logic swap;
  longint unsigned t0;

  initial begin
    id_valid = 0; instr = '0; cpu_we = 0; wbank = 0; widx = 0; wdata = 0; rbank = 0; ridx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // published X25519 test vector (scalar, u-coordinate, result as byte strings)
    k = le(256'ha546e36bf0527c9d3b16154b82465edd62144c0ac1fc5a18506a2244ba449ac4);
    k[2:0] = '0; k[255] = 1'b0; k[254] = 1'b1;           // clamping
    u = 512'(le(256'he6db6867583030db3594c1a424b15f7c726624ec26b3353b10a903a6d0ab1c4c));
    u[255] = 1'b0;
    u = u % P;
    refv = ref_ladder(k, u);
    check("reference ladder matches test vector", refv,
          512'(le(256'hc3da55379de9c6908e94ea4df28d084f32eccf03491c71f754b4075577a28552)));

    t0 = cycle;
    x1 = u; x2 = 1; z2 = 0; x3 = u; z3 = 1; swap = 0;
    for (int i = 254; i >= 0; i--) begin
      swap ^= k[i];
      if (swap) begin t = x2; x2 = x3; x3 = t; t = z2; z2 = z3; z3 = t; end
      swap = k[i];
      fadd(x2, z2, a);  fmul(a, a, aa);
      fsub(x2, z2, b);  fmul(b, b, bb);
      fsub(aa, bb, e);
      fadd(x3, z3, c);  fsub(x3, z3, d);
      fmul(d, a, da);   fmul(c, b, cb);
      fadd(da, cb, s1); fmul(s1, s1, x3);
      fsub(da, cb, s2); fmul(s2, s2, s2); fmul(x1, s2, z3);
      fmul(aa, bb, x2);
      fmul(512'(121665), e, t); fadd(aa, t, t); fmul(e, t, z2);
      if (i % 64 == 0) begin
        checks++;
        if (x2 >= 2 * P || z2 >= 2 * P || x3 >= 2 * P || z3 >= 2 * P) begin
          failures++; $display("FAIL lazy values not below 2p at bit %0d", i);
        end
      end
    end
    if (swap) begin t = x2; x2 = x3; x3 = t; t = z2; z2 = z3; z3 = t; end
    // inversion z2^(p-2) = z2^(2^255 - 21): 254 squarings and 11 multiplications
    n0 = n_mul;
    sqn(z2, 1, i2);                                     // z^2
    sqn(i2, 2, t);  fmul(t, z2, i9);                    // z^9
    fmul(i9, i2, i11);                                  // z^11
    sqn(i11, 1, t);   fmul(t, i9, e5);                  // z^(2^5 - 1)
    sqn(e5, 5, t);    fmul(t, e5, e10);                 // z^(2^10 - 1)
    sqn(e10, 10, t);  fmul(t, e10, e20);                // z^(2^20 - 1)
    sqn(e20, 20, t);  fmul(t, e20, t);                  // z^(2^40 - 1)
    sqn(t, 10, t);    fmul(t, e10, e50);                // z^(2^50 - 1)
    sqn(e50, 50, t);  fmul(t, e50, e100);               // z^(2^100 - 1)
    sqn(e100, 100, t); fmul(t, e100, t);                // z^(2^200 - 1)
    sqn(t, 50, t);    fmul(t, e50, t);                  // z^(2^250 - 1)
    sqn(t, 5, t);     fmul(t, i11, zi);                 // z^(2^255 - 21)
    checks++;
    if (n_sqr != 254 || n_mul - n0 != 265) begin
      failures++;
      $display("FAIL inversion used %0d squarings and %0d multiplications", n_sqr, n_mul - n0 - n_sqr);
    end
    fmul(x2, zi, res);
    res = res % P;
    $display("X25519 on the XSMUL: %0d cycles, %0d field mul., %0d add., %0d sub.",
             cycle - t0, n_mul, n_add, n_sub);
    check("XSMUL ladder equals reference ladder", res, refv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
