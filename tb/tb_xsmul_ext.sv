// tb_xsmul_ext: end-to-end test of the XSMUL extension at its default size
// (N = 16, W = 17, W2 = 48), driven only through instructions in the ID stage
// and the CPU register port, as a program on the host core would.
//  1. Saber polynomial multiplication in Z_2^13[X]/(X^256 + 1) by
//     ring-splitting with t = 16: 256 convolutions of 16-coefficient blocks,
//     each loaded through the shadow registers, reduced by Y when the block
//     indices wrap, and accumulated with barrel shift + vector addition.
//     Checked against a direct negacyclic schoolbook product.
//  2. A 32 x 16 coefficient polynomial product in two chained blocks.
//  3. Curve25519 field multiplication (mode 4) checked modulo 2^255 - 19,
//     a 256 x 256-bit product by lower + higher half, integer addition and
//     subtraction, vector multiply & add, the stall-only configuration
//     operation and an illegal operation code.
// Every instruction's ID-stage occupancy is checked against the latency table,
// and each mechanism (each mode, clear, barrel shift, shadow load, stall,
// stall-only wait, illegal code) is counted; one that never happened counts as
// a failure. The CPU is modelled as issuing one register write or one XSMUL
// instruction per cycle.
module tb_xsmul_ext;
  import xsmul_pkg::*;
  localparam int unsigned N = 16, NPOLY = 256, T = 16;
  localparam logic [255:0] P25519 = (256'(1) << 255) - 256'(19);
  logic clk = 0, rst_n = 0;
  logic id_valid, stall, ready, illegal;
  logic [31:0] instr;
  logic cpu_we;
  logic [2:0] wbank, rbank, widx, ridx;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

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

  task automatic check(string what, logic [271:0] got, logic [271:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s:\n  got %h\n  exp %h", what, got, exp); end
  endtask

  // mechanism counters
  int n_mode [10];
  int n_clear = 0, n_barrel = 0, n_shadow = 0, n_stall_cfg = 0, n_stall_cycles = 0, n_illegal = 0;
  int exp_lat [10] = '{19, 19, 19, 16, 35, 3, 3, 7, 7, 3};

  // ---------------- CPU model ----------------
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

  // issue one instruction; returns the cycles it spent in ID
  task automatic exec(logic [2:0] f3, logic [4:0] rs1, output int lat);
    @(negedge clk);
    id_valid = 1;
    instr = {7'd0, 5'd0, rs1, f3, 5'd0, 7'b0001011};
    lat = 0;
    forever begin
      #1 lat++;
      if (illegal) n_illegal++;
      if (!stall) break;
      n_stall_cycles++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 id_valid = 0;
  endtask

  task automatic xsmul(xs_mode_e m);
    int lat;
    exec(3'b000, 5'(m), lat);
    n_mode[m]++;
    check($sformatf("ID cycles of mode %0d", m), 272'(lat), 272'(exp_lat[m]));
  endtask

  task automatic cfg(xs_cfg_e c);
    int lat;
    exec(3'b001, 5'(c), lat);
    check($sformatf("ID cycles of cfg %0d", c), 272'(lat), 1);
    case (c)
      CFG_CLEAR:  n_clear++;
      CFG_BARREL: n_barrel++;
      CFG_SHADOW: n_shadow++;
      default:    n_stall_cfg++;
    endcase
  endtask

  task automatic load_bank(int bank, logic [N-1:0][15:0] v);
    for (int i = 0; i < N / 2; i++) wr(bank, i, {v[2*i+1], v[2*i]});
  endtask

  task automatic read_bank(int bank, output logic [N-1:0][15:0] v);
    for (int i = 0; i < N / 2; i++) rd(bank, i, {v[2*i+1], v[2*i]});
  endtask

  task automatic read_int(output logic [271:0] v);
    logic [31:0] d;
    read_bank(2, v[255:0]);
    rd(3, 0, d);
    v[271:256] = d[15:0];
  endtask

  // ---------------- test data ----------------
  logic [15:0] pa [NPOLY], pb [NPOLY], pr [NPOLY], ref_r [NPOLY];
  logic [N-1:0][15:0] blk_a, blk_b, res;
  logic [255:0] ia, ib;
  logic [511:0] prod;
  logic [271:0] v;
  longint unsigned t0;

  initial begin
    int ia_i, ib_i;
    id_valid = 0; instr = '0; cpu_we = 0; wbank = 0; widx = 0; wdata = 0; rbank = 0; ridx = 0;
    for (int m = 0; m < 10; m++) n_mode[m] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ===== 1. Saber multiplication by ring-splitting (n = 256, t = 16) =====
    for (int k = 0; k < NPOLY; k++) begin pa[k] = 16'($urandom % 8192); pb[k] = 16'($urandom % 8192); end
    for (int k = 0; k < NPOLY; k++) ref_r[k] = '0;
    for (int i = 0; i < NPOLY; i++)
      for (int j = 0; j < NPOLY; j++)
        if (i + j < NPOLY) ref_r[i + j] += pa[i] * pb[j];
        else               ref_r[i + j - NPOLY] -= pa[i] * pb[j];
    t0 = cycle;
    for (int j = 0; j < T; j++) begin
      for (int i = 0; i < T; i++) begin
        ia_i = (j + i) % T;
        ib_i = (T - i) % T;
        // Psi: block k holds coefficients k, k+t, k+2t, ... as a polynomial in Y
        for (int c = 0; c < N; c++) begin blk_a[c] = pa[ia_i + T * c]; blk_b[c] = pb[ib_i + T * c]; end
        load_bank(4, blk_a);                 // sa
        load_bank(5, blk_b);                 // sb
        if (i > 0) cfg(CFG_BARREL);          // xr <- R
        cfg(CFG_SHADOW);                     // a <- sa, b <- sb
        xsmul(MODE_CONV);                    // r <- A*B mod (Y^16 + 1)
        if (ia_i + ib_i >= T) xsmul(MODE_RING_RED);  // r <- Y * r
        if (i > 0) begin
          cfg(CFG_BARREL);                   // xr <- T, b <- R
          xsmul(MODE_VEC_ADD);               // r <- T + R
        end
      end
      read_bank(2, res);
      for (int c = 0; c < N; c++) pr[j + T * c] = res[c];   // inverse Psi
    end
    $display("ring-splitting multiplication: %0d cycles (register loads included)", cycle - t0);
    for (int k = 0; k < NPOLY; k++) check($sformatf("saber coeff %0d", k), 272'(pr[k] & 16'h1fff), 272'(ref_r[k] & 16'h1fff));
    for (int k = 0; k < NPOLY; k++) check($sformatf("coeff %0d mod 2^16", k), 272'(pr[k]), 272'(ref_r[k]));

    // ===== 2. chained polynomial multiplication (32 x 16 coefficients) =====
    for (int k = 0; k < 64; k++) ref_r[k % NPOLY] = '0;
    for (int k = 0; k < 2 * N; k++) pa[k] = 16'($urandom);
    for (int k = 0; k < N; k++) pb[k] = 16'($urandom);
    for (int i = 0; i < 2 * N; i++) for (int k = 0; k < N; k++) ref_r[i + k] += pa[i] * pb[k];
    for (int c = 0; c < N; c++) blk_b[c] = pb[c];
    load_bank(1, blk_b);
    cfg(CFG_CLEAR);
    for (int blkno = 0; blkno < 3; blkno++) begin
      for (int c = 0; c < N; c++) blk_a[c] = (blkno < 2) ? pa[blkno * N + c] : 16'd0;
      load_bank(0, blk_a);
      xsmul(MODE_POLY_MUL);
      read_bank(2, res);
      for (int c = 0; c < N; c++) check("chained poly coeff", 272'(res[c]), 272'(ref_r[blkno * N + c]));
    end

    // ===== 3. Curve25519 field and integer arithmetic =====
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < 8; i++) begin ia[32*i +: 32] = $urandom; ib[32*i +: 32] = $urandom; end
      if (t == 0) begin ia = P25519 - 1; ib = P25519 - 1; end
      ia = ia % P25519; ib = ib % P25519;
      prod = 512'(ia) * 512'(ib);
      load_bank(0, ia); load_bank(1, ib);
      xsmul(MODE_MUL_P25519);
      read_int(v);
      check("F_p mul congruent", 272'(512'(v) % 512'(P25519)), 272'(prod % 512'(P25519)));
      check("F_p mul below 2^263", v >> 263, '0);
      xsmul(MODE_MUL_LO);
      read_int(v);
      check("mul low half", v, prod[271:0]);
      xsmul(MODE_MUL_HI);
      read_int(v);
      check("mul high half", v, 272'(prod >> 272));
      xsmul(MODE_INT_ADD);
      read_int(v);
      check("int add", v, 272'(ia) + 272'(ib));
      xsmul(MODE_INT_SUB);
      read_int(v);
      check("int sub", v, 272'(ia) - 272'(ib));
    end
    // vector multiply & add: r_j <- xr_j + a_0 * b_j
    for (int c = 0; c < N; c++) begin blk_a[c] = 16'($urandom); blk_b[c] = 16'($urandom); res[c] = 16'($urandom); end
    load_bank(0, blk_a); load_bank(1, blk_b); load_bank(3, res);
    xsmul(MODE_VEC_MAC);
    begin
      logic [N-1:0][15:0] got, expv;
      read_bank(2, got);
      for (int c = 0; c < N; c++) expv[c] = res[c] + blk_a[0] * blk_b[c];
      check("vector mul & add", 272'(got), 272'(expv));
    end
    cfg(CFG_STALL);
    begin
      int lat;
      exec(3'b000, 5'd12, lat);   // unknown mode
      check("illegal mode does not stall", 272'(lat), 1);
    end

    // ===== mechanism coverage =====
    for (int m = 0; m < 10; m++) begin
      $display("mode %0d issued %0d times", m, n_mode[m]);
      check($sformatf("mode %0d exercised", m), 272'(n_mode[m] > 0), 1);
    end
    $display("clear %0d, barrel shift %0d, shadow load %0d, stall-only %0d, stall cycles %0d, illegal %0d",
             n_clear, n_barrel, n_shadow, n_stall_cfg, n_stall_cycles, n_illegal);
    check("clear exercised", 272'(n_clear > 0), 1);
    check("barrel shift exercised", 272'(n_barrel > 0), 1);
    check("shadow load exercised", 272'(n_shadow > 0), 1);
    check("stall-only exercised", 272'(n_stall_cfg > 0), 1);
    check("pipeline stall exercised", 272'(n_stall_cycles > 0), 1);
    check("illegal code seen", 272'(n_illegal > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
