// tb_saber_schoolbook: workload test - Saber polynomial multiplication in
// Z_2^13[X]/(X^256 + 1) by plain schoolbook on the XSMUL, as described for the
// baseline of the multiplication comparison. For each of the 16 blocks b_j of
// 16 coefficients, the whole of a(X) is streamed through the chained
// polynomial multiplication mode (16 blocks of a plus one zero block that
// flushes the intermediate coefficients); the result blocks are accumulated
// at block offset j by the host. The 512-coefficient product is then reduced
// modulo X^256 + 1 with vector subtractions, done as vector multiply & add with
// the scalar -1: r = xr + (-1) * b, with xr = low block and b = high block.
// Coefficients are kept modulo 2^16 and compared with a direct negacyclic
// product, both modulo 2^16 and modulo q = 2^13. Instruction latencies are
// checked against the latency table.
module tb_saber_schoolbook;
  import xsmul_pkg::*;
  localparam int unsigned N = 16, NPOLY = 256, NB = NPOLY / N;
  logic clk = 0, rst_n = 0;
  logic id_valid, stall, ready, illegal;
  logic [31:0] instr;
  logic cpu_we;
  logic [2:0] wbank, rbank, widx, ridx;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  int n_poly = 0, n_vsub = 0;

  xsmul_ext dut (.clk, .rst_n, .id_valid_i(id_valid), .id_instr_i(instr), .stall_o(stall),
    .ready_o(ready), .illegal_o(illegal), .cpu_we_i(cpu_we), .cpu_wbank_i(wbank),
    .cpu_widx_i(widx), .cpu_wdata_i(wdata), .cpu_rbank_i(rbank), .cpu_ridx_i(ridx),
    .cpu_rdata_o(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic xsmul(xs_mode_e m, int exp_lat);
    int lat;
    exec(3'b000, 5'(m), lat);
    check($sformatf("ID cycles of mode %0d", m), 32'(lat), 32'(exp_lat));
  endtask

  task automatic load_bank(int bank, logic [N-1:0][15:0] v);
    for (int i = 0; i < N / 2; i++) wr(bank, i, {v[2*i+1], v[2*i]});
  endtask

  task automatic read_bank(int bank, output logic [N-1:0][15:0] v);
    for (int i = 0; i < N / 2; i++) rd(bank, i, {v[2*i+1], v[2*i]});
  endtask

  logic [15:0] pa [NPOLY], pb [NPOLY], ref_r [NPOLY], full [2*NPOLY];
  logic [N-1:0][15:0] blk, res, m1;
  longint unsigned t0, t_mul, t_red;
  int lat;

  initial begin
    id_valid = 0; instr = '0; cpu_we = 0; wbank = 0; widx = 0; wdata = 0; rbank = 0; ridx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int k = 0; k < NPOLY; k++) begin
      pa[k] = 16'($urandom) & 16'h1fff;
      pb[k] = 16'($urandom) & 16'h1fff;
      ref_r[k] = '0;
    end
    for (int k = 0; k < 2 * NPOLY; k++) full[k] = '0;
    for (int i = 0; i < NPOLY; i++)
      for (int k = 0; k < NPOLY; k++)
        if (i + k < NPOLY) ref_r[i + k] += pa[i] * pb[k];
        else               ref_r[i + k - NPOLY] -= pa[i] * pb[k];

    // ---- a(X) * b(X) as 16 chained passes over a ----
    t0 = cycle;
    for (int j = 0; j < NB; j++) begin
      for (int c = 0; c < N; c++) blk[c] = pb[j * N + c];
      load_bank(1, blk);
      exec(3'b001, 5'(CFG_CLEAR), lat);
      check("ID cycles of clear", 32'(lat), 1);
      for (int i = 0; i <= NB; i++) begin
        for (int c = 0; c < N; c++) blk[c] = (i < NB) ? pa[i * N + c] : 16'd0;
        load_bank(0, blk);
        xsmul(MODE_POLY_MUL, 19);
        n_poly++;
        read_bank(2, res);
        for (int c = 0; c < N; c++) full[(i + j) * N + c] += res[c];
      end
    end
    t_mul = cycle - t0;

    // ---- reduction modulo X^256 + 1 with vector subtractions ----
    t0 = cycle;
    for (int c = 0; c < N; c++) m1[c] = (c == 0) ? 16'hffff : 16'd0;
    load_bank(0, m1);
    for (int i = 0; i < NB; i++) begin
      for (int c = 0; c < N; c++) blk[c] = full[i * N + c];
      load_bank(3, blk);
      for (int c = 0; c < N; c++) blk[c] = full[NPOLY + i * N + c];
      load_bank(1, blk);
      xsmul(MODE_VEC_MAC, 3);
      n_vsub++;
      read_bank(2, res);
      for (int c = 0; c < N; c++) begin
        check($sformatf("coeff %0d mod 2^16", i * N + c), 32'(res[c]), 32'(ref_r[i * N + c]));
        check($sformatf("coeff %0d mod q", i * N + c), 32'(res[c] & 16'h1fff),
              32'(ref_r[i * N + c] & 16'h1fff));
      end
    end
    t_red = cycle - t0;
    $display("schoolbook: %0d polynomial multiplications in %0d cycles, %0d vector subtractions in %0d cycles",
             n_poly, t_mul, n_vsub, t_red);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
