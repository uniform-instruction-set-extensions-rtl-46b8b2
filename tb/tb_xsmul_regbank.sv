// tb_xsmul_regbank: self-checking test of the coupled register halves.
// A reference copy of all six banks is kept in the testbench. Random CPU
// writes, shadow loads (a <- sa, b <- sb), barrel shifts (xr <- r, b <- xr) and
// XSMUL write-backs (r load, r -> xr chain, xr slot 0) are applied to both and
// every bank plus the CPU read port are compared after each cycle.
module tb_xsmul_regbank;
  import xsmul_pkg::*;
  localparam int unsigned N = 16, S = 16;
  typedef logic [N-1:0][S-1:0] bank_t;
  logic clk = 0, rst_n = 0;
  logic cpu_we, barrel, shadow;
  logic [2:0] wbank, rbank;
  logic [2:0] widx, ridx;
  logic [31:0] wdata, rdata;
  xs_wb_ctl_t wb;
  bank_t wb_r, a, b, r, xr;
  bank_t m [6];
  int checks = 0, failures = 0;

  xsmul_regbank #(.N(N), .SLOT(S)) dut (.clk, .rst_n, .cpu_we, .cpu_wbank(wbank), .cpu_widx(widx),
    .cpu_wdata(wdata), .cpu_rbank(rbank), .cpu_ridx(ridx), .cpu_rdata(rdata),
    .barrel_shift(barrel), .shadow_load(shadow), .wb_i(wb), .wb_r_i(wb_r),
    .a_o(a), .b_o(b), .r_o(r), .xr_o(xr));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [N*S-1:0] got, logic [N*S-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  bank_t nx [6];
  int n_shadow = 0, n_barrel = 0;

  initial begin
    cpu_we = 0; barrel = 0; shadow = 0; wbank = 0; rbank = 0; widx = 0; ridx = 0; wdata = 0;
    wb = '0; wb_r = '0;
    for (int k = 0; k < 6; k++) m[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      cpu_we = 0; barrel = 0; shadow = 0; wb = '0;
      case ($urandom % 6)
        0, 1: begin cpu_we = 1; wbank = 3'($urandom % 6); widx = 3'($urandom); wdata = $urandom; end
        2: shadow = 1;
        3: barrel = 1;
        4: begin wb.r_we = 1; wb.xr_from_r = 1'($urandom); for (int j = 0; j < N; j++) wb_r[j] = S'($urandom); end
        default: begin wb.r_we = 1; wb.xr0_we = 1; wb.xr0_data = S'($urandom); for (int j = 0; j < N; j++) wb_r[j] = S'($urandom); end
      endcase
      rbank = 3'($urandom % 6); ridx = 3'($urandom);
      #1 check("cpu read", (N*S)'(rdata), (N*S)'({m[rbank][2*ridx+1], m[rbank][2*ridx]}));
      for (int k = 0; k < 6; k++) nx[k] = m[k];
      if (cpu_we) begin nx[wbank][2*widx] = wdata[15:0]; nx[wbank][2*widx+1] = wdata[31:16]; end
      if (barrel) begin nx[3] = m[2]; nx[1] = m[3]; n_barrel++; end
      if (shadow) begin nx[0] = m[4]; nx[1] = m[5]; n_shadow++; end
      if (wb.r_we) begin if (wb.xr_from_r) nx[3] = m[2]; nx[2] = wb_r; end
      if (wb.xr0_we) nx[3][0] = wb.xr0_data;
      @(posedge clk); #1;
      for (int k = 0; k < 6; k++) m[k] = nx[k];
      check("a", a, m[0]); check("b", b, m[1]); check("r", r, m[2]); check("xr", xr, m[3]);
    end
    // sa and sb are visible through the CPU port
    for (int i = 0; i < N / 2; i++) begin
      rbank = 4; ridx = 3'(i); #1 check("sa read", (N*S)'(rdata), (N*S)'({m[4][2*i+1], m[4][2*i]}));
      rbank = 5; #1 check("sb read", (N*S)'(rdata), (N*S)'({m[5][2*i+1], m[5][2*i]}));
    end
    check("transfers exercised", (N*S)'(n_shadow > 10 && n_barrel > 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
