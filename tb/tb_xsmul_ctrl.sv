// tb_xsmul_ctrl: self-checking test of the XSMUL sequencer.
// For every arithmetic mode the go request is held, as a stalled ID stage
// does, until ready; the test checks the number of cycles (19, 19, 19, 16, 35,
// 3, 3, 7, 7, 3 for N = 16), that ready is high only in the last cycle, that
// the last strobe fires once, and how many product, accumulate, capture, fold
// and chunk-add strobes each schedule issues. Configuration operations and an
// idle cycle must leave ready high.
module tb_xsmul_ctrl;
  import xsmul_pkg::*;
  localparam int unsigned N = 16, NADD = 6;
  logic clk = 0, rst_n = 0;
  xs_ctrl_t ctrl;
  logic ready, busy, active;
  xs_mode_e mode;
  xs_strobe_t st;
  int checks = 0, failures = 0;

  xsmul_ctrl #(.N(N), .NADD(NADD), .FOLD(15)) dut (.clk, .rst_n, .ctrl_i(ctrl), .ready_o(ready),
    .busy_o(busy), .mode_o(mode), .active_o(active), .st_o(st));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  int lat, n_p, n_acc, n_use, n_cap, n_fold, n_add, n_last, n_clr;

  task automatic run(xs_mode_e m);
    @(negedge clk);
    ctrl = '0; ctrl.enable = 1; ctrl.go = 1; ctrl.mode = m; ctrl.activate_stall = 1;
    {lat, n_p, n_acc, n_use, n_cap, n_fold, n_add, n_last, n_clr} = '0;
    forever begin
      #1 lat++;
      n_p += int'(st.p_en); n_acc += int'(st.acc_en); n_use += int'(st.acc_en && st.p_use);
      n_cap += int'(st.cap_en); n_fold += int'(st.fold_en); n_add += int'(st.add_step);
      n_last += int'(st.last); n_clr += int'(st.clr_acc);
      if (ready) break;
      if (st.last) begin failures++; $display("FAIL last without ready"); end
      @(negedge clk);
    end
    @(negedge clk) ctrl = '0;
    #1 check("idle after op", int'(busy), 0);
  endtask

  int exp_lat [10] = '{19, 19, 19, 16, 35, 3, 3, 7, 7, 3};

  initial begin
    ctrl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) #1 check("idle ready", int'(ready), 1);
    for (int m = 0; m < 10; m++) begin
      run(xs_mode_e'(m));
      check($sformatf("mode %0d latency", m), lat, exp_lat[m]);
      check($sformatf("mode %0d last once", m), n_last, 1);
      case (m)
        0: begin check("poly p", n_p, N); check("poly acc", n_acc, N); check("poly cap", n_cap, N); check("poly clr", n_clr, 0); end
        1: begin check("conv p", n_p, N); check("conv acc", n_acc, N); check("conv cap", n_cap, 0); check("conv clr", n_clr, 1); end
        2: begin check("lo p", n_p, N); check("lo cap", n_cap, N); check("lo clr", n_clr, 1); end
        3: begin check("hi p", n_p, 0); check("hi acc", n_acc, N); check("hi use", n_use, 0); check("hi cap", n_cap, N); end
        4: begin check("fp p", n_p, N); check("fp acc", n_acc, 2 * N); check("fp use", n_use, N);
                 check("fp cap", n_cap, 15); check("fp fold", n_fold, N); end
        5, 6: begin check("vec p", n_p, 1); check("vec acc", n_acc, 1); end
        7, 8: check("add steps", n_add, NADD);
        default: check("ring no acc", n_acc, 0);
      endcase
    end
    // configuration operations complete in their issue cycle
    @(negedge clk); ctrl = '0; ctrl.enable = 1; ctrl.barrel_shift = 1;
    #1 check("cfg ready", int'(ready), 1);
    @(negedge clk); ctrl = '0; ctrl.enable = 1; ctrl.activate_stall = 1;
    #1 check("stall cfg ready when idle", int'(ready), 1);
    @(negedge clk) ctrl = '0;
    #1 check("no activity", int'(active), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
