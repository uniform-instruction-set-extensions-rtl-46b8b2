// tb_xsmul_decoder: self-checking test of the instruction decoder.
// Every rs1 value of both instructions is decoded and compared with the
// operation table (modes 0x0-0x9, configuration 0x0-0x3); other opcodes, other
// funct3 values, invalid slots and out-of-range rs1 values must not enable the
// XSMUL, the last two raising illegal.
module tb_xsmul_decoder;
  import xsmul_pkg::*;
  logic valid;
  logic [31:0] instr;
  xs_ctrl_t ctrl;
  logic illegal;
  int checks = 0, failures = 0;

  xsmul_decoder dut (.valid_i(valid), .instr_i(instr), .ctrl_o(ctrl), .illegal_o(illegal));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [31:0] enc(logic [2:0] f3, logic [4:0] rs1);
    return {7'd0, 5'($urandom), rs1, f3, 5'($urandom), 7'b0001011};
  endfunction

  initial begin
    valid = 1;
    for (int r = 0; r < 32; r++) begin
      instr = enc(3'b000, 5'(r)); #1;
      check("op enable", 32'(ctrl.enable), 32'(r <= 9));
      check("op go", 32'(ctrl.go), 32'(r <= 9));
      check("op illegal", 32'(illegal), 32'(r > 9));
      if (r <= 9) begin
        check("op mode", 32'(ctrl.mode), 32'(r));
        check("op stall", 32'(ctrl.activate_stall), 1);
        check("op no cfg", 32'({ctrl.clear, ctrl.barrel_shift, ctrl.shadow_load}), 0);
      end
      instr = enc(3'b001, 5'(r)); #1;
      check("cfg enable", 32'(ctrl.enable), 32'(r <= 3));
      check("cfg go", 32'(ctrl.go), 0);
      check("cfg illegal", 32'(illegal), 32'(r > 3));
      check("cfg clear", 32'(ctrl.clear), 32'(r == 0));
      check("cfg barrel", 32'(ctrl.barrel_shift), 32'(r == 1));
      check("cfg shadow", 32'(ctrl.shadow_load), 32'(r == 2));
      if (r <= 3) check("cfg stall", 32'(ctrl.activate_stall), 1);
    end
    // other opcodes / funct3 / invalid slot
    for (int t = 0; t < 200; t++) begin
      instr = $urandom;
      if (instr[6:0] == 7'b0001011 && instr[14:13] == 2'b00) instr[6:0] = 7'b0110011;
      #1 check("foreign instruction", 32'({ctrl.enable, illegal}), 0);
    end
    valid = 0; instr = enc(3'b000, 5'd2); #1;
    check("invalid slot", 32'({ctrl.enable, illegal}), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
