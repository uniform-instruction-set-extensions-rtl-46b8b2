// xsmul_decoder: decodes the two XSMUL instructions in the ID stage and
// translates them into the XSMUL control interface.
//
//   pq.xsmul      rs1 = 0x0 .. 0x9 : arithmetic mode (see xsmul_core)
//   pq.xsmul_cfg  rs1 = 0x0 clear, 0x1 barrel shift, 0x2 shadow load,
//                 0x3 stall (wait until the XSMUL is ready)
// The operation is carried in the rs1 field (bits 19:15); no register operands
// are read, because the XSMUL is wired to fixed registers. Both instructions
// share one R-type major opcode (OPCODE, default custom-0 = 7'b0001011) and
// are told apart by funct3 (FUNCT3_XSMUL, FUNCT3_CFG). The use of rs1 and the
// operation codes follow the published instruction table; the opcode and funct3
// values are this implementation's choice. Every XSMUL instruction asserts
// activate_stall, so the pipeline holds it in ID until the XSMUL is ready.
// Unknown operation codes raise illegal_o and drive no control signal.
// Purely combinational.
module xsmul_decoder import xsmul_pkg::*; #(
  parameter logic [6:0] OPCODE       = 7'b0001011,
  parameter logic [2:0] FUNCT3_XSMUL = 3'b000,
  parameter logic [2:0] FUNCT3_CFG   = 3'b001
) (
  input  logic     valid_i,   // instr_i is a valid instruction in ID
  input  logic [31:0] instr_i,
  output xs_ctrl_t ctrl_o,
  output logic     illegal_o
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [4:0] rs1;
  logic       is_op, is_cfg;

  assign opcode = instr_i[6:0];
  assign funct3 = instr_i[14:12];
  assign rs1    = instr_i[19:15];
  assign is_op  = valid_i && opcode == OPCODE && funct3 == FUNCT3_XSMUL;
  assign is_cfg = valid_i && opcode == OPCODE && funct3 == FUNCT3_CFG;

  always_comb begin
    ctrl_o    = '0;
    illegal_o = 1'b0;
    if (is_op) begin
      if (rs1 <= 5'h9) begin
        ctrl_o.enable         = 1'b1;
        ctrl_o.go             = 1'b1;
        ctrl_o.mode           = xs_mode_e'(rs1[3:0]);
        ctrl_o.activate_stall = 1'b1;
      end else begin
        illegal_o = 1'b1;
      end
    end else if (is_cfg) begin
      if (rs1 <= 5'h3) begin
        ctrl_o.enable         = 1'b1;
        ctrl_o.activate_stall = 1'b1;
        unique case (xs_cfg_e'(rs1[1:0]))
          CFG_CLEAR:  ctrl_o.clear        = 1'b1;
          CFG_BARREL: ctrl_o.barrel_shift = 1'b1;
          CFG_SHADOW: ctrl_o.shadow_load  = 1'b1;
          default: ;  // CFG_STALL: only waits for ready
        endcase
      end else begin
        illegal_o = 1'b1;
      end
    end
  end

endmodule
