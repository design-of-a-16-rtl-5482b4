// LOGIC submodule of the ALU: bitwise operations and operand moves.
//
// Computes AND, OR and XOR of the two operands, passes either operand
// through (MOV/LD/PCL take s, store and jump instructions take d), and
// merges one byte of s into d for the two load-immediate instructions
// (low byte for LHI, high byte for LLI). AND/OR/XOR are the instruction
// set's; placing the moves and byte merges here is this design's choice.
// Operations not handled here give 0. Purely combinational.
module alu_logic
  import risc_pkg::*;
#(
  parameter int unsigned XLEN = 16
) (
  input  logic [XLEN-1:0] a,   // operand d
  input  logic [XLEN-1:0] b,   // operand s
  input  alu_op_e         op,
  output logic [XLEN-1:0] y
);
  localparam int unsigned H = XLEN / 2;

  always_comb begin
    unique case (op)
      ALU_PASS_S: y = b;
      ALU_PASS_D: y = a;
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_MRG_L:  y = {a[XLEN-1:H], b[H-1:0]};
      ALU_MRG_H:  y = {b[XLEN-1:H], a[H-1:0]};
      default:    y = '0;
    endcase
  end
endmodule
