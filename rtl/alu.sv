// Arithmetic and logic unit of the CPU.
//
// The four inputs (operand d, operand s, carry in and op-code) are captured
// in an input register on every rising clock edge; the three submodules
// ARITHMETIC, LOGIC and SHIFT then work on the registered values in parallel
// and an output multiplexer, steered by the registered op-code, picks the
// result. In the CPU the operands settle during the ID&EX step and are
// captured at the edge that starts WB, so the result and flags are valid
// throughout WB. The input register and the three-submodule structure follow
// the design; the op-code encoding (risc_pkg::alu_op_e) is this design's own.
//
// Timing: result = f(inputs sampled at the last rising edge), one clock of
// latency. The flags belong to the submodule that computes them and read 0
// for operations of the others.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned XLEN = 16
) (
  input  logic            clk,
  input  logic [XLEN-1:0] in_d,         // IN_d_BASS
  input  logic [XLEN-1:0] in_s,         // IN_s_BASS
  input  logic            alu_carry,    // ALU_CARRY
  input  alu_op_e         alu_opcode,   // ALU_OPCODE
  output logic [XLEN-1:0] data_out,
  output logic            carry,
  output logic            overflow,
  output logic            shift_carry
);
  logic [XLEN-1:0] d_q, s_q;
  logic            c_q;
  alu_op_e         op_q;

  always_ff @(posedge clk) begin
    d_q  <= in_d;
    s_q  <= in_s;
    c_q  <= alu_carry;
    op_q <= alu_opcode;
  end

  logic [XLEN-1:0] y_arith, y_logic, y_shift;
  logic            ar_carry, ar_ovf, sh_carry;

  alu_arith #(.XLEN(XLEN)) u_arith (
    .a(d_q), .b(s_q), .cin(c_q), .sub(op_q == ALU_SUB),
    .y(y_arith), .carry(ar_carry), .overflow(ar_ovf)
  );

  alu_logic #(.XLEN(XLEN)) u_logic (
    .a(d_q), .b(s_q), .op(op_q), .y(y_logic)
  );

  alu_shift #(.XLEN(XLEN)) u_shift (
    .b(s_q), .op(op_q), .y(y_shift), .shift_carry(sh_carry)
  );

  always_comb begin
    carry       = 1'b0;
    overflow    = 1'b0;
    shift_carry = 1'b0;
    unique case (op_q)
      ALU_ADD, ALU_SUB: begin
        data_out = y_arith;
        carry    = ar_carry;
        overflow = ar_ovf;
      end
      ALU_SL, ALU_SR, ALU_RL, ALU_RR, ALU_SWP: begin
        data_out    = y_shift;
        shift_carry = sh_carry;
      end
      default: data_out = y_logic;
    endcase
  end
endmodule
