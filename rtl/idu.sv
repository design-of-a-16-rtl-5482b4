// Instruction decoder unit.
//
// Holds the current instruction in a register that loads DATA_IN at a
// rising edge while idu_en is high (the edge that ends instruction fetch),
// and decodes it combinationally into:
//   d_sel, s_sel  register fields d = ir[10:8], s = ir[7:5];
//   s3            immediate: {8'h00, N} for ANDI/XORI/ADDI/SUBI and LHI,
//                 {8'hFF, N} for ORI, {N, 8'h00} for LLI, N = ir[7:0];
//   mux1_s        source of the ALU s operand;
//   alu_s         ALU operation;
//   we_en         the instruction is ST;
//   jmp           load the PC from the ALU result: always for JMP, and for
//                 JZ/JNZ/JP/JM when register s (input s0) is zero, non-zero,
//                 non-negative or negative.
// Every instruction writes register d at the end of write-back, so those
// that must leave registers unchanged (ST, the jumps, the six unused
// op-codes) have the ALU pass register d through. Op-codes and operand
// formats follow the instruction set; the control encodings and the
// treatment of unused op-codes are this design's choice. There is no reset.
module idu
  import risc_pkg::*;
#(
  parameter int unsigned XLEN = 16
) (
  input  logic            clk,
  input  logic            idu_en,    // IDU_en
  input  logic [XLEN-1:0] data_in,   // DATA_IN
  input  logic [XLEN-1:0] s0,        // value of register s
  output logic [XLEN-1:0] s3,        // immediate
  output mux1_sel_e       mux1_s,    // MUX1_S
  output logic [2:0]      s_sel,     // s_S
  output logic [2:0]      d_sel,     // d_S
  output alu_op_e         alu_s,     // ALU_S
  output logic            jmp,
  output logic            we_en
);
  logic [XLEN-1:0] ir;
  opcode_e         op;
  logic [7:0]      n;

  always_ff @(posedge clk) begin
    if (idu_en) ir <= data_in;
  end

  always_comb begin
    op    = opcode_e'(ir[15:11]);
    d_sel = ir[10:8];
    s_sel = ir[7:5];
    n     = ir[7:0];

    s3     = {8'h00, n};
    mux1_s = M1_REG;
    alu_s  = ALU_PASS_D;
    jmp    = 1'b0;
    we_en  = 1'b0;

    case (op)
      OP_MOV:  alu_s = ALU_PASS_S;
      OP_AND:  alu_s = ALU_AND;
      OP_OR:   alu_s = ALU_OR;
      OP_XOR:  alu_s = ALU_XOR;
      OP_ADD:  alu_s = ALU_ADD;
      OP_SUB:  alu_s = ALU_SUB;
      OP_SL:   alu_s = ALU_SL;
      OP_SR:   alu_s = ALU_SR;
      OP_RL:   alu_s = ALU_RL;
      OP_RR:   alu_s = ALU_RR;
      OP_SWP:  alu_s = ALU_SWP;
      OP_LHI:  begin mux1_s = M1_IMM; alu_s = ALU_MRG_L; end
      OP_LLI:  begin mux1_s = M1_IMM; alu_s = ALU_MRG_H; s3 = {n, 8'h00}; end
      OP_ANDI: begin mux1_s = M1_IMM; alu_s = ALU_AND; end
      OP_ORI:  begin mux1_s = M1_IMM; alu_s = ALU_OR;  s3 = {8'hFF, n}; end
      OP_XORI: begin mux1_s = M1_IMM; alu_s = ALU_XOR; end
      OP_ADDI: begin mux1_s = M1_IMM; alu_s = ALU_ADD; end
      OP_SUBI: begin mux1_s = M1_IMM; alu_s = ALU_SUB; end
      OP_LD:   begin mux1_s = M1_DIN; alu_s = ALU_PASS_S; end
      OP_ST:   we_en = 1'b1;
      OP_PCL:  begin mux1_s = M1_PC;  alu_s = ALU_PASS_S; end
      OP_JMP:  jmp = 1'b1;
      OP_JZ:   jmp = (s0 == '0);
      OP_JNZ:  jmp = (s0 != '0);
      OP_JP:   jmp = ~s0[XLEN-1];
      OP_JM:   jmp = s0[XLEN-1];
      default: ;                        // unused op-code: no effect
    endcase
  end
endmodule
