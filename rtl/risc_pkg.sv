// Shared types and constants of the three-cycle 16-bit RISC CPU.
//
// Holds the data width, the 5-bit op-codes of the 26-instruction set, the
// 4-bit ALU operation codes driven on ALU_S, the MUX1 select codes and the
// three steps of the clock control unit. The op-code values are the
// instruction encodings of the instruction set; the ALU, MUX1 and step
// encodings are this design's own choice.
package risc_pkg;

  localparam int unsigned DATA_W   = 16;  // register, bus and instruction width
  localparam int unsigned NUM_REGS = 8;   // general-purpose registers

  // Instruction format: op[15:11] d[10:8] s[7:5] (zeros[4:0]) or op d N[7:0].
  typedef enum logic [4:0] {
    OP_MOV  = 5'b00000,
    OP_AND  = 5'b00001,
    OP_OR   = 5'b00010,
    OP_XOR  = 5'b00011,
    OP_ADD  = 5'b00100,
    OP_SUB  = 5'b00101,
    OP_JZ   = 5'b00110,
    OP_JNZ  = 5'b00111,
    OP_SL   = 5'b01000,
    OP_SR   = 5'b01001,
    OP_RL   = 5'b01010,
    OP_RR   = 5'b01011,
    OP_SWP  = 5'b01100,
    OP_PCL  = 5'b01110,
    OP_JMP  = 5'b01111,
    OP_LD   = 5'b10000,
    OP_ANDI = 5'b10001,
    OP_ORI  = 5'b10010,
    OP_XORI = 5'b10011,
    OP_ADDI = 5'b10100,
    OP_SUBI = 5'b10101,
    OP_JP   = 5'b10110,
    OP_JM   = 5'b10111,
    OP_LHI  = 5'b11101,
    OP_LLI  = 5'b11110,
    OP_ST   = 5'b11111
  } opcode_e;

  // ALU operations (ALU_S[3:0]).
  typedef enum logic [3:0] {
    ALU_PASS_S = 4'd0,   // y = s                (MOV, LD, PCL)
    ALU_AND    = 4'd1,
    ALU_OR     = 4'd2,
    ALU_XOR    = 4'd3,
    ALU_ADD    = 4'd4,
    ALU_SUB    = 4'd5,
    ALU_PASS_D = 4'd6,   // y = d                (ST, jumps, unused op-codes)
    ALU_MRG_L  = 4'd7,   // y = {d[15:8], s[7:0]} (LHI)
    ALU_SL     = 4'd8,
    ALU_SR     = 4'd9,
    ALU_RL     = 4'd10,
    ALU_RR     = 4'd11,
    ALU_SWP    = 4'd12,
    ALU_MRG_H  = 4'd13   // y = {s[15:8], d[7:0]} (LLI)
  } alu_op_e;

  // MUX1 select (MUX1_S[1:0]): source of the ALU s operand.
  typedef enum logic [1:0] {
    M1_REG  = 2'd0,      // register s (s0)
    M1_DIN  = 2'd1,      // DATA_IN (s2), load data
    M1_PC   = 2'd2,      // program counter
    M1_IMM  = 2'd3       // immediate from the decoder (s3)
  } mux1_sel_e;

  // Steps of the clock control unit. Each ends with the rising edge named
  // in brackets: ID&EX ends at (b), WB at (c), IF at (a).
  typedef enum logic [1:0] {
    ST_IDEX = 2'd0,
    ST_WB   = 2'd1,
    ST_IF   = 2'd2
  } step_e;

endpackage
