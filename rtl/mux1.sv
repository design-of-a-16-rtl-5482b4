// MUX1: 4-to-1 multiplexer choosing the ALU's s operand.
//
// Selects register s (s0) for register-register operations, DATA_IN (s2)
// for loads, the program counter for PCL, or the decoder's immediate (s3)
// for immediate operations. The four inputs follow the design's block
// diagram; the select encoding (risc_pkg::mux1_sel_e) is this design's own.
// Purely combinational.
module mux1
  import risc_pkg::*;
#(
  parameter int unsigned XLEN = 16
) (
  input  mux1_sel_e       sel,       // MUX1_S
  input  logic [XLEN-1:0] reg_s,     // s0
  input  logic [XLEN-1:0] data_in,   // s2
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] imm,       // s3
  output logic [XLEN-1:0] y
);
  always_comb begin
    unique case (sel)
      M1_REG: y = reg_s;
      M1_DIN: y = data_in;
      M1_PC:  y = pc;
      M1_IMM: y = imm;
    endcase
  end
endmodule
