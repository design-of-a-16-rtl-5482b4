// SHIFT submodule of the ALU: one-place shifts, rotations and byte swap.
//
// Works on operand s only: SL shifts left and SR shifts right by one place
// with a 0 filled in, RL and RR rotate by one place, SWP exchanges the two
// bytes. The shift carry flag is the bit that leaves the word (s[15] for
// SL/RL, s[0] for SR/RR) and 0 otherwise. The operations are the
// instruction set's; the logical right shift and the shift carry definition
// are this design's choice. Operations not handled here give 0. Purely
// combinational.
module alu_shift
  import risc_pkg::*;
#(
  parameter int unsigned XLEN = 16
) (
  input  logic [XLEN-1:0] b,   // operand s
  input  alu_op_e         op,
  output logic [XLEN-1:0] y,
  output logic            shift_carry
);
  localparam int unsigned H = XLEN / 2;

  always_comb begin
    shift_carry = 1'b0;
    unique case (op)
      ALU_SL:  begin y = {b[XLEN-2:0], 1'b0};      shift_carry = b[XLEN-1]; end
      ALU_SR:  begin y = {1'b0, b[XLEN-1:1]};      shift_carry = b[0];      end
      ALU_RL:  begin y = {b[XLEN-2:0], b[XLEN-1]}; shift_carry = b[XLEN-1]; end
      ALU_RR:  begin y = {b[0], b[XLEN-1:1]};      shift_carry = b[0];      end
      ALU_SWP: y = {b[H-1:0], b[XLEN-1:H]};
      default: y = '0;
    endcase
  end
endmodule
