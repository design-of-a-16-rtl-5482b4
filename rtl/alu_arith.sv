// ARITHMETIC submodule of the ALU: addition and subtraction with flags.
//
// One adder computes a + b + cin, or a + ~b + ~cin for subtraction, so that
// subtraction gives a - b - cin. The carry flag is the adder's carry out for
// addition and the borrow (inverted carry out) for subtraction; overflow is
// the two's-complement signed overflow. That the ALU computes additive
// operations with carry and overflow flags is the instruction set's; the
// single-adder structure and the borrow convention are this design's choice.
// Purely combinational.
module alu_arith #(
  parameter int unsigned XLEN = 16
) (
  input  logic [XLEN-1:0] a,         // operand d
  input  logic [XLEN-1:0] b,         // operand s
  input  logic            cin,       // carry in (borrow in for subtract)
  input  logic            sub,       // 1: a - b - cin
  output logic [XLEN-1:0] y,
  output logic            carry,
  output logic            overflow
);
  logic [XLEN-1:0] b_eff;
  logic            c_eff;
  logic            cout;

  always_comb begin
    b_eff = sub ? ~b : b;
    c_eff = sub ? ~cin : cin;
    {cout, y} = {1'b0, a} + {1'b0, b_eff} + {{XLEN{1'b0}}, c_eff};
    carry    = sub ? ~cout : cout;
    overflow = (a[XLEN-1] == b_eff[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
  end
endmodule
