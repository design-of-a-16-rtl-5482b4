// MUX2: 2-to-1 multiplexer choosing the memory address.
//
// Puts the program counter on ADDRESS while an instruction is fetched
// (sel_pc high, driven by the clock control unit) and register s, the
// load/store address, otherwise. Follows the design's block diagram and
// timing diagram. Purely combinational.
module mux2 #(
  parameter int unsigned XLEN = 16
) (
  input  logic            sel_pc,   // MUX2_S
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] reg_s,    // s0
  output logic [XLEN-1:0] y         // ADDRESS
);
  assign y = sel_pc ? pc : reg_s;
endmodule
