// Program counter.
//
// A 16-bit register holding the address of the instruction being fetched
// and executed. At a rising edge with pc_en high it loads din (the ALU
// result, i.e. a jump target) when jmp is high and otherwise increments by
// one word. Reset is synchronous and clears it to 0, so execution starts at
// address 0. The load/increment behaviour and the enable at the end of the
// write-back step follow the design; the reset value is this design's
// choice.
module program_counter #(
  parameter int unsigned XLEN = 16
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            pc_en,   // PC_en from the clock control unit
  input  logic            jmp,     // load din instead of incrementing
  input  logic [XLEN-1:0] din,     // out_d
  output logic [XLEN-1:0] pc_q
);
  always_ff @(posedge clk) begin
    if (reset)      pc_q <= '0;
    else if (pc_en) pc_q <= jmp ? din : pc_q + XLEN'(1);
  end
endmodule
