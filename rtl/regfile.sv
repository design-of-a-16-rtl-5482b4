// Register file: eight 16-bit general-purpose registers.
//
// Two ports. The read/write port, addressed by d_sel, reads register d
// combinationally (to the ALU) and writes wdata into it at a rising edge
// while en is high. The independent read port, addressed by s_sel, reads
// register s combinationally (s0: to the decoder, MUX1 and MUX2). A read
// in the same cycle as a write returns the old value; the new value is seen
// after the edge. The size and the two ports follow the design; the
// combinational reads are this design's choice. There is no reset: software
// writes a register before reading it.
module regfile #(
  parameter int unsigned XLEN  = 16,
  parameter int unsigned NREGS = 8,
  localparam int unsigned RAW  = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            en,       // REG_en
  input  logic [RAW-1:0]  d_sel,    // d_S
  input  logic [RAW-1:0]  s_sel,    // s_S
  input  logic [XLEN-1:0] wdata,    // out_d
  output logic [XLEN-1:0] d_data,
  output logic [XLEN-1:0] s_data    // s0
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (en) regs[d_sel] <= wdata;
  end

  assign d_data = regs[d_sel];
  assign s_data = regs[s_sel];
endmodule
