// Three-cycle, non-pipelined 16-bit load/store RISC CPU (top level).
//
// One memory bus serves both instructions and data (von Neumann), built for
// an asynchronous-read static RAM. Every instruction takes three clocks,
// sequenced by the clock control unit:
//   ID&EX  the decoder (IDU) holds the instruction; the register file reads
//          d and s; MUX1 picks the ALU's s operand; for LD/ST the address
//          bus already carries register s through MUX2. The ALU input
//          register captures the operands at the edge that ends this step.
//   WB     the ALU result out_d is valid; ST drives it on DATA_OUT with WE
//          high. At the edge that ends WB, register d takes out_d and the
//          PC increments or, for a taken jump, loads out_d.
//   IF     MUX2 puts the PC on ADDRESS; the decoder loads DATA_IN at the
//          edge that ends IF.
// After reset the CPU is in IF with PC = 0. The blocks (CCU, PC, REG, IDU,
// MUX1, MUX2, ALU) and their wiring follow the design's block diagram and
// timing diagram. The design's own choices: WE is we_t AND we_en, the ALU
// carry input is tied to 0 (no instruction uses it), and instructions that
// change no register rewrite register d with its own value.
//
// alu_flags = {overflow, carry, shift_carry} of the current ALU result,
// meaningful during WB.
module adiabatic_risc_cpu
  import risc_pkg::*;
(
  input  logic             clk,
  input  logic             reset,      // RESET, synchronous, active high
  input  logic [DATA_W-1:0]  data_in,    // DATA_IN
  output logic [DATA_W-1:0]  address,    // ADDRESS
  output logic [DATA_W-1:0]  data_out,   // DATA_OUT
  output logic             we,         // WE
  output logic [2:0]       alu_flags
);
  // CCU
  logic  idu_en, reg_en, pc_en, mux2_s, we_t;
  step_e phase;
  // IDU
  logic [DATA_W-1:0] s3;
  mux1_sel_e       mux1_s;
  logic [2:0]      s_sel, d_sel;
  alu_op_e         alu_s;
  logic            jmp, we_en;
  // datapath
  logic [DATA_W-1:0] pc_q, s0, d_val, alu_in_s, out_d;
  logic            carry, overflow, shift_carry;

  ccu u_ccu (
    .clk, .reset, .idu_en, .reg_en, .pc_en, .mux2_s, .we_t, .phase
  );

  program_counter #(.XLEN(DATA_W)) u_pc (
    .clk, .reset, .pc_en, .jmp, .din(out_d), .pc_q
  );

  idu #(.XLEN(DATA_W)) u_idu (
    .clk, .idu_en, .data_in, .s0, .s3, .mux1_s, .s_sel, .d_sel,
    .alu_s, .jmp, .we_en
  );

  regfile #(.XLEN(DATA_W), .NREGS(NUM_REGS)) u_reg (
    .clk, .en(reg_en), .d_sel, .s_sel, .wdata(out_d),
    .d_data(d_val), .s_data(s0)
  );

  mux1 #(.XLEN(DATA_W)) u_mux1 (
    .sel(mux1_s), .reg_s(s0), .data_in, .pc(pc_q), .imm(s3), .y(alu_in_s)
  );

  mux2 #(.XLEN(DATA_W)) u_mux2 (
    .sel_pc(mux2_s), .pc(pc_q), .reg_s(s0), .y(address)
  );

  alu #(.XLEN(DATA_W)) u_alu (
    .clk, .in_d(d_val), .in_s(alu_in_s), .alu_carry(1'b0), .alu_opcode(alu_s),
    .data_out(out_d), .carry, .overflow, .shift_carry
  );

  assign data_out  = out_d;
  assign we        = we_t & we_en;
  assign alu_flags = {overflow, carry, shift_carry};

  // The memory is written only in write-back.
  a_we_in_wb: assert property (@(posedge clk) disable iff (reset) we |-> phase == ST_WB);
endmodule
