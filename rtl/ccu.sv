// Clock control unit: sequences the three steps of every instruction.
//
// A three-state machine steps ID&EX -> WB -> IF -> ID&EX, one step per
// clock. Each enable is high during the step that ends with the edge at
// which its block acts:
//   IF    (ends at edge a): idu_en, the decoder loads the fetched word;
//                           mux2_s, the PC drives the memory address.
//   ID&EX (ends at edge b): nothing; the ALU captures its operands at b.
//   WB    (ends at edge c): reg_en and pc_en, the result is written and the
//                           PC moves on; we_t, the memory write window.
// The three steps and the enables' edges follow the design's timing
// diagram; the state encoding and the synchronous reset into IF (so the
// first fetch comes from address 0) are this design's choice.
module ccu
  import risc_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  output logic  idu_en,    // IDU_en
  output logic  reg_en,    // REG_en
  output logic  pc_en,     // PC_en
  output logic  mux2_s,    // MUX2_S, 1 = PC address
  output logic  we_t,      // write timing
  output step_e phase      // current step
);
  step_e state;

  always_ff @(posedge clk) begin
    if (reset) state <= ST_IF;
    else begin
      unique case (state)
        ST_IDEX: state <= ST_WB;
        ST_WB:   state <= ST_IF;
        default: state <= ST_IDEX;   // ST_IF, and any unused code
      endcase
    end
  end

  always_comb begin
    phase  = state;
    idu_en = (state == ST_IF);
    mux2_s = (state == ST_IF);
    reg_en = (state == ST_WB);
    pc_en  = (state == ST_WB);
    we_t   = (state == ST_WB);
  end
endmodule
