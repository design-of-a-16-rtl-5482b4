// Self-checking testbench for the instruction decoder. Every one of the 32
// op-codes is loaded with random register fields and immediate; the decoded
// register selects, immediate, MUX1 select, ALU operation, store enable and
// jump request are compared with a table written from the instruction set.
// Conditional jumps are tried with zero, positive and negative s values, and
// the instruction register must hold its value while idu_en is low.
module idu_tb;
  import risc_pkg::*;
  logic        clk = 0, idu_en, jmp, we_en;
  logic [15:0] data_in, s0, s3;
  mux1_sel_e   mux1_s;
  logic [2:0]  s_sel, d_sel;
  alu_op_e     alu_s;
  int checks = 0, failures = 0;

  idu dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int   alu;      // expected ALU op
    int   m1;       // expected MUX1 select
    int   immk;     // 0: {00,N}  1: {FF,N}  2: {N,00}  3: don't care
    int   jk;       // 0: never 1: always 2: s==0 3: s!=0 4: s>=0 5: s<0
    bit   st;
  } exp_t;

  function automatic exp_t table_i(int opc);
    case (opc)
      5'b00000: return '{ALU_PASS_S, M1_REG, 3, 0, 0};   // MOV
      5'b00001: return '{ALU_AND,    M1_REG, 3, 0, 0};   // AND
      5'b00010: return '{ALU_OR,     M1_REG, 3, 0, 0};   // OR
      5'b00011: return '{ALU_XOR,    M1_REG, 3, 0, 0};   // XOR
      5'b00100: return '{ALU_ADD,    M1_REG, 3, 0, 0};   // ADD
      5'b00101: return '{ALU_SUB,    M1_REG, 3, 0, 0};   // SUB
      5'b01000: return '{ALU_SL,     M1_REG, 3, 0, 0};   // SL
      5'b01010: return '{ALU_RL,     M1_REG, 3, 0, 0};   // RL
      5'b01001: return '{ALU_SR,     M1_REG, 3, 0, 0};   // SR
      5'b01011: return '{ALU_RR,     M1_REG, 3, 0, 0};   // RR
      5'b01100: return '{ALU_SWP,    M1_REG, 3, 0, 0};   // SWP
      5'b11101: return '{ALU_MRG_L,  M1_IMM, 0, 0, 0};   // LHI
      5'b11110: return '{ALU_MRG_H,  M1_IMM, 2, 0, 0};   // LLI
      5'b10001: return '{ALU_AND,    M1_IMM, 0, 0, 0};   // ANDI
      5'b10010: return '{ALU_OR,     M1_IMM, 1, 0, 0};   // ORI
      5'b10011: return '{ALU_XOR,    M1_IMM, 0, 0, 0};   // XORI
      5'b10100: return '{ALU_ADD,    M1_IMM, 0, 0, 0};   // ADDI
      5'b10101: return '{ALU_SUB,    M1_IMM, 0, 0, 0};   // SUBI
      5'b10000: return '{ALU_PASS_S, M1_DIN, 3, 0, 0};   // LD
      5'b11111: return '{ALU_PASS_D, 4,      3, 0, 1};   // ST
      5'b01111: return '{ALU_PASS_D, 4,      3, 1, 0};   // JMP
      5'b01110: return '{ALU_PASS_S, M1_PC,  3, 0, 0};   // PCL
      5'b00110: return '{ALU_PASS_D, 4,      3, 2, 0};   // JZ
      5'b00111: return '{ALU_PASS_D, 4,      3, 3, 0};   // JNZ
      5'b10110: return '{ALU_PASS_D, 4,      3, 4, 0};   // JP
      5'b10111: return '{ALU_PASS_D, 4,      3, 5, 0};   // JM
      default:  return '{ALU_PASS_D, 4,      3, 0, 0};   // unused
    endcase
  endfunction

  function automatic bit want_jmp(int jk, logic [15:0] s);
    case (jk)
      1: return 1;
      2: return s == 0;
      3: return s != 0;
      4: return s[15] == 0;
      5: return s[15] == 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    logic [15:0] instr, eimm;
    for (int i = 0; i < 32 * 40; i++) begin
      @(negedge clk);
      instr = {5'(i % 32), 11'($urandom)};
      data_in = instr; idu_en = 1;
      @(posedge clk); #1;
      idu_en = 0; data_in = ~instr;     // must not be taken
      e = table_i(i % 32);
      for (int k = 0; k < 3; k++) begin
        s0 = (k == 0) ? 16'h0000 : (k == 1) ? {1'b0, 15'($urandom) | 15'h1} : {1'b1, 15'($urandom)};
        @(posedge clk); #1;
        checks++;
        if (d_sel !== instr[10:8] || s_sel !== instr[7:5]) begin
          failures++; $display("FAIL %h: register fields d=%0d s=%0d", instr, d_sel, s_sel);
        end
        checks++;
        if (int'(alu_s) != e.alu || we_en !== e.st || jmp !== want_jmp(e.jk, s0)) begin
          failures++;
          $display("FAIL %h s0=%h: alu=%0d we=%b jmp=%b", instr, s0, alu_s, we_en, jmp);
        end
        if (e.m1 != 4) begin
          checks++;
          if (int'(mux1_s) != e.m1) begin failures++; $display("FAIL %h: mux1=%0d", instr, mux1_s); end
        end
        if (e.immk != 3) begin
          eimm = (e.immk == 0) ? {8'h00, instr[7:0]} : (e.immk == 1) ? {8'hFF, instr[7:0]}
                                                                     : {instr[7:0], 8'h00};
          checks++;
          if (s3 !== eimm) begin failures++; $display("FAIL %h: imm=%h expected %h", instr, s3, eimm); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
