// Self-checking testbench for the ALU: random operands and op-codes are
// applied, and after the next rising edge the result and flags are compared
// with a reference computed in the testbench. It also checks the one-clock
// latency: changing the inputs between edges must not change the output.
module alu_tb;
  import risc_pkg::*;
  logic        clk = 0;
  logic [15:0] in_d, in_s, data_out;
  logic        alu_carry, carry, overflow, shift_carry;
  alu_op_e     alu_opcode;
  int checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;

  // reference: {overflow, carry, shift_carry, result}
  function automatic logic [18:0] ref_alu(alu_op_e o, logic [15:0] d, logic [15:0] s, logic c);
    logic [16:0] w; logic [15:0] r; logic v, cy, sc;
    v = 0; cy = 0; sc = 0; r = 0;
    case (o)
      ALU_PASS_S: r = s;
      ALU_PASS_D: r = d;
      ALU_AND:    r = d & s;
      ALU_OR:     r = d | s;
      ALU_XOR:    r = d ^ s;
      ALU_MRG_L:  r = {d[15:8], s[7:0]};
      ALU_MRG_H:  r = {s[15:8], d[7:0]};
      ALU_ADD: begin
        w = 17'(d) + 17'(s) + 17'(c); r = w[15:0]; cy = w[16];
        v = (d[15] == s[15]) && (r[15] != d[15]);
      end
      ALU_SUB: begin
        w = 17'(d) - 17'(s) - 17'(c); r = w[15:0]; cy = w[16];
        v = (d[15] != s[15]) && (r[15] != d[15]);
      end
      ALU_SL:  begin r = s << 1; sc = s[15]; end
      ALU_SR:  begin r = s >> 1; sc = s[0];  end
      ALU_RL:  begin r = {s[14:0], s[15]}; sc = s[15]; end
      ALU_RR:  begin r = {s[0], s[15:1]};  sc = s[0];  end
      ALU_SWP: r = {s[7:0], s[15:8]};
      default: r = 0;
    endcase
    return {v, cy, sc, r};
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [18:0] e;
    logic [15:0] held;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_d = 16'($urandom); in_s = 16'($urandom); alu_carry = 1'($urandom);
      alu_opcode = alu_op_e'($urandom_range(0, 13));
      if (i % 50 == 0) begin in_d = 16'h7FFF; in_s = 16'h0001; alu_opcode = ALU_ADD; end
      e = ref_alu(alu_opcode, in_d, in_s, alu_carry);
      @(posedge clk); #1;
      checks++;
      if ({overflow, carry, shift_carry, data_out} !== e) begin
        failures++;
        $display("FAIL op=%0d d=%h s=%h c=%b: got %h v%b c%b s%b expected %h", alu_opcode, in_d, in_s,
                 alu_carry, data_out, overflow, carry, shift_carry, e);
      end
      // latency: new inputs before the next edge leave the output alone
      held = data_out;
      in_d = ~in_d; in_s = ~in_s;
      #1;
      checks++;
      if (data_out !== held) begin
        failures++;
        $display("FAIL output changed without a clock edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
