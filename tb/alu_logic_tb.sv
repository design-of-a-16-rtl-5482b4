// Self-checking testbench for alu_logic: every operation it handles, and
// the ones it does not (which must give 0), with random operands.
module alu_logic_tb;
  import risc_pkg::*;
  logic [15:0] a, b, y;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu_logic dut (.*);

  function automatic logic [15:0] expect_y(alu_op_e o, logic [15:0] x, logic [15:0] z);
    case (o)
      ALU_PASS_S: return z;
      ALU_PASS_D: return x;
      ALU_AND:    return x & z;
      ALU_OR:     return x | z;
      ALU_XOR:    return x ^ z;
      ALU_MRG_L:  return (x & 16'hFF00) | (z & 16'h00FF);
      ALU_MRG_H:  return (z & 16'hFF00) | (x & 16'h00FF);
      default:    return 16'h0000;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a  = 16'($urandom);
      b  = 16'($urandom);
      op = alu_op_e'(i % 16);
      #1;
      checks++;
      if (y !== expect_y(op, a, b)) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h expected %h", op, a, b, y, expect_y(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
