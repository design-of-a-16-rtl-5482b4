// Self-checking testbench for alu_shift: every shift, rotate and swap with
// random operands, results and shift carry worked out with integer
// multiplication and division in the testbench.
module alu_shift_tb;
  import risc_pkg::*;
  logic [15:0] b, y;
  alu_op_e     op;
  logic        shift_carry;
  int checks = 0, failures = 0;

  alu_shift dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, ey, ec;
    for (int i = 0; i < 3000; i++) begin
      v  = int'($urandom & 32'hFFFF);
      if (i < 16) v = (i < 8) ? 16'h8001 : 16'h0000;
      b  = 16'(v);
      op = alu_op_e'(i % 16);
      case (op)
        ALU_SL:  begin ey = (v * 2) % 65536;              ec = v / 32768; end
        ALU_SR:  begin ey = v / 2;                        ec = v % 2;     end
        ALU_RL:  begin ey = (v * 2) % 65536 + v / 32768;  ec = v / 32768; end
        ALU_RR:  begin ey = v / 2 + (v % 2) * 32768;      ec = v % 2;     end
        ALU_SWP: begin ey = (v % 256) * 256 + v / 256;    ec = 0;         end
        default: begin ey = 0;                            ec = 0;         end
      endcase
      #1;
      checks++;
      if (int'(y) != ey || int'(shift_carry) != ec) begin
        failures++;
        $display("FAIL op=%0d b=%h y=%h c=%b expected %h %0d", op, b, y, shift_carry, ey[15:0], ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
