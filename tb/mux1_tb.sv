// Self-checking testbench for MUX1: every select value with random inputs.
module mux1_tb;
  import risc_pkg::*;
  mux1_sel_e   sel;
  logic [15:0] reg_s, data_in, pc, imm, y, e;
  int checks = 0, failures = 0;

  mux1 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      reg_s = 16'($urandom); data_in = 16'($urandom); pc = 16'($urandom); imm = 16'($urandom);
      sel = mux1_sel_e'(i % 4);
      e = (i % 4 == 0) ? reg_s : (i % 4 == 1) ? data_in : (i % 4 == 2) ? pc : imm;
      #1;
      checks++;
      if (y !== e) begin failures++; $display("FAIL sel=%0d y=%h expected %h", sel, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
