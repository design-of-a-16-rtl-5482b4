// Self-checking testbench for MUX2: both select values with random inputs.
module mux2_tb;
  logic        sel_pc;
  logic [15:0] pc, reg_s, y;
  int checks = 0, failures = 0;

  mux2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      pc = 16'($urandom); reg_s = 16'($urandom); sel_pc = 1'(i % 2);
      #1;
      checks++;
      if (y !== (sel_pc ? pc : reg_s)) begin failures++; $display("FAIL sel=%b y=%h", sel_pc, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
