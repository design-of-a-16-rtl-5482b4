// Self-checking testbench for the program counter: reset to 0, increment
// only while enabled, load on jmp, and wrap-around at the top of the
// address space. A software model of the counter is kept alongside.
module program_counter_tb;
  logic        clk = 0, reset, pc_en, jmp;
  logic [15:0] din, pc_q;
  int unsigned model;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; pc_en = 1; jmp = 0; din = 16'h1234;
    @(posedge clk); #1;
    reset = 0; model = 0;
    checks++; if (pc_q !== 16'h0000) begin failures++; $display("FAIL reset value %h", pc_q); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pc_en = ($urandom_range(0, 2) != 0);
      jmp   = ($urandom_range(0, 9) == 0);
      din   = 16'($urandom);
      if (i == 100) begin pc_en = 1; jmp = 1; din = 16'hFFFE; end
      if (pc_en) model = jmp ? int'(din) : (model + 1) % 65536;
      @(posedge clk); #1;
      checks++;
      if (int'(pc_q) != model) begin
        failures++;
        $display("FAIL cycle %0d: pc=%h expected %h", i, pc_q, model[15:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
