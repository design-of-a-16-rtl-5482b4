// Self-checking testbench for the clock control unit: after reset it must
// be in instruction fetch, then repeat ID&EX, WB, IF with a period of
// exactly three clocks, each enable high in its own step only. A reset in
// the middle of the sequence must return it to fetch.
module ccu_tb;
  import risc_pkg::*;
  logic  clk = 0, reset;
  logic  idu_en, reg_en, pc_en, mux2_s, we_t;
  step_e phase;
  int checks = 0, failures = 0;

  ccu dut (.*);

  always #5 clk = ~clk;

  // expected outputs for step k of the sequence IF(0), ID&EX(1), WB(2)
  task automatic check_step(input int k);
    logic [4:0] e, got;
    case (k)
      0: e = 5'b11000;   // idu_en mux2_s reg_en pc_en we_t
      1: e = 5'b00000;
      default: e = 5'b00111;
    endcase
    got = {idu_en, mux2_s, reg_en, pc_en, we_t};
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL step %0d: enables %b expected %b", k, got, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    k = 0;
    for (int i = 0; i < 300; i++) begin
      check_step(k);
      if (i == 200) begin
        reset = 1; @(posedge clk); #1; reset = 0; k = 0;
        check_step(0);
      end
      @(posedge clk); #1;
      k = (k + 1) % 3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
