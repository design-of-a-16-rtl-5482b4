// Self-checking testbench for the register file: random writes through the
// read/write port with random enables, both read ports compared with a
// testbench copy of the registers, and a read in the same cycle as a write
// must return the old value.
module regfile_tb;
  logic        clk = 0, en;
  logic [2:0]  d_sel, s_sel;
  logic [15:0] wdata, d_data, s_data;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every register first
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      en = 1; d_sel = 3'(r); s_sel = 3'(r); wdata = 16'($urandom);
      model[r] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = 1'($urandom);
      d_sel = 3'($urandom);
      s_sel = 3'($urandom);
      wdata = 16'($urandom);
      #1;
      checks++;
      if (d_data !== model[d_sel] || s_data !== model[s_sel]) begin
        failures++;
        $display("FAIL read d[%0d]=%h s[%0d]=%h expected %h %h", d_sel, d_data, s_sel, s_data,
                 model[d_sel], model[s_sel]);
      end
      @(posedge clk);
      if (en) model[d_sel] = wdata;
    end
    @(negedge clk); en = 0;
    for (int r = 0; r < 8; r++) begin
      d_sel = 3'(r); s_sel = 3'(7 - r); #1;
      checks++;
      if (d_data !== model[r] || s_data !== model[7 - r]) begin
        failures++; $display("FAIL final read %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
