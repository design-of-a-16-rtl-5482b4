// Self-checking testbench for alu_arith: random and corner-case additions
// and subtractions, compared with integer arithmetic done in the testbench
// (sum, borrow and signed range checks), including carry in.
module alu_arith_tb;
  logic [15:0] a, b, y;
  logic        cin, sub, carry, overflow;
  int checks = 0, failures = 0;

  alu_arith dut (.*);

  task automatic check_one(input logic [15:0] ta, tb_, input logic tc, ts);
    int ua, ub, sa, sb, r, sr;
    logic [15:0] ey; logic ec, eo;
    a = ta; b = tb_; cin = tc; sub = ts;
    #1;
    ua = int'(ta); ub = int'(tb_);
    sa = int'($signed(ta)); sb = int'($signed(tb_));
    if (!ts) begin
      r  = ua + ub + int'(tc);
      ec = (r > 65535);
      sr = sa + sb + int'(tc);
    end else begin
      r  = ua - ub - int'(tc);
      ec = (r < 0);
      sr = sa - sb - int'(tc);
    end
    ey = r[15:0];
    eo = (sr > 32767) || (sr < -32768);
    checks++;
    if (y !== ey || carry !== ec || overflow !== eo) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b sub=%b: y=%h c=%b v=%b expected %h %b %b",
               ta, tb_, tc, ts, y, carry, overflow, ey, ec, eo);
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
    check_one(16'h7FFF, 16'h0001, 0, 0);   // signed overflow
    check_one(16'hFFFF, 16'h0001, 0, 0);   // carry out
    check_one(16'h8000, 16'h0001, 0, 1);   // signed overflow on subtract
    check_one(16'h0000, 16'h0001, 0, 1);   // borrow
    check_one(16'h0005, 16'h0005, 1, 1);   // borrow in
    check_one(16'h1234, 16'h0000, 1, 0);   // carry in
    repeat (2000) check_one(16'($urandom), 16'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
