// End-to-end testbench of the CPU with its default configuration.
//
// The CPU runs from a behavioural SRAM model. A reference model of the
// instruction set, written from the instruction table and kept in the
// testbench, executes the same program instruction by instruction; after
// every instruction the PC and all eight registers are compared, and during
// write-back the store address/data and the ALU flags are compared too.
// Every instruction must take exactly three clocks: the PC may change only
// at the third edge, and the address bus must show the PC during fetch and
// register s during execute/write-back of LD and ST.
//
// Programs: (1) a directed loop that sums a five-word array with LD, ADD,
// ADDI, SUBI and JNZ and stores the sum, checked against a sum worked out
// here; (2) several runs over a memory filled with random words (every
// op-code, random jumps, loads and stores over the whole address space),
// each started by a prologue that sets all registers. Each mechanism (every
// op-code, jumps taken and not taken, loads, stores, each ALU flag) is
// counted; one that never happened counts as a failure.
module cpu_tb;
  import risc_pkg::*;

  logic        clk = 0, reset;
  logic [15:0] data_in, address, data_out;
  logic        we;
  logic [2:0]  alu_flags;

  adiabatic_risc_cpu dut (.*);
  sram_model #(.AW(16), .DW(16)) u_mem (.clk, .addr(address), .wdata(data_out), .we, .rdata(data_in));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int op_count [32];
  int n_taken = 0, n_not_taken = 0, n_loads = 0, n_stores = 0;
  int n_carry = 0, n_ovf = 0, n_shc = 0, n_instr = 0;

  // ---------------- reference model ----------------
  logic [15:0] rregs [8];
  logic [15:0] rpc;
  logic [15:0] rmem [65536];

  // Executes one instruction; reports store and flags.
  task automatic ref_step(output bit st, output logic [15:0] st_a, st_d,
                          output logic [2:0] flg, output bit is_jump, output bit taken,
                          output bit ldst, output logic [15:0] ls_a);
    logic [15:0] ir, dv, sv, r, n16;
    logic [16:0] w;
    logic [4:0]  op;
    int d, s;
    bit v, c, sc, wr;
    ir = rmem[rpc];
    op = ir[15:11]; d = int'(ir[10:8]); s = int'(ir[7:5]);
    dv = rregs[d]; sv = rregs[s]; n16 = {8'h00, ir[7:0]};
    st = 0; st_a = 0; st_d = 0; v = 0; c = 0; sc = 0; is_jump = 0; taken = 0;
    ldst = 0; ls_a = 0; wr = 1; r = 0;
    case (op)
      5'b00000: r = sv;                                        // MOV
      5'b00001: r = dv & sv;                                   // AND
      5'b00010: r = dv | sv;                                   // OR
      5'b00011: r = dv ^ sv;                                   // XOR
      5'b00100, 5'b10100: begin                                // ADD, ADDI
        if (op == 5'b10100) sv = n16;
        w = {1'b0, dv} + {1'b0, sv}; r = w[15:0]; c = w[16];
        v = (dv[15] == sv[15]) && (r[15] != dv[15]);
      end
      5'b00101, 5'b10101: begin                                // SUB, SUBI
        if (op == 5'b10101) sv = n16;
        w = {1'b0, dv} - {1'b0, sv}; r = w[15:0]; c = w[16];
        v = (dv[15] != sv[15]) && (r[15] != dv[15]);
      end
      5'b01000: begin r = {sv[14:0], 1'b0}; sc = sv[15]; end   // SL
      5'b01010: begin r = {sv[14:0], sv[15]}; sc = sv[15]; end // RL
      5'b01001: begin r = {1'b0, sv[15:1]}; sc = sv[0]; end    // SR
      5'b01011: begin r = {sv[0], sv[15:1]}; sc = sv[0]; end   // RR
      5'b01100: r = {sv[7:0], sv[15:8]};                       // SWP
      5'b11101: r = {dv[15:8], ir[7:0]};                       // LHI
      5'b11110: r = {ir[7:0], dv[7:0]};                        // LLI
      5'b10001: r = dv & n16;                                  // ANDI
      5'b10010: r = dv | {8'hFF, ir[7:0]};                     // ORI
      5'b10011: r = dv ^ n16;                                  // XORI
      5'b10000: begin r = rmem[sv]; ldst = 1; ls_a = sv; end   // LD
      5'b11111: begin wr = 0; st = 1; st_a = sv; st_d = dv; ldst = 1; ls_a = sv; end // ST
      5'b01110: r = rpc;                                       // PCL
      5'b01111: begin wr = 0; is_jump = 1; taken = 1; end      // JMP
      5'b00110: begin wr = 0; is_jump = 1; taken = (sv == 0); end       // JZ
      5'b00111: begin wr = 0; is_jump = 1; taken = (sv != 0); end       // JNZ
      5'b10110: begin wr = 0; is_jump = 1; taken = !sv[15]; end         // JP
      5'b10111: begin wr = 0; is_jump = 1; taken = sv[15]; end          // JM
      default:  wr = 0;                                        // unused op-code
    endcase
    flg = {v, c, sc};
    if (wr) rregs[d] = r;
    if (st) rmem[st_a] = st_d;
    rpc = taken ? dv : rpc + 16'd1;
  endtask

  // ---------------- DUT driving and comparison ----------------
  task automatic do_reset();
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    rpc = 0;
  endtask

  task automatic load_word(input int a, input logic [15:0] v);
    u_mem.mem[a] = v;
    rmem[a] = v;
  endtask

  // Runs one instruction on both and compares.
  task automatic step_and_check();
    bit st, isj, tk, ldst;
    logic [15:0] st_a, st_d, ls_a, pc_before, ir;
    logic [2:0]  flg;
    bit saw_we;
    logic [15:0] we_a, we_d;
    logic [2:0]  wb_flags;
    ir = rmem[rpc];
    pc_before = rpc;
    ref_step(st, st_a, st_d, flg, isj, tk, ldst, ls_a);
    // IF: address must be the PC
    @(negedge clk);
    checks++;
    if (address !== pc_before || we !== 1'b0) begin
      failures++; $display("FAIL fetch: address %h expected %h", address, pc_before);
    end
    @(posedge clk);                       // edge (a)
    @(negedge clk);                       // ID&EX
    if (ldst) begin
      checks++;
      if (address !== ls_a) begin failures++; $display("FAIL ld/st address %h expected %h", address, ls_a); end
    end
    checks++;
    if (dut.pc_q !== pc_before || we !== 1'b0) begin failures++; $display("FAIL PC/WE changed early"); end
    @(posedge clk);                       // edge (b)
    @(negedge clk);                       // WB
    saw_we = we; we_a = address; we_d = data_out; wb_flags = alu_flags;
    checks++;
    if (dut.pc_q !== pc_before) begin failures++; $display("FAIL PC changed before write-back ended"); end
    checks++;
    if (saw_we !== st || (st && (we_a !== st_a || we_d !== st_d))) begin
      failures++;
      $display("FAIL store at pc=%h: we=%b %h<-%h expected %b %h<-%h", pc_before, saw_we, we_a, we_d, st, st_a, st_d);
    end
    case (ir[15:11])
      5'b00100, 5'b10100, 5'b00101, 5'b10101, 5'b01000, 5'b01010, 5'b01001, 5'b01011: begin
        checks++;
        if (wb_flags !== flg) begin
          failures++; $display("FAIL flags at pc=%h (%h): %b expected %b", pc_before, ir, wb_flags, flg);
        end
        if (flg[2]) n_ovf++;
        if (flg[1]) n_carry++;
        if (flg[0]) n_shc++;
      end
      default: ;
    endcase
    @(posedge clk);                       // edge (c): instruction done
    #1;
    checks++;
    if (dut.pc_q !== rpc) begin failures++; $display("FAIL pc=%h expected %h after %h at %h", dut.pc_q, rpc, ir, pc_before); end
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (dut.u_reg.regs[r] !== rregs[r]) begin
        failures++; $display("FAIL r%0d=%h expected %h after %h at %h", r, dut.u_reg.regs[r], rregs[r], ir, pc_before);
      end
    end
    op_count[ir[15:11]]++;
    n_instr++;
    if (isj) begin if (tk) n_taken++; else n_not_taken++; end
    if (ir[15:11] == 5'b10000) n_loads++;
    if (st) n_stores++;
  endtask

  function automatic logic [15:0] enc_r(logic [4:0] op, int d, int s);
    return {op, 3'(d), 3'(s), 5'b00000};
  endfunction
  function automatic logic [15:0] enc_i(logic [4:0] op, int d, logic [7:0] n);
    return {op, 3'(d), n};
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [4:0] LLI = 5'b11110, LHI = 5'b11101, LD = 5'b10000, ADD = 5'b00100,
                         ADDI = 5'b10100, SUBI = 5'b10101, JNZ = 5'b00111, ST = 5'b11111,
                         PCL = 5'b01110, JMP = 5'b01111;

  initial begin
    int unsigned expected_sum;
    logic [15:0] v;
    reset = 1;
    // ---------- (1) directed: sum of five words ----------
    for (int a = 0; a < 65536; a++) load_word(a, 16'h0000);
    expected_sum = 0;
    for (int i = 0; i < 5; i++) begin
      v = 16'($urandom);
      load_word(16'h0100 + i, v);
      expected_sum = (expected_sum + v) % 65536;
    end
    load_word(0,  enc_i(LLI, 1, 8'h01)); load_word(1,  enc_i(LHI, 1, 8'h00));  // r1 = 0x0100
    load_word(2,  enc_i(LLI, 2, 8'h00)); load_word(3,  enc_i(LHI, 2, 8'h05));  // r2 = 5
    load_word(4,  enc_i(LLI, 3, 8'h00)); load_word(5,  enc_i(LHI, 3, 8'h00));  // r3 = 0
    load_word(6,  enc_i(LLI, 5, 8'h00)); load_word(7,  enc_i(LHI, 5, 8'h0A));  // r5 = 10
    load_word(8,  enc_i(LLI, 6, 8'h00)); load_word(9,  enc_i(LHI, 6, 8'h00));  // r6 = 0
    load_word(10, enc_r(LD, 4, 1));                                            // r4 = mem[r1]
    load_word(11, enc_r(ADD, 3, 4));                                           // r3 += r4
    load_word(12, enc_i(ADDI, 1, 8'h01));                                      // r1++
    load_word(13, enc_i(SUBI, 2, 8'h01));                                      // r2--
    load_word(14, enc_r(JNZ, 5, 2));                                           // if r2 != 0 goto r5
    load_word(15, enc_i(LLI, 7, 8'h02)); load_word(16, enc_i(LHI, 7, 8'h00));  // r7 = 0x0200
    load_word(17, enc_r(ST, 3, 7));                                            // mem[r7] = r3
    load_word(18, enc_r(PCL, 6, 0));                                           // r6 = PC
    load_word(19, enc_i(LLI, 0, 8'h00)); load_word(20, enc_i(LHI, 0, 8'd21));  // r0 = 21
    load_word(21, enc_r(JMP, 0, 0));                                           // stay here
    // the prologue leaves r0/r4 uninitialised: copy the random start values
    do_reset();
    for (int r = 0; r < 8; r++) rregs[r] = dut.u_reg.regs[r];
    for (int i = 0; i < 45; i++) step_and_check();
    checks++;
    if (int'(u_mem.mem[16'h0200]) != int'(expected_sum) || dut.u_reg.regs[6] !== 16'd18 || dut.pc_q !== 16'd21) begin
      failures++;
      $display("FAIL directed: sum %h expected %h, r6=%h, pc=%h", u_mem.mem[16'h0200], expected_sum[15:0],
               dut.u_reg.regs[6], dut.pc_q);
    end
    // ---------- (2) random memory images ----------
    for (int run = 0; run < 8; run++) begin
      for (int a = 0; a < 65536; a++) load_word(a, 16'($urandom));
      for (int r = 0; r < 8; r++) begin
        load_word(2 * r,     enc_i(LLI, r, 8'($urandom)));
        load_word(2 * r + 1, enc_i(LHI, r, 8'($urandom)));
      end
      do_reset();
      for (int r = 0; r < 8; r++) rregs[r] = dut.u_reg.regs[r];
      for (int i = 0; i < 2500; i++) step_and_check();
    end
    // ---------- coverage of mechanisms ----------
    for (int o = 0; o < 32; o++) begin
      checks++;
      if (op_count[o] == 0) begin failures++; $display("FAIL op-code %b never executed", 5'(o)); end
    end
    checks++; if (n_taken == 0)     begin failures++; $display("FAIL no taken jump"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("FAIL no jump falling through"); end
    checks++; if (n_loads == 0)     begin failures++; $display("FAIL no load"); end
    checks++; if (n_stores == 0)    begin failures++; $display("FAIL no store"); end
    checks++; if (n_carry == 0)     begin failures++; $display("FAIL carry flag never set"); end
    checks++; if (n_ovf == 0)       begin failures++; $display("FAIL overflow flag never set"); end
    checks++; if (n_shc == 0)       begin failures++; $display("FAIL shift carry never set"); end
    $display("instructions=%0d (3 clocks each) taken=%0d not_taken=%0d loads=%0d stores=%0d carry=%0d overflow=%0d shift_carry=%0d",
             n_instr, n_taken, n_not_taken, n_loads, n_stores, n_carry, n_ovf, n_shc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
