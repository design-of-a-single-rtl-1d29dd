// tb_program_examples - the short example programs, run on the full system.
//
// Four small programs run one after another on picorv_system at its
// default sizes, each started from reset, with registers and memory
// inspected afterwards:
//   1. summation: x1 = 4, x2 = 20, x3 = x1 + x2            -> x3 = 24
//   2. increment of memory cell 12: lw / addi / sw          -> Mem[12] + 1
//   3. conditional assignment: beq x1,x2,L1; addi x2,x0,5  -> both outcomes
//   4. the raw machine word 0x00402583 (lw x11,0x4(x0))      -> x11 = Mem[4]
// Each program ends in a one-instruction loop; the cycle count to reach it
// must equal the number of instructions executed (one per cycle).
module tb_program_examples;
  import rv_asm_pkg::*;

  logic        clk = 0, rst = 1;
  logic        prog_we = 0;
  logic [9:0]  prog_addr = 0;
  logic [31:0] prog_wdata = 0;
  logic [5:0]  sp_a;
  logic        sp_ald_n;
  int checks = 0, failures = 0;

  picorv_system dut (.clk, .rst, .prog_we, .prog_addr, .prog_wdata, .sp_a, .sp_ald_n, .sp_sby(1'b1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load n words, release reset, run until PC reaches halt_pc; check the cycle count
  task automatic run(input logic [31:0] p [], input logic [31:0] halt_pc, input int exp_cycles,
                     input string what);
    int cycles;
    rst = 1;
    foreach (p[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;
    cycles = 0;
    while (dut.pc != halt_pc && cycles < 100) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles != exp_cycles) begin
      failures++; $display("FAIL %s: %0d cycles to halt, expected %0d", what, cycles, exp_cycles);
    end
  endtask

  function automatic logic [31:0] xreg(input int r);
    return (r == 0) ? 32'd0 : dut.u_cpu.u_dp.u_gpr.regs[r];
  endfunction

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %h, expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] p [];
    logic [31:0] m12;
    // 1. summation
    p = '{asm_addi(1, 0, 4), asm_addi(2, 0, 20), asm_add(3, 1, 2), asm_beq(0, 0, 0)};
    run(p, 12, 3, "summation");
    expect_eq(xreg(3), 24, "summation x3");
    // 2. increment of memory cell 12
    m12 = dut.u_dmem.mem[3];
    p = '{asm_lw(1, 12, 0), asm_addi(1, 1, 1), asm_sw(1, 12, 0), asm_beq(0, 0, 0)};
    run(p, 12, 3, "increment");
    expect_eq(dut.u_dmem.mem[3], m12 + 1, "Mem[12]");
    // 3. conditional assignment, x1 != x2: the addi runs
    p = '{asm_addi(1, 0, 7), asm_addi(2, 0, 9), asm_beq(1, 2, 8), asm_addi(2, 0, 5), asm_beq(0, 0, 0)};
    run(p, 16, 4, "conditional, not equal");
    expect_eq(xreg(2), 5, "x2 when x1 != x2");
    //    x1 == x2: the addi is skipped
    p = '{asm_addi(1, 0, 9), asm_addi(2, 0, 9), asm_beq(1, 2, 8), asm_addi(2, 0, 5), asm_beq(0, 0, 0)};
    run(p, 16, 3, "conditional, equal");
    expect_eq(xreg(2), 9, "x2 when x1 == x2");
    // 4. lw x11,0x4(x0) from its machine code; Mem[4] prepared by a store
    p = '{asm_addi(5, 0, 1234), asm_sw(5, 4, 0), 32'h0040_2583, asm_beq(0, 0, 0)};
    run(p, 12, 3, "lw x11,0x4(x0)");
    expect_eq(xreg(11), 1234, "x11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
