// tb_datapath - self-checking testbench of the datapath.
//
// The testbench plays the control unit: for each instruction it drives the
// control word by hand and checks the datapath's outputs (ALUOut, the
// store data, Zero and the PC of the next cycle). Register contents are
// checked indirectly, through later instructions that read them.
// Covers addi, add, sub, and, or, slt, sw, lw (with ReadData written back),
// beq taken and not taken, jal (link = PC+4) and jalr.
module tb_datapath;
  import picorv_pkg::*;
  import rv_asm_pkg::*;

  logic        clk = 0, rst;
  logic [31:0] pc, instr, alu_out, write_data, read_data;
  ctrl_t       ctrl;
  logic        pc_t, pc_a, zero;
  int checks = 0, failures = 0;

  datapath dut (.clk, .rst, .pc, .instr, .ctrl, .pc_src_target(pc_t), .pc_src_alu(pc_a),
                .zero, .alu_out, .write_data, .read_data);

  always #5 clk = ~clk;

  function automatic ctrl_t cw(input logic src, input alu_op_e op, input logic mw, input logic m2r,
                               input logic rw, input logic b, input logic j, input logic jr,
                               input imm_ctrl_e im);
    return '{alu_src: src, alu_control: op, mem_write: mw, mem_to_reg: m2r, reg_write: rw,
             branch_beq: b, branch_jal: j, branch_jalr: jr, imm_control: im};
  endfunction

  // apply one instruction for one cycle; check ALUOut (and store data), then next PC
  task automatic step(input logic [31:0] w, input ctrl_t c, input logic t, input logic ja,
                      input logic [31:0] exp_alu, input logic [31:0] exp_pc, input string what,
                      input logic check_alu = 1'b1);
    @(negedge clk);
    instr = w; ctrl = c; pc_t = t; pc_a = ja;
    #1;
    if (check_alu) begin
      checks++;
      if (alu_out !== exp_alu) begin failures++; $display("FAIL %s alu_out=%h exp %h", what, alu_out, exp_alu); end
    end
    @(posedge clk); #1;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("FAIL %s next pc=%h exp %h", what, pc, exp_pc); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t R, I;
    R = cw(0, ALU_ADD, 0, 0, 1, 0, 0, 0, IMM_I);
    I = cw(1, ALU_ADD, 0, 0, 1, 0, 0, 0, IMM_I);
    rst = 1; instr = 0; ctrl = cw(0, ALU_ADD, 0, 0, 0, 0, 0, 0, IMM_I); pc_t = 0; pc_a = 0; read_data = 0;
    @(posedge clk); @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    step(asm_addi(1, 0, 25), I, 0, 0, 25, 4, "addi x1,x0,25");
    step(asm_addi(2, 0, -15), I, 0, 0, -15, 8, "addi x2,x0,-15");
    step(asm_add(3, 1, 2), R, 0, 0, 10, 12, "add x3,x1,x2");
    R.alu_control = ALU_SUB;
    step(asm_sub(4, 1, 2), R, 0, 0, 40, 16, "sub x4,x1,x2");
    R.alu_control = ALU_AND;
    step(asm_and(5, 1, 2), R, 0, 0, 25 & -15, 20, "and");
    R.alu_control = ALU_OR;
    step(asm_or(6, 1, 2), R, 0, 0, 25 | -15, 24, "or");
    R.alu_control = ALU_SLT;
    step(asm_slt(7, 2, 1), R, 0, 0, 1, 28, "slt x7,x2,x1");
    step(asm_slt(8, 1, 2), R, 0, 0, 0, 32, "slt x8,x1,x2");
    // store: address = x1 + 8, data = [x3]
    @(negedge clk);
    instr = asm_sw(3, 8, 1); ctrl = cw(1, ALU_ADD, 1, 0, 0, 0, 0, 0, IMM_S); #1;
    checks += 2;
    if (alu_out !== 33) begin failures++; $display("FAIL sw address %h", alu_out); end
    if (write_data !== 10) begin failures++; $display("FAIL sw data %h", write_data); end
    @(posedge clk);
    // load: ReadData 0x1234 into x9, then read x9 back through addi
    read_data = 32'h1234;
    step(asm_lw(9, -4, 1), cw(1, ALU_ADD, 0, 1, 1, 0, 0, 0, IMM_I), 0, 0, 21, 40, "lw x9,-4(x1)");
    read_data = 0;
    step(asm_addi(10, 9, 1), I, 0, 0, 32'h1235, 44, "addi x10,x9,1");
    // beq not taken (x1 != x2), then taken (x3 == x3)
    @(negedge clk);
    instr = asm_beq(1, 2, -40); ctrl = cw(0, ALU_SUB, 0, 0, 0, 1, 0, 0, IMM_B); #1;
    checks++; if (zero !== 0) begin failures++; $display("FAIL beq zero not 0"); end
    @(posedge clk); #1;
    checks++; if (pc !== 48) begin failures++; $display("FAIL beq not taken pc=%h", pc); end
    @(negedge clk);
    instr = asm_beq(3, 3, -40); #1;
    checks++; if (zero !== 1) begin failures++; $display("FAIL beq zero not 1"); end
    pc_t = 1;
    @(posedge clk); #1;
    checks++; if (pc !== 8) begin failures++; $display("FAIL beq taken pc=%h", pc); end
    // jal x11, +100 : link 12, pc 108
    step(asm_jal(11, 100), cw(0, ALU_ADD, 0, 0, 1, 0, 1, 0, IMM_J), 1, 0, 0, 108, "jal", 1'b0);
    step(asm_addi(12, 11, 0), I, 0, 0, 12, 112, "read link x11");
    // jalr x13, x11, 20 : target 32, link 116
    step(asm_jalr(13, 11, 20), cw(1, ALU_ADD, 0, 0, 1, 0, 0, 1, IMM_I), 0, 1, 32, 32, "jalr");
    step(asm_addi(14, 13, 0), I, 0, 0, 116, 36, "read link x13");
    // writes to x0 are dropped
    step(asm_addi(0, 0, 99), I, 0, 0, 99, 40, "addi x0,x0,99");
    step(asm_addi(15, 0, 0), I, 0, 0, 0, 44, "read x0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
