// tb_imm_decode - self-checking testbench of the Immediate Decoder.
//
// Random immediates of every format are encoded into instruction words by
// the assembler functions and the decoder must give the same value back,
// sign-extended to 32 bits. Also checks the worked example lw x11,4(x0) =
// 0x00402583 and the extreme values of each format.
module tb_imm_decode;
  import picorv_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr;
  imm_ctrl_e   sel;
  logic [31:0] imm;
  int checks = 0, failures = 0;

  imm_decode dut (.inst(instr[31:7]), .imm_control(sel), .imm(imm));

  task automatic check(input logic [31:0] w, input imm_ctrl_e s, input int expect_val, input string what);
    instr = w; sel = s; #1;
    checks++;
    if (imm !== 32'(expect_val)) begin
      failures++;
      $display("FAIL %s: inst=%h imm=%h expected=%h", what, w, imm, 32'(expect_val));
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
    int v;
    check(32'h0040_2583, IMM_I, 4, "lw x11,4(x0)");
    check(asm_addi(1, 0, -2048), IMM_I, -2048, "I min");
    check(asm_addi(1, 0, 2047),  IMM_I, 2047,  "I max");
    check(asm_sw(1, -2048, 0),   IMM_S, -2048, "S min");
    check(asm_beq(0, 0, -4096),  IMM_B, -4096, "B min");
    check(asm_beq(0, 0, 4094),   IMM_B, 4094,  "B max");
    check(asm_jal(0, -1048576),  IMM_J, -1048576, "J min");
    check(asm_jal(0, 1048574),   IMM_J, 1048574,  "J max");
    repeat (500) begin
      v = int'($urandom_range(4095)) - 2048;
      check(asm_addi($urandom_range(31), $urandom_range(31), v), IMM_I, v, "I");
      check(asm_lw($urandom_range(31), v, $urandom_range(31)), IMM_I, v, "I lw");
      v = int'($urandom_range(4095)) - 2048;
      check(asm_sw($urandom_range(31), v, $urandom_range(31)), IMM_S, v, "S");
      v = 2 * (int'($urandom_range(4095)) - 2048);
      check(asm_beq($urandom_range(31), $urandom_range(31), v), IMM_B, v, "B");
      v = 2 * (int'($urandom_range(1048575)) - 524288);
      check(asm_jal($urandom_range(31), v), IMM_J, v, "J");
      v = int'($urandom_range(1048575));
      check({20'(v), 5'($urandom_range(31)), 7'b0110111}, IMM_U, v * 4096, "U");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
