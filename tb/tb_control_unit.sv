// tb_control_unit - self-checking testbench of the control unit.
//
// Holds its own decode table, one row per picoRISC-V instruction (what the
// instruction needs from the datapath: ALUSrc, ALUControl, MemWrite,
// MemToReg, RegWrite, the three branch signals, the immediate format), and
// checks the unit against it for random register/immediate fields and
// both values of Zero, including the next-PC select. Encodings outside
// the subset must not write a register or memory and must not branch.
module tb_control_unit;
  import picorv_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] w;
  logic        zero;
  ctrl_t       ctrl;
  logic        pc_t, pc_a;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(w[6:0]), .funct3(w[14:12]), .funct7(w[31:25]), .zero,
                    .ctrl, .pc_src_target(pc_t), .pc_src_alu(pc_a));

  typedef struct {
    string     name;
    logic      alu_src;
    alu_op_e   alu;
    logic      mw, m2r, rw, beq, jal, jalr;
    imm_ctrl_e imm;
  } row_t;

  function automatic logic [31:0] make(input int k);
    int rd = $urandom_range(31), r1 = $urandom_range(31), r2 = $urandom_range(31);
    int i12 = int'($urandom_range(4095)) - 2048;
    case (k)
      0:  return asm_lw(rd, i12, r1);
      1:  return asm_sw(r2, i12, r1);
      2:  return asm_add(rd, r1, r2);
      3:  return asm_sub(rd, r1, r2);
      4:  return asm_slt(rd, r1, r2);
      5:  return asm_or(rd, r1, r2);
      6:  return asm_and(rd, r1, r2);
      7:  return asm_addi(rd, r1, i12);
      8:  return asm_beq(r1, r2, 2 * i12);
      9:  return asm_jal(rd, 2 * i12);
      default: return asm_jalr(rd, r1, i12);
    endcase
  endfunction

  row_t tbl [11];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //            name    src alu      mw m2r rw beq jal jalr imm
    tbl[0]  = '{"lw",   1, ALU_ADD, 0, 1, 1, 0, 0, 0, IMM_I};
    tbl[1]  = '{"sw",   1, ALU_ADD, 1, 0, 0, 0, 0, 0, IMM_S};
    tbl[2]  = '{"add",  0, ALU_ADD, 0, 0, 1, 0, 0, 0, IMM_I};
    tbl[3]  = '{"sub",  0, ALU_SUB, 0, 0, 1, 0, 0, 0, IMM_I};
    tbl[4]  = '{"slt",  0, ALU_SLT, 0, 0, 1, 0, 0, 0, IMM_I};
    tbl[5]  = '{"or",   0, ALU_OR,  0, 0, 1, 0, 0, 0, IMM_I};
    tbl[6]  = '{"and",  0, ALU_AND, 0, 0, 1, 0, 0, 0, IMM_I};
    tbl[7]  = '{"addi", 1, ALU_ADD, 0, 0, 1, 0, 0, 0, IMM_I};
    tbl[8]  = '{"beq",  0, ALU_SUB, 0, 0, 0, 1, 0, 0, IMM_B};
    tbl[9]  = '{"jal",  0, ALU_ADD, 0, 0, 1, 0, 1, 0, IMM_J};
    tbl[10] = '{"jalr", 1, ALU_ADD, 0, 0, 1, 0, 0, 1, IMM_I};
    repeat (100) begin
      for (int k = 0; k < 11; k++) begin
        row_t r;
        logic exp_t, exp_a;
        logic ok;
        r = tbl[k];
        w = make(k); zero = 1'($urandom); #1;
        exp_t = r.jal | (r.beq & zero);
        exp_a = r.jalr;
        // ALU operation and SrcB only matter where the ALU result is used
        ok = (ctrl.mem_write == r.mw) && (ctrl.reg_write == r.rw) &&
             (ctrl.branch_beq == r.beq) && (ctrl.branch_jal == r.jal) &&
             (ctrl.branch_jalr == r.jalr) && (pc_t == exp_t) && (pc_a == exp_a);
        if (!r.jal) ok &= (ctrl.alu_src == r.alu_src) && (ctrl.alu_control == r.alu);
        if (r.rw && !r.jal && !r.jalr) ok &= (ctrl.mem_to_reg == r.m2r);
        if (k < 2 || k > 6) ok &= (ctrl.imm_control == r.imm);
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL %s w=%h zero=%b ctrl=%p pc_t=%b pc_a=%b", r.name, w, zero, ctrl, pc_t, pc_a);
        end
      end
    end
    // encodings outside the subset: no state change, no branch
    repeat (500) begin
      w = $urandom; zero = 1'($urandom);
      if (w[6:0] inside {OP_R, OP_IMM, OP_LOAD, OP_STORE, OP_BRANCH, OP_JAL, OP_JALR}) w[6:0] = 7'b0110111;
      #1;
      checks++;
      if (ctrl.reg_write || ctrl.mem_write || pc_t || pc_a) begin
        failures++; $display("FAIL illegal w=%h ctrl=%p", w, ctrl);
      end
    end
    // R-type with a wrong funct7, lw with a wrong funct3
    w = r_type(7'b0000001, 1, 2, 3'b000, 3); #1;
    checks++; if (ctrl.reg_write) begin failures++; $display("FAIL mul-like R-type writes"); end
    w = i_type(0, 1, 3'b001, 2, 7'b0000011); #1;
    checks++; if (ctrl.reg_write) begin failures++; $display("FAIL lh-like load writes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
