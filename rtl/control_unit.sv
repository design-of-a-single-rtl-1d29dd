// control_unit - combinational control unit of the single-cycle CPU.
//
// Decodes opcode, funct3 and funct7 of the current instruction into the
// control word of the datapath (ALUSrc, ALUControl, MemWrite, MemToReg,
// RegWrite, BranchBeq, BranchJal, BranchJalr, ImmControl) and, from the
// ALU's Zero flag, chooses the next PC:
//   PC+4              for every instruction except the ones below,
//   PC + immediate    for jal, and for beq when Zero = 1 ([rs1] == [rs2]),
//   ALUOut            for jalr ([rs1] + immediate).
// Every instruction finishes in the cycle it is fetched, so no state is
// needed and the unit is a pure combinational circuit.
//
// The signal names and the decode table's rows follow the architecture. The
// values in each row are derived here from what each instruction does. Any
// encoding outside picoRISC-V (unknown opcode or funct field) is executed
// as a no-operation: no register or memory write, PC+4. That, and the
// encodings of the enumerations, are this design's own choices.
module control_unit
  import picorv_pkg::*;
(
  input  logic [6:0] opcode,   // inst[6:0]
  input  logic [2:0] funct3,   // inst[14:12]
  input  logic [6:0] funct7,   // inst[31:25]
  input  logic       zero,     // ALU Zero flag
  output ctrl_t      ctrl,     // datapath control word
  output logic       pc_src_target,  // next PC = PC + immediate
  output logic       pc_src_alu      // next PC = ALUOut (jalr)
);

  always_comb begin
    ctrl = '{alu_src: 1'b0, alu_control: ALU_ADD, mem_write: 1'b0,
             mem_to_reg: 1'b0, reg_write: 1'b0, branch_beq: 1'b0,
             branch_jal: 1'b0, branch_jalr: 1'b0, imm_control: IMM_I};
    unique case (opcode)
      OP_LOAD: if (funct3 == F3_WORD) begin          // lw
        ctrl.alu_src     = 1'b1;
        ctrl.mem_to_reg  = 1'b1;
        ctrl.reg_write   = 1'b1;
      end
      OP_STORE: if (funct3 == F3_WORD) begin         // sw
        ctrl.alu_src     = 1'b1;
        ctrl.mem_write   = 1'b1;
        ctrl.imm_control = IMM_S;
      end
      OP_R: begin                                    // add sub slt or and
        ctrl.reg_write = 1'b1;
        unique case ({funct7, funct3})
          {F7_BASE, F3_ADD_SUB}: ctrl.alu_control = ALU_ADD;
          {F7_SUB,  F3_ADD_SUB}: ctrl.alu_control = ALU_SUB;
          {F7_BASE, F3_SLT}:     ctrl.alu_control = ALU_SLT;
          {F7_BASE, F3_OR}:      ctrl.alu_control = ALU_OR;
          {F7_BASE, F3_AND}:     ctrl.alu_control = ALU_AND;
          default:               ctrl.reg_write   = 1'b0;
        endcase
      end
      OP_IMM: if (funct3 == F3_ADDI) begin           // addi
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_BRANCH: if (funct3 == F3_BEQ) begin         // beq
        ctrl.alu_control = ALU_SUB;
        ctrl.branch_beq  = 1'b1;
        ctrl.imm_control = IMM_B;
      end
      OP_JAL: begin                                  // jal
        ctrl.reg_write   = 1'b1;
        ctrl.branch_jal  = 1'b1;
        ctrl.imm_control = IMM_J;
      end
      OP_JALR: if (funct3 == F3_JALR) begin          // jalr
        ctrl.alu_src     = 1'b1;
        ctrl.reg_write   = 1'b1;
        ctrl.branch_jalr = 1'b1;
      end
      default: ;
    endcase
  end

  assign pc_src_target = ctrl.branch_jal | (ctrl.branch_beq & zero);
  assign pc_src_alu    = ctrl.branch_jalr;

  // at most one jump kind per instruction, and no jump that also stores
  always_comb begin
    assert (!(pc_src_target && pc_src_alu) && !(ctrl.mem_write && (pc_src_target || pc_src_alu)))
      else $error("control unit selected conflicting next-PC sources");
  end

endmodule
