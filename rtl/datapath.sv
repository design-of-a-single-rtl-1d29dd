// datapath - datapath of the picoRISC-V single-cycle CPU.
//
// Holds the only state of the CPU besides the registers: the program
// counter. In each clock cycle the instruction at PC is decoded, rs1/rs2
// are read from the GPR set, the ALU computes on [rs1] and SrcB (= [rs2],
// or the immediate when ALUSrc = 1), and on the rising edge the result is
// written to rd and PC is replaced by the next PC.
//   write-back value: PC+4     for jal/jalr (BranchJal or BranchJalr),
//                     ReadData for lw (MemToReg),
//                     ALUOut   otherwise;
//   next PC:          ALUOut ([rs1]+imm) when pc_src_alu,
//                     PC + immediate      when pc_src_target,
//                     PC + 4              otherwise.
// The data memory address is ALUOut and its write data is RD2 = [rs2].
//
// Units and connections (PC register, PC+4 adder, GPR set with A1=19:15,
// A2=24:20, A3=11:7, Immediate Decoder fed by 31:7, SrcB multiplexer, ALU,
// branch-target adder) follow the architecture. Selecting PC+4 for
// write-back with the jump signals, computing the jalr target in the ALU,
// and the synchronous reset of PC to RESET_PC (0 by default) are this
// design's own choices. MemWrite and BranchBeq pass through the control
// word unused here (MemWrite goes straight to the data bus, BranchBeq is
// combined with Zero in the control unit), as does the opcode field of
// the instruction, which only the control unit reads.
module datapath
  import picorv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0   // PC after reset
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  // instruction memory bus
  output logic [31:0] pc,             // instruction address
  input  logic [31:0] instr,          // instruction word
  // control
  input  ctrl_t       ctrl,
  input  logic        pc_src_target,
  input  logic        pc_src_alu,
  output logic        zero,           // ALU Zero flag to the control unit
  // data memory bus
  output logic [31:0] alu_out,        // data address
  output logic [31:0] write_data,     // store data ([rs2])
  input  logic [31:0] read_data       // load data
);

  logic [31:0] pc_next, pc_plus4, pc_target;
  logic [31:0] rd1, rd2, imm_op, src_b, result;

  // program counter
  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

  assign pc_plus4  = pc + 32'd4;
  assign pc_target = pc + imm_op;
  assign pc_next   = pc_src_alu    ? alu_out   :
                     pc_src_target ? pc_target : pc_plus4;

  gpr_set #(.WIDTH(XLEN), .NREGS(NREGS)) u_gpr (
    .clk (clk),
    .a1  (instr[19:15]),
    .a2  (instr[24:20]),
    .a3  (instr[11:7]),
    .wd3 (result),
    .we3 (ctrl.reg_write),
    .rd1 (rd1),
    .rd2 (rd2)
  );

  imm_decode u_imm (
    .inst        (instr[31:7]),
    .imm_control (ctrl.imm_control),
    .imm         (imm_op)
  );

  assign src_b = ctrl.alu_src ? imm_op : rd2;

  alu #(.WIDTH(XLEN)) u_alu (
    .src_a       (rd1),
    .src_b       (src_b),
    .alu_control (ctrl.alu_control),
    .alu_out     (alu_out),
    .zero        (zero)
  );

  assign write_data = rd2;
  assign result     = (ctrl.branch_jal || ctrl.branch_jalr) ? pc_plus4  :
                      ctrl.mem_to_reg                       ? read_data : alu_out;

endmodule
