// imm_decode - Immediate Decoder of the picoRISC-V CPU.
//
// Takes the 25 instruction bits inst[31:7] that can hold an immediate and
// builds the 32-bit sign-extended operand in one of the five RISC-V ways,
// selected by imm_control:
//   I: {21{i31}, i30:20}                 (lw, addi, jalr)
//   S: {21{i31}, i30:25, i11:7}          (sw)
//   B: {20{i31}, i7, i30:25, i11:8, 0}   (beq, offset in multiples of 2)
//   U: {i31:12, 12'b0}                   (not used by picoRISC-V)
//   J: {12{i31}, i19:12, i20, i30:21, 0} (jal, offset in multiples of 2)
// inst[31] is always the sign bit. The bit mapping follows the RISC-V
// instruction formats; the U format is included because the decoder is
// defined for all five immediate formats, although no picoRISC-V instruction
// selects it.
//
// Purely combinational; 25-bit input, 32-bit output.
module imm_decode
  import picorv_pkg::*;
(
  input  logic [31:7]  inst,         // instruction bits 31..7
  input  imm_ctrl_e    imm_control,  // format selector (ImmControl)
  output logic [31:0]  imm           // sign-extended immediate operand
);

  always_comb begin
    unique case (imm_control)
      IMM_I:   imm = {{21{inst[31]}}, inst[30:20]};
      IMM_S:   imm = {{21{inst[31]}}, inst[30:25], inst[11:7]};
      IMM_B:   imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'b0};
      IMM_J:   imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
