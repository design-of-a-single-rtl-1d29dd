// alu - arithmetic logic unit of the picoRISC-V CPU.
//
// Computes ALUOut from SrcA and SrcB for the five operations that the
// instruction subset needs: add (add, addi, lw, sw, jalr target), sub
// (sub, and the comparison of beq), and, or, and slt (signed less-than,
// result 1 or 0). Zero is high when ALUOut is all zeros; the control of
// beq uses it to test [rs1] == [rs2] through a subtraction.
//
// The operation set follows the architecture; the internal form (one
// adder/subtractor shared by add, sub and slt) is this design's choice.
// Purely combinational.
module alu
  import picorv_pkg::*;
#(
  parameter int unsigned WIDTH = 32   // data width (XLEN)
) (
  input  logic [WIDTH-1:0] src_a,        // SrcA = [rs1]
  input  logic [WIDTH-1:0] src_b,        // SrcB = [rs2] or immediate
  input  alu_op_e          alu_control,  // ALUControl
  output logic [WIDTH-1:0] alu_out,      // ALUOut
  output logic             zero          // ALUOut == 0
);

  logic             subtract;
  logic [WIDTH-1:0] sum;
  logic             less;

  assign subtract = (alu_control == ALU_SUB) || (alu_control == ALU_SLT);
  assign sum      = src_a + (subtract ? ~src_b : src_b) + WIDTH'(subtract);

  // signed less-than: sign of the difference, corrected on overflow
  assign less = (src_a[WIDTH-1] != src_b[WIDTH-1]) ? src_a[WIDTH-1] : sum[WIDTH-1];

  always_comb begin
    unique case (alu_control)
      ALU_ADD, ALU_SUB: alu_out = sum;
      ALU_AND:          alu_out = src_a & src_b;
      ALU_OR:           alu_out = src_a | src_b;
      ALU_SLT:          alu_out = {{(WIDTH-1){1'b0}}, less};
      default:          alu_out = '0;
    endcase
  end

  assign zero = (alu_out == '0);

endmodule
