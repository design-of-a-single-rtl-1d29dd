// picorv_cpu - picoRISC-V single-cycle CPU.
//
// The control unit and the datapath joined as one CPU with two separate
// buses (Harvard): an instruction memory bus (PC out, Instr in) and a data
// memory bus (Address = ALUOut, WriteData = [rs2], MemWrite out, ReadData
// in). Every instruction is fetched, executed and retired in one clock
// cycle (CPI = 1); both memories must therefore be read combinationally
// within that cycle, and the data memory is written on the rising edge
// that ends it.
//
// The partition and the bus signals follow the architecture; the
// synchronous reset (PC <= RESET_PC) is this design's choice.
module picorv_cpu
  import picorv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0   // PC after reset
) (
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  // instruction memory bus
  output logic [31:0] pc,
  input  logic [31:0] instr,
  // data memory bus
  output logic        mem_write,
  output logic [31:0] address,
  output logic [31:0] write_data,
  input  logic [31:0] read_data
);

  ctrl_t ctrl;
  logic  zero, pc_src_target, pc_src_alu;

  control_unit u_cu (
    .opcode        (instr[6:0]),
    .funct3        (instr[14:12]),
    .funct7        (instr[31:25]),
    .zero          (zero),
    .ctrl          (ctrl),
    .pc_src_target (pc_src_target),
    .pc_src_alu    (pc_src_alu)
  );

  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk           (clk),
    .rst           (rst),
    .pc            (pc),
    .instr         (instr),
    .ctrl          (ctrl),
    .pc_src_target (pc_src_target),
    .pc_src_alu    (pc_src_alu),
    .zero          (zero),
    .alu_out       (address),
    .write_data    (write_data),
    .read_data     (read_data)
  );

  assign mem_write = ctrl.mem_write;

endmodule
