// gpr_set - 3-port general-purpose register set.
//
// NREGS registers of WIDTH bits (x0..x31 of 32 bits by default). Read
// ports: A1 -> RD1 and A2 -> RD2, both combinational. Write port: WD3 is
// written into register A3 on the rising clock edge when WE3 is 1.
// Register x0 is hardwired to zero: reads of it return 0 and writes to it
// are dropped, so x0 also has no storage.
//
// A value written at the end of one cycle is read by the next instruction
// after the read delay, so no bypass is needed in a single-cycle CPU.
// The registers have no reset (architecturally their values are undefined
// at power-up); that, and the size, follow the usual RV32I register file.
module gpr_set #(
  parameter int unsigned WIDTH = 32,   // register width (XLEN)
  parameter int unsigned NREGS = 32,   // number of registers
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic [AW-1:0]    a1,    // read address 1 (rs1)
  input  logic [AW-1:0]    a2,    // read address 2 (rs2)
  input  logic [AW-1:0]    a3,    // write address (rd)
  input  logic [WIDTH-1:0] wd3,   // write data
  input  logic             we3,   // write enable
  output logic [WIDTH-1:0] rd1,   // read data 1
  output logic [WIDTH-1:0] rd2    // read data 2
);

  logic [WIDTH-1:0] regs [1:NREGS-1];

  always_ff @(posedge clk) begin
    if (we3 && a3 != '0) regs[a3] <= wd3;
  end

  assign rd1 = (a1 == '0) ? '0 : regs[a1];
  assign rd2 = (a2 == '0) ? '0 : regs[a2];

endmodule
