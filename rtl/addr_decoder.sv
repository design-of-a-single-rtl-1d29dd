// addr_decoder - address decoder for memory-mapped I/O.
//
// Sits on the data memory bus between the CPU and the data memory and
// gives the lw/sw address space three I/O locations of an SP0256 speech
// synthesizer:
//   A_ADDR   (0xFFFF_FF00)  write: allophone code, WriteData[5:0] -> A6:1
//   ALD_ADDR (0xFFFF_FF04)  write: WriteData[0] -> ALD# (active low)
//   SBY_ADDR (0xFFFF_FF08)  read:  SBY in ReadData[0], other bits 0
// It compares the full 32-bit Address with these and, together with
// MemWrite, raises the matching write strobe. Addresses at or above
// IO_BASE belong to I/O: the data memory's WE is suppressed there, so the
// memory ignores I/O writes, and reads there return the SBY word (at
// SBY_ADDR) or 0. All other reads return the data memory's RD.
//
// The three addresses and the bit lanes follow the architecture's
// memory map; the size of the I/O window (the top 256 bytes) and the value
// 0 read from write-only locations are this design's choices.
// Purely combinational.
module addr_decoder #(
  parameter logic [31:0] IO_BASE  = 32'hFFFF_FF00,  // first I/O address
  parameter logic [31:0] A_ADDR   = 32'hFFFF_FF00,  // A6:1 port
  parameter logic [31:0] ALD_ADDR = 32'hFFFF_FF04,  // ALD# port
  parameter logic [31:0] SBY_ADDR = 32'hFFFF_FF08   // SBY port
) (
  input  logic [31:0] address,     // data bus address (ALUOut)
  input  logic        mem_write,   // MemWrite from the CPU
  input  logic [31:0] dmem_rd,     // data memory read data
  input  logic        sby,         // SBY pin of the synthesizer
  output logic        dmem_we,     // write enable to the data memory
  output logic        a_we,        // write strobe of the A6:1 register
  output logic        ald_we,      // write strobe of the ALD# register
  output logic [31:0] read_data    // ReadData to the CPU
);

  logic is_io;

  assign is_io   = (address >= IO_BASE);
  assign dmem_we = mem_write && !is_io;
  assign a_we    = mem_write && (address == A_ADDR);
  assign ald_we  = mem_write && (address == ALD_ADDR);

  // a store goes to exactly one place: memory, A6:1 or ALD#
  always_comb begin
    assert (!(dmem_we && (a_we || ald_we)) && !(a_we && ald_we))
      else $error("address decoder raised more than one write strobe");
  end

  always_comb begin
    if (!is_io)                   read_data = dmem_rd;
    else if (address == SBY_ADDR) read_data = {31'b0, sby};
    else                          read_data = '0;
  end

endmodule
