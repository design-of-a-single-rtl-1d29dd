// picorv_system - picoRISC-V single-cycle computer with memory-mapped I/O.
//
// A Harvard computer: the single-cycle CPU with its own instruction
// memory and data memory, each on a separate bus, and an address decoder
// on the data memory bus that maps an SP0256 speech synthesizer into the
// lw/sw address space (A6:1 at 0xFFFF_FF00, ALD# at 0xFFFF_FF04, SBY at
// 0xFFFF_FF08). One instruction completes per clock cycle.
//
// Interface: clk, rst (synchronous, active high; PC restarts at 0), a
// program load port that writes instruction words (word address) while
// the CPU is held in reset, and the synthesizer pins a (A6:1), ald_n and
// sby. The synthesizer itself is outside this design.
//
// The structure follows the architecture; the load port, the memory sizes
// (1024 words each by default) and the reset are this design's choices.
module picorv_system #(
  parameter int unsigned IMEM_WORDS = 1024,  // instruction memory words
  parameter int unsigned DMEM_WORDS = 1024,  // data memory words
  localparam int unsigned IAW       = $clog2(IMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  // program load port
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_wdata,
  // SP0256 pins
  output logic [5:0]     sp_a,      // A6:1
  output logic           sp_ald_n,  // ALD#
  input  logic           sp_sby     // SBY
);

  logic [31:0] pc, instr;
  logic        mem_write, dmem_we, a_we, ald_we;
  logic [31:0] address, write_data, read_data, dmem_rd;

  picorv_cpu u_cpu (
    .clk        (clk),
    .rst        (rst),
    .pc         (pc),
    .instr      (instr),
    .mem_write  (mem_write),
    .address    (address),
    .write_data (write_data),
    .read_data  (read_data)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk        (clk),
    .a          (pc),
    .rd         (instr),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk (clk),
    .a   (address),
    .wd  (write_data),
    .we  (dmem_we),
    .rd  (dmem_rd)
  );

  addr_decoder u_dec (
    .address   (address),
    .mem_write (mem_write),
    .dmem_rd   (dmem_rd),
    .sby       (sp_sby),
    .dmem_we   (dmem_we),
    .a_we      (a_we),
    .ald_we    (ald_we),
    .read_data (read_data)
  );

  sp0256_port u_port (
    .clk        (clk),
    .rst        (rst),
    .write_data (write_data),
    .a_we       (a_we),
    .ald_we     (ald_we),
    .a          (sp_a),
    .ald_n      (sp_ald_n)
  );

endmodule
