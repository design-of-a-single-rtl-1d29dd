// instr_mem - instruction memory of the Harvard picoRISC-V system.
//
// WORDS words of 32 bits. The CPU side is a read-only port: RD is the word
// at byte address A, read combinationally (A[1:0] is ignored, since every
// picoRISC-V instruction is a 32-bit aligned word; address bits above the
// array wrap around).
//
// The architecture only requires that the program can be loaded into
// memory; the load port used for that (prog_we/prog_addr/prog_wdata, one
// word per rising clock edge, word address) and the default size of 1024
// words (4 KiB) are this design's own choices.
module instr_mem #(
  parameter int unsigned WORDS = 1024,  // number of 32-bit words
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // CPU instruction bus
  input  logic [31:0]   a,           // byte address (PC)
  output logic [31:0]   rd,          // instruction word
  // program load port
  input  logic          prog_we,     // write one word
  input  logic [AW-1:0] prog_addr,   // word address
  input  logic [31:0]   prog_wdata   // instruction word to store
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  assign rd = mem[a[AW+1:2]];

endmodule
