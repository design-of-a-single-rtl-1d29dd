// data_mem - data memory of the Harvard picoRISC-V system.
//
// WORDS words of 32 bits with two data ports: RD returns the word at byte
// address A combinationally, and WD is written to that word on the rising
// clock edge when WE is 1. Only aligned word accesses exist in picoRISC-V
// (lw, sw), so A[1:0] is ignored; address bits above the array wrap.
//
// Read/write timing follows the architecture; the default size of 1024
// words (4 KiB, which the 12-bit signed offsets from x0 and the allophone
// table at 0x100 fit into) is this design's choice. No reset: memory
// contents are whatever was stored.
module data_mem #(
  parameter int unsigned WORDS = 1024,  // number of 32-bit words
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] a,    // byte address (ALUOut)
  input  logic [31:0] wd,   // write data ([rs2])
  input  logic        we,   // write enable (MemWrite)
  output logic [31:0] rd    // read data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[a[AW+1:2]] <= wd;
  end

  assign rd = mem[a[AW+1:2]];

endmodule
