// rv_ref_pkg - instruction-level reference model of picoRISC-V.
//
// A plain interpreter of the 11 instructions, written from the
// instruction semantics (rd <- ..., go to ...), used by testbenches to run
// the same program as the CPU in lock step: one call of step() per
// instruction. Data memory is a sparse word array; instructions outside the
// subset do nothing but advance PC by 4.
package rv_ref_pkg;

  class rv_ref;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] dmem [logic [29:0]];
    // what the last step did on the data bus
    bit          did_store;
    logic [31:0] st_addr, st_data;

    function new(input logic [31:0] start_pc = 0);
      foreach (x[i]) x[i] = 0;
      pc = start_pc;
    endfunction

    function logic [31:0] load(input logic [31:0] a);
      return dmem.exists(a[31:2]) ? dmem[a[31:2]] : 32'd0;
    endfunction

    function void step(input logic [31:0] w);
      logic [31:0] a, b, nxt, res;
      logic [31:0] ii, is, ib, ij;
      bit wr;
      a  = x[w[19:15]];
      b  = x[w[24:20]];
      ii = {{20{w[31]}}, w[31:20]};
      is = {{20{w[31]}}, w[31:25], w[11:7]};
      ib = {{19{w[31]}}, w[31], w[7], w[30:25], w[11:8], 1'b0};
      ij = {{11{w[31]}}, w[31], w[19:12], w[20], w[30:21], 1'b0};
      nxt = pc + 4; wr = 0; res = 0; did_store = 0;
      case ({w[31:25], w[14:12], w[6:0]}) inside
        {7'b0000000, 3'b000, 7'b0110011}: begin res = a + b; wr = 1; end
        {7'b0100000, 3'b000, 7'b0110011}: begin res = a - b; wr = 1; end
        {7'b0000000, 3'b010, 7'b0110011}: begin res = ($signed(a) < $signed(b)) ? 1 : 0; wr = 1; end
        {7'b0000000, 3'b110, 7'b0110011}: begin res = a | b; wr = 1; end
        {7'b0000000, 3'b111, 7'b0110011}: begin res = a & b; wr = 1; end
        {7'b???????, 3'b000, 7'b0010011}: begin res = a + ii; wr = 1; end
        {7'b???????, 3'b010, 7'b0000011}: begin res = load(a + ii); wr = 1; end
        {7'b???????, 3'b010, 7'b0100011}: begin
          did_store = 1; st_addr = a + is; st_data = b;
        end
        {7'b???????, 3'b000, 7'b1100011}: if (a == b) nxt = pc + ib;
        {7'b???????, 3'b???, 7'b1101111}: begin res = pc + 4; wr = 1; nxt = pc + ij; end
        {7'b???????, 3'b000, 7'b1100111}: begin res = pc + 4; wr = 1; nxt = a + ii; end
        default: ;
      endcase
      if (did_store) dmem[st_addr[31:2]] = st_data;
      if (wr && w[11:7] != 0) x[w[11:7]] = res;
      pc = nxt;
    endfunction
  endclass

endpackage
