// tb_instr_mem - self-checking testbench of the instruction memory.
//
// Loads random words through the program load port, then reads them back
// through the combinational byte-addressed port (A[1:0] ignored) and
// compares with the loaded values.
module tb_instr_mem;
  localparam int WORDS = 256;
  logic        clk = 0;
  logic [31:0] a, rd;
  logic        prog_we;
  logic [7:0]  prog_addr;
  logic [31:0] prog_wdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.clk, .a, .rd, .prog_we, .prog_addr, .prog_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; a = 0; prog_addr = 0; prog_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_wdata = $urandom; ref_mem[i] = prog_wdata;
    end
    @(negedge clk); prog_we = 0;
    repeat (1000) begin
      int w;
      w = $urandom_range(WORDS - 1);
      a = {22'd0, 8'(w), 2'($urandom)};
      #1;
      checks++;
      if (rd !== ref_mem[w]) begin failures++; $display("FAIL a=%h rd=%h exp %h", a, rd, ref_mem[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
