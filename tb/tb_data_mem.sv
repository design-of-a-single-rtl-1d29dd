// tb_data_mem - self-checking testbench of the data memory.
//
// Random interleaved writes (WE high or low) and reads against a reference
// array. A write lands at the rising edge; the read port is combinational,
// so the new value is visible right after that edge.
module tb_data_mem;
  localparam int WORDS = 256;
  logic        clk = 0;
  logic [31:0] a, wd, rd;
  logic        we;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk, .a, .wd, .we, .rd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; a = 0; wd = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      a = 32'(i * 4); wd = $urandom; we = 1; ref_mem[i] = wd;
    end
    repeat (3000) begin
      int w;
      @(negedge clk);
      w = $urandom_range(WORDS - 1);
      a = {22'd0, 8'(w), 2'($urandom)}; we = $urandom_range(1); wd = $urandom;
      #1;
      checks++;
      if (rd !== ref_mem[w]) begin failures++; $display("FAIL read a=%h rd=%h exp %h", a, rd, ref_mem[w]); end
      @(posedge clk);
      if (we) ref_mem[w] = wd;
      #1;
      checks++;
      if (rd !== ref_mem[w]) begin failures++; $display("FAIL after edge a=%h rd=%h exp %h", a, rd, ref_mem[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
