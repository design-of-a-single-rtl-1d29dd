// tb_gpr_set - self-checking testbench of the 3-port register set.
//
// Random writes (including writes to x0) and random reads on both ports
// are compared with a reference array; x0 must always read as zero. A
// write takes effect at the rising edge and is visible on the read ports
// right after it.
module tb_gpr_set;
  logic        clk = 0;
  logic [4:0]  a1, a2, a3;
  logic [31:0] wd3, rd1, rd2;
  logic        we3;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0;

  gpr_set dut (.clk, .a1, .a2, .a3, .wd3, .we3, .rd1, .rd2);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we3 = 0; a1 = 0; a2 = 0; a3 = 0; wd3 = 0;
    // fill every register once
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      a3 = 5'(r); wd3 = $urandom; we3 = 1;
      ref_regs[r] = (r == 0) ? 32'd0 : wd3;
    end
    @(negedge clk); we3 = 0;
    repeat (3000) begin
      @(negedge clk);
      a1 = 5'($urandom); a2 = 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== ref_regs[a1]) begin failures++; $display("FAIL rd1 x%0d=%h exp %h", a1, rd1, ref_regs[a1]); end
      if (rd2 !== ref_regs[a2]) begin failures++; $display("FAIL rd2 x%0d=%h exp %h", a2, rd2, ref_regs[a2]); end
      a3 = 5'($urandom); wd3 = $urandom; we3 = $urandom_range(1);
      @(posedge clk);
      if (we3 && a3 != 0) ref_regs[a3] = wd3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
