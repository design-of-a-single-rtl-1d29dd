// tb_sp0256_port - self-checking testbench of the SP0256 output port.
//
// Checks the reset levels (A6:1 = 0, ALD# = 1), that each register loads
// only its own WriteData bits and only on its own strobe, and that it
// holds its value otherwise.
module tb_sp0256_port;
  logic        clk = 0, rst, a_we, ald_we, ald_n;
  logic [31:0] write_data;
  logic [5:0]  a;
  logic [5:0]  exp_a;
  logic        exp_ald;
  int checks = 0, failures = 0;

  sp0256_port dut (.clk, .rst, .write_data, .a_we, .ald_we, .a, .ald_n);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; a_we = 0; ald_we = 0; write_data = $urandom;
    @(posedge clk); #1;
    checks++;
    if (a !== 0 || ald_n !== 1) begin failures++; $display("FAIL reset a=%h ald_n=%b", a, ald_n); end
    rst = 0; exp_a = 0; exp_ald = 1;
    repeat (2000) begin
      @(negedge clk);
      write_data = $urandom; a_we = 1'($urandom); ald_we = 1'($urandom);
      @(posedge clk);
      if (a_we)   exp_a   = write_data[5:0];
      if (ald_we) exp_ald = write_data[0];
      #1;
      checks++;
      if (a !== exp_a || ald_n !== exp_ald) begin
        failures++; $display("FAIL a=%h ald_n=%b expected %h %b", a, ald_n, exp_a, exp_ald);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
