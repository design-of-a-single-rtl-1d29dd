// tb_addr_decoder - self-checking testbench of the memory-mapped I/O
// address decoder.
//
// Checks, for the three SP0256 locations, for random memory addresses and
// for other addresses in the I/O window: which write strobe fires (data
// memory, A6:1, ALD#) for MemWrite high and low, and what ReadData returns
// (memory word, SBY in bit 0, or 0).
module tb_addr_decoder;
  logic [31:0] address, dmem_rd, read_data;
  logic        mem_write, sby, dmem_we, a_we, ald_we;
  int checks = 0, failures = 0;

  addr_decoder dut (.address, .mem_write, .dmem_rd, .sby, .dmem_we, .a_we, .ald_we, .read_data);

  task automatic check(input logic [31:0] a, input logic e_dwe, input logic e_awe,
                       input logic e_ald, input logic [31:0] e_rd);
    #1;
    checks++;
    if ({dmem_we, a_we, ald_we} !== {e_dwe, e_awe, e_ald} || read_data !== e_rd) begin
      failures++;
      $display("FAIL a=%h mw=%b: we=%b%b%b rd=%h expected %b%b%b %h", a, mem_write,
               dmem_we, a_we, ald_we, read_data, e_dwe, e_awe, e_ald, e_rd);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      mem_write = 1'($urandom); sby = 1'($urandom); dmem_rd = $urandom;
      address = 32'hFFFF_FF00;
      check(address, 0, mem_write, 0, 0);
      address = 32'hFFFF_FF04;
      check(address, 0, 0, mem_write, 0);
      address = 32'hFFFF_FF08;
      check(address, 0, 0, 0, {31'b0, sby});
      address = 32'hFFFF_FF0C + 4 * $urandom_range(60);
      check(address, 0, 0, 0, 0);
      address = $urandom_range(32'hFFFF_FEFF);
      check(address, mem_write, 0, 0, dmem_rd);
      address = 32'h0000_0100;
      check(address, mem_write, 0, 0, dmem_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
