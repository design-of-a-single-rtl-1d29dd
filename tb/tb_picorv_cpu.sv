// tb_picorv_cpu - self-checking testbench of the single-cycle CPU.
//
// The CPU runs with behavioural instruction and data memories inside the
// testbench, in lock step with the instruction-level reference model: in
// every clock cycle the CPU's PC must equal the model's PC, so every
// instruction must complete in exactly one cycle (CPI = 1), and every data
// memory write (address and data) must match. Programs:
//   1. gcd(25, 15) as a subroutine called with jal and left with jalr,
//      then the "increment memory cell 12" sequence; results checked
//      against known values (gcd = 5, Mem[12] = 6) and the cycle count.
//   2. random programs of all 11 instructions, in lock step.
module tb_picorv_cpu;
  import rv_asm_pkg::*;
  import rv_ref_pkg::*;

  localparam int IW = 256;   // instruction words
  localparam int DW = 256;   // data words

  logic        clk = 0, rst;
  logic [31:0] pc, instr, address, write_data, read_data;
  logic        mem_write;
  logic [31:0] imem [IW];
  logic [31:0] dmem [DW];
  int checks = 0, failures = 0;
  rv_ref ref_m;

  picorv_cpu #(.RESET_PC(32'h20)) dut (.clk, .rst, .pc, .instr, .mem_write, .address, .write_data, .read_data);

  always #5 clk = ~clk;

  assign instr     = imem[pc[9:2]];
  assign read_data = dmem[address[9:2]];
  always @(posedge clk) if (mem_write) dmem[address[9:2]] <= write_data;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run n cycles in lock step with the reference model
  task automatic lockstep(input int n);
    repeat (n) begin
      @(negedge clk);
      checks++;
      if (pc !== ref_m.pc) begin
        failures++; $display("FAIL pc=%h ref=%h", pc, ref_m.pc);
        ref_m.pc = pc;   // resynchronise to limit follow-on messages
      end
      ref_m.step(imem[ref_m.pc[9:2]]);
      checks++;
      if (mem_write !== ref_m.did_store ||
          (ref_m.did_store && (address !== ref_m.st_addr || write_data !== ref_m.st_data))) begin
        failures++;
        $display("FAIL store at pc=%h: we=%b a=%h d=%h ref we=%b a=%h d=%h", pc, mem_write, address,
                 write_data, ref_m.did_store, ref_m.st_addr, ref_m.st_data);
      end
    end
  endtask

  task automatic reset_cpu(input logic [31:0] start);
    rst = 1;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    ref_m = new(start);
    // registers have no reset: start the model from the CPU's values
    for (int r = 1; r < 32; r++) ref_m.x[r] = dut.u_dp.u_gpr.regs[r];
    foreach (dmem[i]) ref_m.dmem[30'(i)] = dmem[i];
  endtask

  // random instruction that stays inside the program area [0, IW*4)
  function automatic logic [31:0] rand_instr(input int at);
    int rd = $urandom_range(7), r1 = $urandom_range(7), r2 = $urandom_range(7);
    case ($urandom_range(10))
      0: return asm_add(rd, r1, r2);
      1: return asm_sub(rd, r1, r2);
      2: return asm_slt(rd, r1, r2);
      3: return asm_or(rd, r1, r2);
      4: return asm_and(rd, r1, r2);
      5: return asm_addi(rd, r1, int'($urandom_range(4095)) - 2048);
      6: return asm_lw(rd, 4 * $urandom_range(DW - 1), 0);
      7: return asm_sw(r2, 4 * $urandom_range(DW - 1), 0);
      8: return asm_beq(r1, r2, 4 * (int'($urandom_range(IW - 1)) - at));
      9: return asm_jal(rd, 4 * (int'($urandom_range(IW - 1)) - at));
      default: return asm_jalr(rd, 0, 4 * $urandom_range(IW - 1));
    endcase
  endfunction

  initial begin
    int cyc;
    rst = 1;
    foreach (imem[i]) imem[i] = asm_beq(0, 0, 0);
    foreach (dmem[i]) dmem[i] = 0;
    // ---- program 1: gcd subroutine at 0x00, main at 0x20 ----
    imem[0]  = asm_beq(10, 11, 28);     // gcd:  beq a0,a1,done
    imem[1]  = asm_slt(5, 10, 11);      //       slt t0,a0,a1
    imem[2]  = asm_beq(5, 0, 12);       //       beq t0,x0,L
    imem[3]  = asm_sub(11, 11, 10);     //       sub a1,a1,a0
    imem[4]  = asm_beq(0, 0, -16);      //       beq x0,x0,gcd
    imem[5]  = asm_sub(10, 10, 11);     // L:    sub a0,a0,a1
    imem[6]  = asm_beq(0, 0, -24);      //       beq x0,x0,gcd
    imem[7]  = asm_jalr(0, 1, 0);       // done: jalr x0,x1,0
    imem[8]  = asm_addi(10, 0, 25);     // main: addi a0,x0,25
    imem[9]  = asm_addi(11, 0, 15);     //       addi a1,x0,15
    imem[10] = asm_jal(1, -40);         //       jal x1,gcd
    imem[11] = asm_sw(10, 12, 0);       //       sw a0,12(x0)
    imem[12] = asm_lw(1, 12, 0);        //       lw x1,12(x0)
    imem[13] = asm_addi(1, 1, 1);       //       addi x1,x1,1
    imem[14] = asm_sw(1, 12, 0);        //       sw x1,12(x0)
    imem[15] = asm_beq(0, 0, 0);        // halt: beq x0,x0,halt
    reset_cpu(32'h20);
    cyc = 0;
    while (ref_m.pc != 32'h3C && cyc < 1000) begin lockstep(1); cyc++; end
    lockstep(1);
    checks += 3;
    if (dmem[3] !== 32'd6) begin failures++; $display("FAIL Mem[12]=%0d, expected 6", dmem[3]); end
    if (ref_m.x[10] !== 32'd5) begin failures++; $display("FAIL reference gcd=%0d", ref_m.x[10]); end
    // instructions to reach halt, counted by hand: main 3, three passes of
    // the loop (25,15 -> 10,15 -> 10,5 -> 5,5) 5 each, beq to done and
    // jalr 2, the memory increment 4: 24; at CPI = 1 that is 24 cycles
    if (cyc != 24) begin failures++; $display("FAIL gcd program took %0d cycles, expected 24", cyc); end
    // ---- program 2: random programs ----
    repeat (20) begin
      foreach (imem[i]) imem[i] = rand_instr(i);
      foreach (dmem[i]) dmem[i] = $urandom;
      reset_cpu(32'h20);
      lockstep(400);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
