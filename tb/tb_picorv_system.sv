// tb_picorv_system - end-to-end testbench of the picoRISC-V computer.
//
// Runs the system at its default sizes with the SP0256 behavioural model
// on its I/O pins. The program, loaded through the load port during reset:
//   - stores five 6-bit allophone codes at 0x100..0x110 (sw),
//   - calls gcd(25, 15) with jal, returns with jalr, stores the result,
//   - computes and/or of two constants and stores them,
//   - runs the polling SP0256 driver: ALD# = 1, busy-wait on SBY, write the
//     code to A6:1, ALD# = 0, for all five codes, then halts.
// Checks: the synthesizer received the five codes in order; gcd, and, or
// results in data memory; stores to I/O addresses did not reach the data
// memory; the program halted; every instruction took one cycle (the PC
// advances on every clock: count of cycles = count of retired
// instructions). Counts how often each mechanism occurred (every
// instruction, beq taken and not taken, busy and ready polls, writes to
// A6:1 and ALD#, accepted ALD# falls) and fails any that never did.
module tb_picorv_system;
  import rv_asm_pkg::*;

  localparam int NPROG = 43;
  localparam logic [5:0] CODES [5] = '{6'h1B, 6'h07, 6'h2D, 6'h33, 6'h15};

  logic        clk = 0, rst;
  logic        prog_we;
  logic [9:0]  prog_addr;
  logic [31:0] prog_wdata;
  logic [5:0]  sp_a;
  logic        sp_ald_n, sp_sby;
  logic [31:0] prog [NPROG];
  int checks = 0, failures = 0;

  picorv_system dut (.clk, .rst, .prog_we, .prog_addr, .prog_wdata, .sp_a, .sp_ald_n, .sp_sby);
  sp0256_model #(.SPEAK_NS(200)) u_sp (.a(sp_a), .ald_n(sp_ald_n), .sby(sp_sby));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters, sampled on every executed instruction ----
  typedef enum int {M_LW, M_SW, M_ADD, M_SUB, M_SLT, M_OR, M_AND, M_ADDI, M_BEQ_T, M_BEQ_N,
                    M_JAL, M_JALR, M_POLL_BUSY, M_POLL_READY, M_IO_A, M_IO_ALD, M_DMEM_W, M_NUM} mech_e;
  int cnt [M_NUM];
  bit run = 0;
  logic [31:0] last_pc;

  always @(negedge clk) if (run) begin
    logic [31:0] w;
    w = dut.instr;
    case (w[6:0])
      7'b0000011: begin
        cnt[M_LW]++;
        if (dut.address == 32'hFFFF_FF08) begin
          if (dut.read_data[0]) cnt[M_POLL_READY]++; else cnt[M_POLL_BUSY]++;
        end
      end
      7'b0100011: begin
        cnt[M_SW]++;
        if (dut.address == 32'hFFFF_FF00) cnt[M_IO_A]++;
        else if (dut.address == 32'hFFFF_FF04) cnt[M_IO_ALD]++;
        else cnt[M_DMEM_W]++;
      end
      7'b0110011:
        case ({w[30], w[14:12]})
          4'b0000: cnt[M_ADD]++;
          4'b1000: cnt[M_SUB]++;
          4'b0010: cnt[M_SLT]++;
          4'b0110: cnt[M_OR]++;
          4'b0111: cnt[M_AND]++;
          default: ;
        endcase
      7'b0010011: cnt[M_ADDI]++;
      7'b1100011: if (dut.u_cpu.u_dp.rd1 == dut.u_cpu.u_dp.rd2) cnt[M_BEQ_T]++; else cnt[M_BEQ_N]++;
      7'b1101111: cnt[M_JAL]++;
      7'b1100111: cnt[M_JALR]++;
      default: ;
    endcase
  end

  initial begin
    int i, cycles;
    logic [31:0] io_shadow [2];
    // ---- program ----
    for (i = 0; i < 5; i++) begin
      prog[2*i]     = asm_addi(8, 0, int'(CODES[i]));
      prog[2*i + 1] = asm_sw(8, 'h100 + 4 * i, 0);
    end
    prog[10] = asm_addi(10, 0, 25);        // a0 = 25
    prog[11] = asm_addi(11, 0, 15);        // a1 = 15
    prog[12] = asm_jal(1, 4 * (35 - 12));  // call gcd
    prog[13] = asm_sw(10, 'h80, 0);        // Mem[0x80] = gcd
    prog[14] = asm_addi(12, 0, 'h3C);
    prog[15] = asm_addi(13, 0, 'h0F);
    prog[16] = asm_and(14, 12, 13);
    prog[17] = asm_or(15, 12, 13);
    prog[18] = asm_sw(14, 'h84, 0);
    prog[19] = asm_sw(15, 'h88, 0);
    // SP0256 driver
    prog[20] = asm_addi(1, 0, 1);          // init: x1 = 1
    prog[21] = asm_addi(2, 0, 20);         // x2 = 20
    prog[22] = asm_addi(3, 0, 'h100);      // x3 = 0x100
    prog[23] = asm_addi(4, 0, 0);          // x4 = 0
    prog[24] = asm_sw(1, 'hF04, 0);        // start: ALD# = 1
    prog[25] = asm_lw(5, 'hF08, 0);        // loop: x5 = SBY
    prog[26] = asm_beq(5, 0, -4);          // while SBY == 0
    prog[27] = asm_add(6, 3, 4);
    prog[28] = asm_lw(7, 0, 6);
    prog[29] = asm_sw(7, 'hF00, 0);        // A6:1 = code
    prog[30] = asm_sw(0, 'hF04, 0);        // ALD# = 0
    prog[31] = asm_addi(4, 4, 4);
    prog[32] = asm_beq(4, 2, 8);           // -> done
    prog[33] = asm_beq(0, 0, -36);         // -> start
    prog[34] = asm_beq(0, 0, 0);           // done: halt
    // gcd subroutine
    prog[35] = asm_beq(10, 11, 28);
    prog[36] = asm_slt(5, 10, 11);
    prog[37] = asm_beq(5, 0, 12);
    prog[38] = asm_sub(11, 11, 10);
    prog[39] = asm_beq(0, 0, -16);
    prog[40] = asm_sub(10, 10, 11);
    prog[41] = asm_beq(0, 0, -24);
    prog[42] = asm_jalr(0, 1, 0);

    // ---- load during reset ----
    rst = 1; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    for (i = 0; i < NPROG; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0;
    // data memory words that the I/O addresses alias onto (address bits 11:2)
    io_shadow[0] = dut.u_dmem.mem[10'h3C0];
    io_shadow[1] = dut.u_dmem.mem[10'h3C1];
    @(negedge clk); rst = 0; run = 1;

    // ---- run to halt ----
    cycles = 0;
    last_pc = dut.pc;
    while (dut.pc != 32'd136 && cycles < 10000) begin
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (dut.pc == last_pc) begin failures++; $display("FAIL PC did not advance at %h", dut.pc); end
      last_pc = dut.pc;
    end
    @(negedge clk); run = 0;
    checks++;
    if (dut.pc != 32'd136) begin failures++; $display("FAIL did not reach halt, pc=%h", dut.pc); end
    $display("halted after %0d cycles", cycles);

    // ---- results ----
    checks++;
    if (u_sp.n_spoken != 5) begin failures++; $display("FAIL %0d codes spoken, expected 5", u_sp.n_spoken); end
    for (i = 0; i < 5; i++) begin
      checks++;
      if (u_sp.spoken[i] !== CODES[i]) begin
        failures++; $display("FAIL code %0d = %h, expected %h", i, u_sp.spoken[i], CODES[i]);
      end
    end
    checks++;
    if (u_sp.n_ignored != 0) begin failures++; $display("FAIL %0d ALD# falls while busy", u_sp.n_ignored); end
    checks += 3;
    if (dut.u_dmem.mem[32] !== 32'd5)    begin failures++; $display("FAIL gcd = %0d", dut.u_dmem.mem[32]); end
    if (dut.u_dmem.mem[33] !== 32'h0C)   begin failures++; $display("FAIL and = %h", dut.u_dmem.mem[33]); end
    if (dut.u_dmem.mem[34] !== 32'h3F)   begin failures++; $display("FAIL or = %h", dut.u_dmem.mem[34]); end
    checks += 2;
    if (dut.u_dmem.mem[10'h3C0] !== io_shadow[0] || dut.u_dmem.mem[10'h3C1] !== io_shadow[1]) begin
      failures++; $display("FAIL an I/O store reached the data memory");
    end
    if (sp_ald_n !== 1'b0 || sp_a !== CODES[4]) begin
      failures++; $display("FAIL final pins a=%h ald_n=%b", sp_a, sp_ald_n);
    end
    // ---- mechanism coverage ----
    for (i = 0; i < M_NUM; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("  %-14s %0d", m.name(), cnt[i]);
      checks++;
      if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", m.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
