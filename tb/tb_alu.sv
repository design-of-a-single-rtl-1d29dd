// tb_alu - self-checking testbench of the ALU.
//
// Drives corner values and random operands through all five operations and
// compares ALUOut and Zero with SystemVerilog's own operators (signed
// comparison for slt).
module tb_alu;
  import picorv_pkg::*;

  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        z;
  int checks = 0, failures = 0;

  alu dut (.src_a(a), .src_b(b), .alu_control(op), .alu_out(y), .zero(z));

  function automatic logic [31:0] model(input logic [31:0] x, input logic [31:0] w, input alu_op_e o);
    case (o)
      ALU_ADD: return x + w;
      ALU_SUB: return x - w;
      ALU_AND: return x & w;
      ALU_OR:  return x | w;
      ALU_SLT: return ($signed(x) < $signed(w)) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] w, input alu_op_e o);
    logic [31:0] e;
    a = x; b = w; op = o; #1;
    e = model(x, w, o);
    checks++;
    if (y !== e || z !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h z=%b expected %h", o.name(), x, w, y, z, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h8000_0001};
  localparam alu_op_e OPS [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};

  initial begin
    foreach (OPS[k])
      foreach (CORNER[i])
        foreach (CORNER[j]) check(CORNER[i], CORNER[j], OPS[k]);
    repeat (2000) check($urandom, $urandom, OPS[$urandom_range(4)]);
    // equal operands give Zero on sub (the beq test)
    repeat (50) begin
      logic [31:0] r;
      r = $urandom;
      check(r, r, ALU_SUB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
