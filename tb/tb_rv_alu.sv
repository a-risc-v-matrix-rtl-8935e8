// tb_rv_alu: random operands for every ALU operation, checked against
// SystemVerilog reference expressions, plus shift and compare corner cases.
module tb_rv_alu;
  import rv_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  rv_alu dut (.*);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_SLL:  return x << z[4:0];
      ALU_SLT:  return (int'(x) < int'(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_XOR:  return x ^ z;
      ALU_SRL:  return x >> z[4:0];
      ALU_SRA:  return 32'(int'(x) >>> z[4:0]);
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      default:  return z;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z; #1;
    checks++;
    if (y !== ref_alu(o, x, z)) begin
      failures++; $display("FAIL %s %h %h -> %h", o.name(), x, z, y);
    end
  endtask

  initial begin
    check(ALU_SRA, 32'h8000_0000, 31);
    check(ALU_SLT, 32'hffff_ffff, 1);
    check(ALU_SLTU, 32'hffff_ffff, 1);
    check(ALU_SUB, 0, 1);
    for (int i = 0; i < 3000; i++) check(alu_op_e'(4'($urandom_range(10, 0))), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
