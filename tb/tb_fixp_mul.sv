// tb_fixp_mul: checks the sign-magnitude multiplier against an integer
// reference (product of magnitudes truncated to 1/1024, sign = XOR, -0 -> +0),
// for directed and random operands, including the overflow flag.
module tb_fixp_mul;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  fx_t a, b, p;
  logic ovf;
  int checks = 0, failures = 0;

  fixp_mul dut (.a, .b, .p, .ovf);

  task automatic check(logic [15:0] ea, logic [15:0] eb);
    longint prod;
    logic [15:0] exp;
    logic eovf;
    a = ea; b = eb;
    #1;
    prod = longint'(ea[14:0]) * longint'(eb[14:0]);
    exp  = {1'b0, 15'(prod >> 10)};
    if (exp[14:0] != 0) exp[15] = ea[15] ^ eb[15];
    eovf = (prod >> 25) != 0;
    checks++;
    if (p !== exp || ovf !== eovf) begin
      failures++;
      $display("FAIL %h * %h = %h ovf %b, expected %h ovf %b", ea, eb, p, ovf, exp, eovf);
    end
  endtask

  initial begin
    check(16'h0600, 16'h8800);   // 1.5 * -2.0 = -3.0
    checks++; if (p !== 16'h8c00) failures++;
    check(16'h8400, 16'h8400);   // -1 * -1 = 1
    checks++; if (p !== 16'h0400) failures++;
    check(16'h5000, 16'h5000);   // 20 * 20 overflows
    checks++; if (!ovf) failures++;
    check(16'h8001, 16'h0001);   // tiny negative product -> +0
    checks++; if (p !== 16'h0000) failures++;
    for (int i = 0; i < 2000; i++) check(16'($urandom), 16'($urandom));
    for (int i = 0; i < 500; i++) begin
      int x = rnd_val(4096), y = rnd_val(4096);
      check(int2fx(x), int2fx(y));
      checks++; if (fx2int(p) != ref_mul(x, y)) failures++;
    end
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
