// tb_fixp_add: checks the sign-magnitude adder against signed-integer
// addition for random operands of both signs, plus the wrap-around and flag
// on magnitude overflow and the +0 result of x + (-x).
module tb_fixp_add;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  fx_t a, b, s;
  logic ovf;
  int checks = 0, failures = 0;

  fixp_add dut (.a, .b, .s, .ovf);

  task automatic check_int(int x, int y);
    a = int2fx(x); b = int2fx(y);
    #1;
    checks++;
    if (s !== int2fx(x + y) || ovf !== 1'b0) begin
      failures++;
      $display("FAIL %0d + %0d -> %h, expected %h", x, y, s, int2fx(x + y));
    end
  endtask

  initial begin
    check_int(1024, -3072);     // 1 + -3 = -2
    check_int(-2048, 2048);     // +0
    check_int(5000, 5000);
    check_int(-7, -9);
    for (int i = 0; i < 3000; i++) check_int(rnd_val(16384), rnd_val(16384));
    // overflow: 20 + 20 wraps to 8 with the flag set
    a = 16'h5000; b = 16'h5000; #1;
    checks++; if (s !== 16'h2000 || !ovf) begin failures++; $display("FAIL overflow %h %b", s, ovf); end
    // -0 input behaves as zero
    a = 16'h8000; b = 16'h0400; #1;
    checks++; if (s !== 16'h0400) failures++;
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
