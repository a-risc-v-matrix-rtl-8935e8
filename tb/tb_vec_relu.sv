// tb_vec_relu: random vectors; each negative lane must become +0 and each
// positive lane pass unchanged.
module tb_vec_relu;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  fxvec_t a, y;
  int checks = 0, failures = 0;

  vec_relu dut (.a, .y);

  initial begin
    int x[4];
    for (int t = 0; t < 1000; t++) begin
      for (int l = 0; l < 4; l++) begin
        x[l] = rnd_val(32000);
        a[l] = int2fx(x[l]);
      end
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (y[l] !== int2fx(x[l] < 0 ? 0 : x[l])) begin
          failures++; $display("FAIL lane %0d: relu(%0d) -> %h", l, x[l], y[l]);
        end
      end
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
