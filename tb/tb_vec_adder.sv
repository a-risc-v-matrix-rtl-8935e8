// tb_vec_adder: random vector pairs, each lane checked against signed-integer
// addition; the lanes get different values so a lane mix-up is caught.
module tb_vec_adder;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  fxvec_t a, b, s;
  logic [3:0] ovf;
  int checks = 0, failures = 0;

  vec_adder dut (.a, .b, .s, .ovf);

  initial begin
    int x[4], y[4];
    for (int t = 0; t < 1000; t++) begin
      for (int l = 0; l < 4; l++) begin
        x[l] = rnd_val(16000); y[l] = rnd_val(16000);
        a[l] = int2fx(x[l]); b[l] = int2fx(y[l]);
      end
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (fx2int(s[l]) != x[l] + y[l] || ovf[l]) begin
          failures++; $display("FAIL lane %0d: %0d + %0d -> %0d", l, x[l], y[l], fx2int(s[l]));
        end
      end
    end
    a = {16'h5000, 16'h0, 16'h0, 16'h0}; b = {16'h5000, 16'h0, 16'h0, 16'h0}; #1;
    checks++; if (ovf !== 4'b0001) failures++;  // lane 0 overflows
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
