// tb_systolic_cell: drives one cell with sequences of four (A, B) pairs framed
// by start and stop, back to back, and checks the result register (sum of the
// truncated products, held until the next stop), the one-cycle delay of the
// forwarded A, B, start and stop, and that the result holds in between.
module tb_systolic_cell;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  fx_t  a_in, b_in, a_out, b_out, result_out;
  logic start_in, stop_in, start_out, stop_out;
  int   checks = 0, failures = 0;

  systolic_cell dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int av[4], bv[4], expsum, prev;
    a_in = '0; b_in = '0; start_in = 0; stop_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = 0;
    for (int t = 0; t < 20; t++) begin
      expsum = 0;
      for (int k = 0; k < 4; k++) begin
        av[k] = rnd_val(3000); bv[k] = rnd_val(3000);
        expsum += ref_mul(av[k], bv[k]);
      end
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        a_in = int2fx(av[k]); b_in = int2fx(bv[k]);
        start_in = (k == 0); stop_in = (k == 3);
        @(posedge clk); #1;
        chk(a_out == int2fx(av[k]) && b_out == int2fx(bv[k]), "a/b forwarding");
        chk(start_out == (k == 0) && stop_out == (k == 3), "start/stop forwarding");
        // earlier result must still be held while this one accumulates
        if (k < 3 && t > 0) chk(fx2int(result_out) == prev, "result held");
      end
      @(negedge clk); a_in = '0; b_in = '0; start_in = 0; stop_in = 0;
      @(posedge clk); #1;
      chk(fx2int(result_out) == expsum, $sformatf("result %0d expected %0d", fx2int(result_out), expsum));
      prev = expsum;
      // an idle gap after some products, none after others
      if (t % 3 == 0) begin
        @(negedge clk); a_in = int2fx(777); b_in = int2fx(1024); start_in = 0; stop_in = 0;
        @(posedge clk); #1;
        chk(fx2int(result_out) == expsum, "result held over idle cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
