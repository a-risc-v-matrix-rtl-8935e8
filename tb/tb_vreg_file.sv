// tb_vreg_file: writes every register with a random value, reads all of them
// back on both ports, checks reset clears them, and that a read in the cycle
// of a write to the same register still sees the old value.
module tb_vreg_file;
  import fixp_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  logic [6:0] ra1 = 0, ra2 = 0, wa = 0;
  fxvec_t rd1, rd2, wd = '0;
  logic [63:0] model [128];
  int checks = 0, failures = 0;

  vreg_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      ra1 = 7'(i); #1;
      checks++; if (rd1 !== '0) failures++;
    end
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      model[i] = {$urandom, $urandom};
      we = 1; wa = 7'(i); wd = model[i];
      ra1 = 7'(i); #1;
      checks++; if (rd1 !== '0) begin failures++; $display("FAIL read-during-write %0d", i); end
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 128; i++) begin
      ra1 = 7'(i); ra2 = 7'(127 - i); #1;
      checks++; if (rd1 !== model[i])       begin failures++; $display("FAIL port1 reg %0d", i); end
      checks++; if (rd2 !== model[127 - i]) begin failures++; $display("FAIL port2 reg %0d", 127 - i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
