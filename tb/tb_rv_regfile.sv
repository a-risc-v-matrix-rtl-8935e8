// tb_rv_regfile: random writes against a model; checks both read ports, that
// x0 stays zero, and the write-through of a same-cycle read.
module tb_rv_regfile;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [4:0]  ra1 = 0, ra2 = 0, wa = 0;
  logic [31:0] rd1, rd2, wd = 0;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  rv_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = ($urandom_range(1, 0) == 1);
      wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (t % 7 == 0) ? wa : 5'($urandom);
      #1;
      checks++;
      if (rd1 !== ((ra1 == 0) ? 0 : (we && wa == ra1) ? wd : model[ra1])) begin
        failures++; $display("FAIL port1 x%0d", ra1);
      end
      checks++;
      if (rd2 !== ((ra2 == 0) ? 0 : (we && wa == ra2) ? wd : model[ra2])) begin
        failures++; $display("FAIL port2 x%0d", ra2);
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
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
