// tb_rv_icache: loads random words through the load port and fetches them
// back by byte PC.
module tb_rv_icache;
  logic        clk = 0, ld_we = 0;
  logic [31:0] pc = 0, instr, ld_data = 0;
  logic [9:0]  ld_addr = 0;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  rv_icache dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      model[i] = $urandom;
      ld_we = 1; ld_addr = 10'(i); ld_data = model[i];
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 1024; i++) begin
      pc = 32'(4 * ((i * 37) % 1024)); #1;
      checks++;
      if (instr !== model[(i * 37) % 1024]) begin failures++; $display("FAIL pc %h", pc); end
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
