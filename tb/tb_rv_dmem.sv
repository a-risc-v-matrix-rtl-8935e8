// tb_rv_dmem: random word stores and loads against a model, through both the
// pipeline port and the debug port.
module tb_rv_dmem;
  logic        clk = 0, we = 0;
  logic [31:0] addr = 0, rdata, wdata = 0, dbg_addr = 0, dbg_data;
  logic [31:0] model [1024];
  bit          known [1024];
  int checks = 0, failures = 0;

  rv_dmem dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int w;
      @(negedge clk);
      w = int'($urandom_range(1023, 0));
      addr = 32'(4 * w);
      we = ($urandom_range(2, 0) == 0);
      wdata = $urandom;
      dbg_addr = 32'(4 * ((w + 5) % 1024));
      #1;
      if (!we && known[w]) begin
        checks++; if (rdata !== model[w]) begin failures++; $display("FAIL load %h", addr); end
      end
      if (known[(w + 5) % 1024]) begin
        checks++; if (dbg_data !== model[(w + 5) % 1024]) failures++;
      end
      @(posedge clk);
      if (we) begin model[w] = wdata; known[w] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
