// tb_instr_buffer: fills the buffer until `full`, checks first-in first-out
// order, a push and pop in the same cycle while full, and `empty` after
// draining, against a queue model.
module tb_instr_buffer;
  import fixp_pkg::*;

  logic    clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  vinstr_t din = '0, head;
  vinstr_t model [$];
  int      checks = 0, failures = 0;

  instr_buffer dut (.*);

  always #5 clk = ~clk;

  function automatic vinstr_t rnd_instr();
    vinstr_t v;
    v = '0;
    v.op = vop_e'(3'($urandom_range(4, 0)));
    v.vd = 5'($urandom); v.vs1 = 5'($urandom); v.vs2 = 5'($urandom);
    v.stride = 12'($urandom); v.base = $urandom;
    return v;
  endfunction

  task automatic step(logic do_push, logic do_pop);
    @(negedge clk);
    push = do_push; pop = do_pop; din = rnd_instr();
    #1;
    if (do_pop) begin
      checks++;
      if (empty || head !== model[0]) begin failures++; $display("FAIL head at %0t", $time); end
    end
    @(posedge clk); #1;
    if (do_pop && model.size() > 0) void'(model.pop_front());
    if (do_push) model.push_back(din);
    push = 0; pop = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1; #1;
    checks++; if (!empty || full) failures++;
    for (int i = 0; i < 4; i++) step(1, 0);
    checks++; if (!full) begin failures++; $display("FAIL not full after 4"); end
    step(1, 1);                       // push and pop while full
    checks++; if (!full) failures++;
    for (int i = 0; i < 4; i++) step(0, 1);
    checks++; if (!empty) begin failures++; $display("FAIL not empty"); end
    for (int i = 0; i < 200; i++) begin
      logic pu, po;
      pu = ($urandom_range(1, 0) == 1) && (model.size() < 4);
      po = ($urandom_range(1, 0) == 1) && (model.size() > 0);
      step(pu, po);
      checks++;
      if (full != (model.size() == 4) || empty != (model.size() == 0)) begin
        failures++; $display("FAIL flags size %0d full %b empty %b", model.size(), full, empty);
      end
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
