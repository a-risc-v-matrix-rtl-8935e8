// tb_rv_core: runs a small program on the pipeline with its instruction and
// data memories: a counting loop with stores (forwarding, taken and
// not-taken branches), a load followed by its use (load-use stall), LUI,
// AUIPC, shifts and compares, JAL and JALR over instructions that must not
// execute, and vector instructions whose base register is produced by the
// instruction just before. The testbench plays the issue unit: it records the
// dispatched vector instructions and holds `vec_full` for a while to force the
// dispatch stall. Results are checked in data memory and in the dispatched
// stream.
module tb_rv_core;
  import fixp_pkg::*;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] imem_pc, imem_instr, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we, vec_valid, vec_full = 0;
  vinstr_t     vec_instr;
  logic        ev_load_use, ev_flush, ev_vec_stall, ev_forward;
  logic        ld_we = 0;
  logic [9:0]  ld_addr = 0;
  logic [31:0] ld_data = 0, dbg_addr = 0, dbg_data;
  int checks = 0, failures = 0;
  int n_lu = 0, n_flush = 0, n_vstall = 0, n_fwd = 0;
  vinstr_t got [$];

  rv_core   dut  (.*);
  rv_icache imem (.clk, .pc(imem_pc), .instr(imem_instr), .ld_we, .ld_addr, .ld_data);
  rv_dmem   dmem (.clk, .addr(dmem_addr), .rdata(dmem_rdata), .we(dmem_we), .wdata(dmem_wdata),
                  .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_lu     += int'(ev_load_use);
    n_flush  += int'(ev_flush);
    n_vstall += int'(ev_vec_stall);
    n_fwd    += int'(ev_forward);
    if (vec_valid) got.push_back(vec_instr);
  end

  // hold the issue unit "full" for 6 cycles when the first vector instruction arrives
  int full_cnt = 0;
  always @(negedge clk) begin
    if (dut.ex.valid && dut.ex.is_vec && got.size() == 0 && full_cnt < 6) begin
      vec_full = 1; full_cnt++;
    end else vec_full = 0;
  end

  logic [31:0] prog [$];

  task automatic chk(logic [31:0] addr, logic [31:0] exp, string what);
    dbg_addr = addr; #1;
    checks++;
    if (dbg_data !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, dbg_data, exp); end
  endtask

  initial begin
    prog = '{
      ADDI(1, 0, 10),          // 0
      ADDI(2, 0, 0),           // 4
      ADDI(3, 0, 'h100),       // 8
      ADD (2, 2, 1),           // 12 loop
      SW  (2, 3, 0),           // 16
      ADDI(3, 3, 4),           // 20
      ADDI(1, 1, -1),          // 24
      BNE (1, 0, -16),         // 28
      LW  (4, 0, 'h100),       // 32
      ADD (5, 4, 4),           // 36 load-use
      LUI (6, 'h12345),        // 40
      ADDI(6, 6, 'h678),       // 44
      SRAI(7, 6, 4),           // 48
      SLTU(8, 0, 6),           // 52
      JAL (9, 12),             // 56 -> 68
      ADDI(10, 0, 99),         // 60 skipped
      ADDI(10, 0, 98),         // 64 skipped
      AUIPC(11, 0),            // 68
      JALR(12, 11, 16),        // 72 -> 84
      ADDI(10, 0, 97),         // 76 skipped
      ADDI(10, 0, 96),         // 80 skipped
      LUI (13, 'ha),           // 84 x13 = 0xa000
      VLOAD(1, 13, 2),         // 88 base forwarded from the previous instruction
      ADDI(13, 13, 8),         // 92
      VSTOR(1, 13, 1),         // 96
      VMULT(3, 1, 2),          // 100
      VADD (4, 3, 1),          // 104
      VRELU(5, 4),             // 108
      SW  (5, 0, 'h200),       // 112
      SW  (7, 0, 'h204),       // 116
      SW  (8, 0, 'h208),       // 120
      SW  (9, 0, 'h20c),       // 124
      SW  (12, 0, 'h210),      // 128
      SW  (10, 0, 'h214),      // 132
      SW  (11, 0, 'h218),      // 136
      JAL (0, 0)               // 140 halt loop
    };
    foreach (prog[i]) begin
      @(negedge clk); ld_we = 1; ld_addr = 10'(i); ld_data = prog[i];
    end
    @(negedge clk); ld_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (imem_pc != 32'd140) @(negedge clk);
    repeat (10) @(negedge clk);

    begin
      int s = 0;
      for (int i = 0; i < 10; i++) begin
        s += 10 - i;
        chk(32'h100 + 4 * i, s, $sformatf("partial sum %0d", i));
      end
    end
    chk('h200, 20, "load-use add");
    chk('h204, 32'h0123_4567, "srai");
    chk('h208, 1, "sltu");
    chk('h20c, 60, "jal link");
    chk('h210, 76, "jalr link");
    chk('h214, 0, "skipped instructions");
    chk('h218, 68, "auipc");

    checks++;
    if (got.size() != 5) begin failures++; $display("FAIL %0d vector instructions dispatched", got.size()); end
    else begin
      checks++; if (got[0].op != VOP_LOAD || got[0].vd != 1 || got[0].base != 32'ha000 || got[0].stride != 2) begin
        failures++; $display("FAIL vload %p", got[0]); end
      checks++; if (got[1].op != VOP_STOR || got[1].vd != 1 || got[1].base != 32'ha008 || got[1].stride != 1) begin
        failures++; $display("FAIL vstor %p", got[1]); end
      checks++; if (got[2].op != VOP_MUL || got[2].vd != 3 || got[2].vs1 != 1 || got[2].vs2 != 2) failures++;
      checks++; if (got[3].op != VOP_ADD || got[3].vd != 4 || got[3].vs1 != 3 || got[3].vs2 != 1) failures++;
      checks++; if (got[4].op != VOP_RELU || got[4].vd != 5 || got[4].vs1 != 4) failures++;
    end
    checks++; if (n_lu == 0)     begin failures++; $display("FAIL no load-use stall"); end
    checks++; if (n_flush < 11)  begin failures++; $display("FAIL flushes %0d", n_flush); end
    checks++; if (n_vstall != 6) begin failures++; $display("FAIL vector stalls %0d", n_vstall); end
    checks++; if (n_fwd == 0)    begin failures++; $display("FAIL no forwarding"); end
    $display("load_use=%0d flush=%0d vec_stall=%0d forward=%0d", n_lu, n_flush, n_vstall, n_fwd);
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
