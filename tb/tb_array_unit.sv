// tb_array_unit: runs a short vector program through the issue unit: strided
// loads of a 4x8 and an 8x4 matrix from the table regions, two overlapping
// multiplies, an add that must wait for them, ReLU, stores to user memory, a
// dependent multiply chain, and a store into a table that must be dropped.
// Results are read back through the debug port and compared with an integer
// reference. Also checks the latency of a lone multiply (1 cycle in the buffer,
// 4 issue cycles, 8 cycles through the array), the strided tile selection of
// an 8x8 row-major array, and that the scoreboard and
// overlap mechanisms were exercised.
module tb_array_unit;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, full, busy;
  vinstr_t     in_instr = '0;
  logic        pl_we = 0;
  logic [15:0] pl_addr = 0, dbg_addr = 0;
  fxvec_t      pl_data = '0, dbg_data;
  logic        ev_mul_overlap, ev_hazard_wait, ev_store_err;
  int          checks = 0, failures = 0;
  int          n_overlap = 0, n_hazard = 0, n_sterr = 0;

  array_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_overlap += int'(ev_mul_overlap);
    n_hazard  += int'(ev_hazard_wait);
    n_sterr   += int'(ev_store_err);
  end

  int X [4][8], W [8][4];
  int tile_word [3] = '{0, 8, 9};
  typedef int mat_t [4][4];

  function automatic mat_t mmul(mat_t a, mat_t b);
    mat_t c;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      c[i][j] = 0;
      for (int k = 0; k < 4; k++) c[i][j] += ref_mul(a[i][k], b[k][j]);
    end
    return c;
  endfunction

  task automatic issue(vop_e op, int vd, int vs1, int vs2, int base = 0, int stride = 0);
    @(negedge clk);
    while (full) @(negedge clk);
    in_valid = 1;
    in_instr = '{op: op, vd: 5'(vd), vs1: 5'(vs1), vs2: 5'(vs2), stride: 12'(stride), base: 32'(base)};
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic check_mat(int addr, mat_t m, string what);
    for (int r = 0; r < 4; r++) begin
      dbg_addr = 16'(addr + 8 * r); #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (fx2int(dbg_data[j]) != m[r][j]) begin
          failures++;
          $display("FAIL %s[%0d][%0d] = %0d expected %0d", what, r, j, fx2int(dbg_data[j]), m[r][j]);
        end
      end
    end
  endtask

  initial begin
    mat_t x0, x1, w0, w1, g5, g6, g7, g8, g9, g10;
    int   lat;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 8; j++) X[i][j] = rnd_val(1536);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 4; j++) W[i][j] = rnd_val(512);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      x0[i][j] = X[i][j]; x1[i][j] = X[i][j+4]; w0[i][j] = W[i][j]; w1[i][j] = W[i+4][j];
    end
    g5 = mmul(x0, w0); g6 = mmul(x1, w1);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      g7[i][j] = g5[i][j] + g6[i][j];
      g8[i][j] = g7[i][j] < 0 ? 0 : g7[i][j];
    end
    g9 = mmul(g7, w0); g10 = mmul(g9, w0);

    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // X is 4 rows of 8 numbers at 0x8000 (two words per row); W is 8 rows of 4 at 0x0000
    for (int i = 0; i < 4; i++) for (int h = 0; h < 2; h++) begin
      pl_we = 1; pl_addr = 16'(32'h8000 + 16 * i + 8 * h);
      for (int j = 0; j < 4; j++) pl_data[j] = int2fx(X[i][4*h + j]);
      @(negedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      pl_we = 1; pl_addr = 16'(8 * i);
      for (int j = 0; j < 4; j++) pl_data[j] = int2fx(W[i][j]);
      @(negedge clk);
    end
    pl_we = 0;

    issue(VOP_LOAD, 1, 0, 0, 'h8000, 2);
    issue(VOP_LOAD, 2, 0, 0, 'h8008, 2);
    issue(VOP_LOAD, 3, 0, 0, 'h0000, 1);
    issue(VOP_LOAD, 4, 0, 0, 'h0020, 1);
    issue(VOP_MUL,  5, 1, 3);
    issue(VOP_MUL,  6, 2, 4);
    issue(VOP_ADD,  7, 5, 6);
    issue(VOP_RELU, 8, 7, 0);
    issue(VOP_STOR, 7, 0, 0, 'ha000, 1);
    issue(VOP_STOR, 8, 0, 0, 'ha020, 1);
    issue(VOP_MUL,  9, 7, 3);
    issue(VOP_MUL, 10, 9, 3);
    issue(VOP_STOR, 10, 0, 0, 'ha040, 1);
    issue(VOP_STOR, 9, 0, 0, 'ha060, 1);
    issue(VOP_STOR, 1, 0, 0, 'h0000, 1);   // into a table: dropped
    @(negedge clk);
    while (busy) @(negedge clk);

    check_mat('ha000, g7, "g7");
    check_mat('ha020, g8, "relu");
    check_mat('ha060, g9, "g9");
    check_mat('ha040, g10, "g10");
    dbg_addr = 16'h0000; #1;
    checks++; if (fx2int(dbg_data[0]) != W[0][0]) begin failures++; $display("FAIL table overwritten"); end

    // latency of a lone multiply
    @(negedge clk); in_valid = 1; in_instr = '{op: VOP_MUL, vd: 5'd11, vs1: 5'd1, vs2: 5'd3, stride: '0, base: '0};
    @(negedge clk); in_valid = 0;
    lat = 0;
    while (busy) begin lat++; @(negedge clk); end
    checks++;
    if (lat != 13) begin failures++; $display("FAIL lone multiply busy for %0d cycles, expected 13", lat); end
    issue(VOP_STOR, 11, 0, 0, 'ha080, 1);
    @(negedge clk); while (busy) @(negedge clk);
    check_mat('ha080, g5, "g11");

    // Stride example: an 8x8 array of numbers 0..63 (raw magnitudes) at 0x8100;
    // stride 2 from word 0, 8 and 9 picks the top-left, bottom-left and
    // bottom-right 4x4 tiles.
    for (int w = 0; w < 16; w++) begin
      @(negedge clk); pl_we = 1; pl_addr = 16'('h8100 + 8 * w);
      for (int j = 0; j < 4; j++) pl_data[j] = fx_t'(16'(4 * w + j));
    end
    @(negedge clk); pl_we = 0;
    foreach (tile_word[t]) begin
      issue(VOP_LOAD, 12, 0, 0, 'h8100 + 8 * tile_word[t], 2);
      issue(VOP_STOR, 12, 0, 0, 'ha100 + 32 * t, 1);
    end
    @(negedge clk); while (busy) @(negedge clk);
    foreach (tile_word[t]) for (int r = 0; r < 4; r++) begin
      dbg_addr = 16'('ha100 + 32 * t + 8 * r); #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(dbg_data[j]) != 4 * tile_word[t] + 8 * r + j) begin
          failures++; $display("FAIL stride tile %0d row %0d lane %0d = %0d", tile_word[t], r, j, int'(dbg_data[j]));
        end
      end
    end

    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no overlapped multiply"); end
    checks++; if (n_hazard == 0)  begin failures++; $display("FAIL scoreboard never held an instruction"); end
    checks++; if (n_sterr != 4)   begin failures++; $display("FAIL store errors %0d", n_sterr); end
    $display("overlap=%0d hazard_wait=%0d store_err=%0d", n_overlap, n_hazard, n_sterr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
