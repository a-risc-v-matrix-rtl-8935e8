// tb_rv_matmul_top: end-to-end run of the whole design at its default sizes.
//
// A RISC-V program computes one fully connected layer, Y = ReLU(X W + b), with
// X a 4x16 input in the image region, W a 16x8 weight matrix in the weights
// region and b two 4x4 bias tiles in the bias1/bias2 regions. As in the tiled
// reference algorithm, each 4x4 output tile starts from its bias tile and adds
// the products of 4x4 sub-matrices, two per loop iteration; the result before
// and after ReLU is stored to user memory. Scalar code around it exercises a
// load-use stall, and a final store into a table must be dropped.
//
// The testbench compares user memory with an integer reference and counts how
// often each mechanism happened: CPU stall on a full instruction buffer,
// load-use stall, branch flush, operand forwarding, overlapped multiplies,
// scoreboard holds and dropped stores. A mechanism that never happened counts
// as a failure.
module tb_rv_matmul_top;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  localparam int K = 16;   // inner dimension
  localparam int M = 8;    // output columns

  logic        clk = 0, rst_n = 0;
  logic        im_we = 0;
  logic [9:0]  im_addr = 0;
  logic [31:0] im_data = 0;
  logic        vpl_we = 0;
  logic [15:0] vpl_addr = 0, vdbg_addr = 0;
  fxvec_t      vpl_data = '0, vdbg_data;
  logic [31:0] sdbg_addr = 0, sdbg_data, pc;
  logic        vec_busy;
  logic        ev_load_use, ev_flush, ev_vec_stall, ev_forward;
  logic        ev_mul_overlap, ev_hazard_wait, ev_store_err;
  int checks = 0, failures = 0, cycles = 0;
  int n_lu = 0, n_flush = 0, n_vstall = 0, n_fwd = 0, n_ovl = 0, n_haz = 0, n_serr = 0;

  rv_matmul_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_lu += int'(ev_load_use);  n_flush += int'(ev_flush); n_vstall += int'(ev_vec_stall);
    n_fwd += int'(ev_forward);  n_ovl += int'(ev_mul_overlap); n_haz += int'(ev_hazard_wait);
    n_serr += int'(ev_store_err);
  end

  int X [4][K], W [K][M], Bi [4][M], Y [4][M];

  task automatic preload(int addr, int v0, int v1, int v2, int v3);
    @(negedge clk);
    vpl_we = 1; vpl_addr = 16'(addr);
    vpl_data = {int2fx(v0), int2fx(v1), int2fx(v2), int2fx(v3)};
  endtask

  task automatic chk_mem(string what, int base, bit relu);
    for (int i = 0; i < 4; i++) for (int h = 0; h < M / 4; h++) begin
      vdbg_addr = 16'(base + i * (M * 2) + h * 8); #1;
      for (int j = 0; j < 4; j++) begin
        int e = Y[i][4*h + j];
        if (relu && e < 0) e = 0;
        checks++;
        if (fx2int(vdbg_data[j]) != e) begin
          failures++;
          $display("FAIL %s[%0d][%0d] = %0d expected %0d", what, i, 4*h + j, fx2int(vdbg_data[j]), e);
        end
      end
    end
  endtask

  logic [31:0] prog [$];

  initial begin
    for (int i = 0; i < 4; i++) for (int k = 0; k < K; k++) X[i][k] = rnd_val(1536);
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) W[k][j] = rnd_val(512);
    for (int i = 0; i < 4; i++) for (int j = 0; j < M; j++) Bi[i][j] = rnd_val(1024);
    for (int i = 0; i < 4; i++) for (int j = 0; j < M; j++) begin
      Y[i][j] = Bi[i][j];
      for (int k = 0; k < K; k++) Y[i][j] += ref_mul(X[i][k], W[k][j]);
    end

    prog = '{
      LUI (20, 8),              //   0 x20 = 0x8000 image
      LUI (22, 'ha),            //   4 x22 = 0xa000 user memory
      ADDI(5, 0, 0),            //   8 y offset (bytes) of the output tile
      ADDI(15, 0, 8 * (M / 4)), //  12 y limit
      LUI (7, 6),               //  16 y loop: x7 = bias1 + 4*y offset
      ADDI(7, 7, 'h380),        //  20
      SLLI(8, 5, 2),            //  24
      ADD (7, 7, 8),            //  28
      VLOAD(3, 7, 1),           //  32 acc = bias tile
      ADDI(6, 0, 0),            //  36 x offset (bytes) into an image row
      ADDI(16, 0, 8 * (K / 4)), //  40 x limit
      ADD (9, 20, 6),           //  44 x loop: image tile x
      VLOAD(1, 9, K / 4),       //  48
      ADDI(9, 9, 8),            //  52 image tile x+1
      VLOAD(6, 9, K / 4),       //  56
      SLLI(10, 6, 3),           //  60 weight tile (x, y): x*4 rows of M*2 bytes
      ADD (10, 10, 5),          //  64
      VLOAD(2, 10, M / 4),      //  68
      ADDI(10, 10, 8 * M),      //  72 weight tile (x+1, y)
      VLOAD(7, 10, M / 4),      //  76
      VMULT(4, 1, 2),           //  80
      VMULT(8, 6, 7),           //  84
      VADD (3, 3, 4),           //  88
      VADD (3, 3, 8),           //  92
      ADDI(6, 6, 16),           //  96
      BNE (6, 16, -56),         // 100 -> 44
      VRELU(5, 3),              // 104
      ADD (11, 22, 5),          // 108
      VSTOR(3, 11, M / 4),      // 112 X W + b  -> 0xa000
      ADDI(11, 11, 'h100),      // 116
      VSTOR(5, 11, M / 4),      // 120 ReLU(...) -> 0xa100
      ADDI(5, 5, 8),            // 124
      BNE (5, 15, -112),        // 128 -> 16
      SW  (5, 0, 64),           // 132
      LW  (12, 0, 64),          // 136
      ADDI(13, 12, 1),          // 140 load-use
      SW  (13, 0, 68),          // 144
      VSTOR(5, 7, 1),           // 148 into the bias table: dropped
      JAL (0, 0)                // 152 done
    };
    foreach (prog[i]) begin
      @(negedge clk); im_we = 1; im_addr = 10'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0;
    for (int i = 0; i < 4; i++) for (int h = 0; h < K / 4; h++)
      preload('h8000 + i * K * 2 + h * 8, X[i][4*h], X[i][4*h+1], X[i][4*h+2], X[i][4*h+3]);
    for (int k = 0; k < K; k++) for (int h = 0; h < M / 4; h++)
      preload(k * M * 2 + h * 8, W[k][4*h], W[k][4*h+1], W[k][4*h+2], W[k][4*h+3]);
    for (int t = 0; t < M / 4; t++) for (int i = 0; i < 4; i++)
      preload('h6380 + 32 * t + 8 * i, Bi[i][4*t], Bi[i][4*t+1], Bi[i][4*t+2], Bi[i][4*t+3]);
    @(negedge clk); vpl_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!(pc == 32'd152 && !vec_busy)) @(negedge clk);
    repeat (5) @(negedge clk);
    $display("program finished after %0d cycles", cycles);

    chk_mem("XW+b", 'ha000, 0);
    chk_mem("relu", 'ha100, 1);
    sdbg_addr = 68; #1;
    checks++; if (sdbg_data !== 32'(8 * (M / 4) + 1)) begin failures++; $display("FAIL scalar result %0d", sdbg_data); end
    vdbg_addr = 16'h6380; #1;
    checks++; if (fx2int(vdbg_data[0]) != Bi[0][0]) begin failures++; $display("FAIL bias table overwritten"); end

    $display("events: buffer_full_stall=%0d load_use=%0d flush=%0d forward=%0d mul_overlap=%0d scoreboard_wait=%0d store_dropped=%0d",
             n_vstall, n_lu, n_flush, n_fwd, n_ovl, n_haz, n_serr);
    checks++; if (n_vstall == 0) begin failures++; $display("FAIL no buffer-full stall"); end
    checks++; if (n_lu == 0)     begin failures++; $display("FAIL no load-use stall"); end
    checks++; if (n_flush == 0)  begin failures++; $display("FAIL no branch flush"); end
    checks++; if (n_fwd == 0)    begin failures++; $display("FAIL no forwarding"); end
    checks++; if (n_ovl == 0)    begin failures++; $display("FAIL no overlapped multiply"); end
    checks++; if (n_haz == 0)    begin failures++; $display("FAIL no scoreboard wait"); end
    checks++; if (n_serr != 4)   begin failures++; $display("FAIL dropped stores %0d", n_serr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired, pc=%h", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
