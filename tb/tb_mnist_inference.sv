// tb_mnist_inference: the two-layer MNIST classifier (784 inputs, 16 hidden
// nodes with ReLU, 10 outputs) run at full size on the whole design, with the
// data memory map of the design: weights1 (784x16) at 0x0000, weights2
// (16x12, zero-padded from 16x10) at 0x6200, bias1 as a 4x4 tile at 0x6380,
// bias2 (12 padded values) at 0x63a0, four 784-pixel inputs at 0x8000.
//
// The weights, biases and inputs are random (trained values are not part of
// the hardware); inputs lie in [0,1) like normalised pixels and the weights
// are small enough that no sum leaves the +-32 range. Each bias row is
// broadcast to all four rows of a tile with a stride-0 vector load. The
// hidden layer goes to user memory at 0xa000 and is read back for layer 2;
// the 4x12 output is stored at 0xa100 and compared with an integer reference.
// The cycle count of the whole inference is reported.
module tb_mnist_inference;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  localparam int K1 = 784, N1 = 16, N2 = 12, N2REAL = 10;

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

  rv_matmul_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cycles++;

  int X [4][K1], W1 [K1][N1], B1 [N1], H [4][N1], W2 [N1][N2], B2 [N2], Y [4][N2];

  task automatic preload(int addr, int v0, int v1, int v2, int v3);
    @(negedge clk);
    vpl_we = 1; vpl_addr = 16'(addr);
    vpl_data = {int2fx(v0), int2fx(v1), int2fx(v2), int2fx(v3)};
  endtask

  logic [31:0] prog [$];

  initial begin
    for (int i = 0; i < 4; i++) for (int k = 0; k < K1; k++) X[i][k] = int'($urandom_range(1023, 0));
    for (int k = 0; k < K1; k++) for (int j = 0; j < N1; j++) W1[k][j] = rnd_val(30);
    for (int j = 0; j < N1; j++) B1[j] = rnd_val(1024);
    for (int k = 0; k < N1; k++) for (int j = 0; j < N2; j++) W2[k][j] = (j < N2REAL) ? rnd_val(64) : 0;
    for (int j = 0; j < N2; j++) B2[j] = (j < N2REAL) ? rnd_val(1024) : 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < N1; j++) begin
      H[i][j] = B1[j];
      for (int k = 0; k < K1; k++) H[i][j] += ref_mul(X[i][k], W1[k][j]);
      if (H[i][j] < 0) H[i][j] = 0;
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < N2; j++) begin
      Y[i][j] = B2[j];
      for (int k = 0; k < N1; k++) Y[i][j] += ref_mul(H[i][k], W2[k][j]);
    end

    prog = '{
      LUI (20, 8),              //   0 x20 = 0x8000 inputs
      LUI (22, 'ha),            //   4 x22 = 0xa000 user memory
      ADDI(5, 0, 0),            //   8 layer 1: y offset of the output tile (bytes)
      ADDI(15, 0, 8 * N1 / 4),  //  12
      LUI (7, 6),               //  16 L1 y loop: bias1 row y
      ADDI(7, 7, 'h380),        //  20
      ADD (7, 7, 5),            //  24
      VLOAD(3, 7, 0),           //  28 stride 0: broadcast
      ADDI(6, 0, 0),            //  32
      ADDI(16, 0, 8 * K1 / 4),  //  36
      ADD (9, 20, 6),           //  40 L1 x loop
      VLOAD(1, 9, K1 / 4),      //  44
      ADDI(9, 9, 8),            //  48
      VLOAD(6, 9, K1 / 4),      //  52
      SLLI(10, 6, 4),           //  56 x*4 rows of 32 bytes
      ADD (10, 10, 5),          //  60
      VLOAD(2, 10, N1 / 4),     //  64
      ADDI(10, 10, 128),        //  68
      VLOAD(7, 10, N1 / 4),     //  72
      VMULT(4, 1, 2),           //  76
      VMULT(8, 6, 7),           //  80
      VADD (3, 3, 4),           //  84
      VADD (3, 3, 8),           //  88
      ADDI(6, 6, 16),           //  92
      BNE (6, 16, -56),         //  96 -> 40
      VRELU(5, 3),              // 100
      ADD (11, 22, 5),          // 104
      VSTOR(5, 11, N1 / 4),     // 108 hidden layer -> 0xa000
      ADDI(5, 5, 8),            // 112
      BNE (5, 15, -100),        // 116 -> 16
      ADDI(5, 0, 0),            // 120 layer 2
      ADDI(15, 0, 8 * N2 / 4),  // 124
      LUI (7, 6),               // 128 L2 y loop: bias2 row y
      ADDI(7, 7, 'h3a0),        // 132
      ADD (7, 7, 5),            // 136
      VLOAD(3, 7, 0),           // 140
      ADDI(6, 0, 0),            // 144
      ADDI(16, 0, 8 * N1 / 4),  // 148
      ADD (9, 22, 6),           // 152 L2 x loop
      VLOAD(1, 9, N1 / 4),      // 156
      ADDI(9, 9, 8),            // 160
      VLOAD(6, 9, N1 / 4),      // 164
      SLLI(10, 6, 3),           // 168 weights2 tile: 0x6200 + x*96 + y*8
      SLLI(12, 6, 2),           // 172
      ADD (10, 10, 12),         // 176
      ADD (10, 10, 5),          // 180
      LUI (12, 6),              // 184
      ADDI(12, 12, 'h200),      // 188
      ADD (10, 10, 12),         // 192
      VLOAD(2, 10, N2 / 4),     // 196
      ADDI(10, 10, 96),         // 200
      VLOAD(7, 10, N2 / 4),     // 204
      VMULT(4, 1, 2),           // 208
      VMULT(8, 6, 7),           // 212
      VADD (3, 3, 4),           // 216
      VADD (3, 3, 8),           // 220
      ADDI(6, 6, 16),           // 224
      BNE (6, 16, -76),         // 228 -> 152
      ADDI(11, 22, 'h100),      // 232
      ADD (11, 11, 5),          // 236
      VSTOR(3, 11, N2 / 4),     // 240 outputs -> 0xa100
      ADDI(5, 5, 8),            // 244
      BNE (5, 15, -120),        // 248 -> 128
      JAL (0, 0)                // 252 done
    };
    foreach (prog[i]) begin
      @(negedge clk); im_we = 1; im_addr = 10'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0;
    for (int i = 0; i < 4; i++) for (int h = 0; h < K1 / 4; h++)
      preload('h8000 + i * K1 * 2 + h * 8, X[i][4*h], X[i][4*h+1], X[i][4*h+2], X[i][4*h+3]);
    for (int k = 0; k < K1; k++) for (int h = 0; h < N1 / 4; h++)
      preload(k * N1 * 2 + h * 8, W1[k][4*h], W1[k][4*h+1], W1[k][4*h+2], W1[k][4*h+3]);
    for (int k = 0; k < N1; k++) for (int h = 0; h < N2 / 4; h++)
      preload('h6200 + k * N2 * 2 + h * 8, W2[k][4*h], W2[k][4*h+1], W2[k][4*h+2], W2[k][4*h+3]);
    for (int h = 0; h < N1 / 4; h++) preload('h6380 + 8 * h, B1[4*h], B1[4*h+1], B1[4*h+2], B1[4*h+3]);
    for (int h = 0; h < N2 / 4; h++) preload('h63a0 + 8 * h, B2[4*h], B2[4*h+1], B2[4*h+2], B2[4*h+3]);
    @(negedge clk); vpl_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!(pc == 32'd252 && !vec_busy)) @(negedge clk);
    repeat (5) @(negedge clk);
    $display("inference of 4 inputs finished after %0d cycles", cycles);

    for (int i = 0; i < 4; i++) for (int h = 0; h < N1 / 4; h++) begin
      vdbg_addr = 16'('ha000 + i * N1 * 2 + h * 8); #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (fx2int(vdbg_data[j]) != H[i][4*h+j]) begin
          failures++; $display("FAIL hidden[%0d][%0d] = %0d expected %0d", i, 4*h+j, fx2int(vdbg_data[j]), H[i][4*h+j]);
        end
      end
    end
    for (int i = 0; i < 4; i++) for (int h = 0; h < N2 / 4; h++) begin
      vdbg_addr = 16'('ha100 + i * N2 * 2 + h * 8); #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (fx2int(vdbg_data[j]) != Y[i][4*h+j]) begin
          failures++; $display("FAIL out[%0d][%0d] = %0d expected %0d", i, 4*h+j, fx2int(vdbg_data[j]), Y[i][4*h+j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired, pc=%h", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
