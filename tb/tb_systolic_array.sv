// tb_systolic_array: feeds random 4x4 matrix pairs into the array, one row of
// A and one row of B per cycle, both isolated and back to back (a new product
// every 4 cycles), and checks every result row against an integer reference
// of C = A x B and that row r appears exactly 8 cycles after row r went in.
module tb_systolic_array;
  import fixp_pkg::*;
  import rv_asm_pkg::*;

  localparam int NPROD = 12;

  logic       clk = 0, rst_n = 0;
  logic       a_load, b_valid, c_valid;
  logic [1:0] a_row, c_row;
  fx_t [0:3]  a_vec, b_vec, c_vec;
  int         checks = 0, failures = 0;
  int         cyc = 0;

  int A [NPROD][4][4], B [NPROD][4][4], C [NPROD][4][4];
  int issue_cyc [NPROD][4];
  int got_rows = 0;

  systolic_array dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int p = 0; p < NPROD; p++) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        A[p][i][j] = rnd_val(2800); B[p][i][j] = rnd_val(2800);
      end
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        C[p][i][j] = 0;
        for (int k = 0; k < 4; k++) C[p][i][j] += ref_mul(A[p][i][k], B[p][k][j]);
      end
    end
  end

  // drive: products 0..3 with idle gaps, the rest back to back
  initial begin
    a_load = 0; b_valid = 0; a_row = 0; a_vec = '0; b_vec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPROD; p++) begin
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        a_load = 1; b_valid = 1; a_row = 2'(r);
        for (int j = 0; j < 4; j++) begin
          a_vec[j] = int2fx(A[p][r][j]);
          b_vec[j] = int2fx(B[p][r][j]);
        end
        issue_cyc[p][r] = cyc;
      end
      if (p < 4) begin
        @(negedge clk); a_load = 0; b_valid = 0; a_vec = '0; b_vec = '0;
        repeat (p * 3) @(negedge clk);
      end
    end
    @(negedge clk); a_load = 0; b_valid = 0;
  end

  // check results in order
  always @(negedge clk) if (rst_n && c_valid) begin
    int p, r;
    p = got_rows / 4; r = got_rows % 4;
    checks++;
    if (c_row != 2'(r)) begin failures++; $display("FAIL row index %0d expected %0d", c_row, r); end
    checks++;
    if (cyc - issue_cyc[p][r] != 8) begin
      failures++; $display("FAIL product %0d row %0d latency %0d", p, r, cyc - issue_cyc[p][r]);
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (fx2int(c_vec[j]) != C[p][r][j]) begin
        failures++; $display("FAIL C%0d[%0d][%0d] = %0d expected %0d", p, r, j, fx2int(c_vec[j]), C[p][r][j]);
      end
    end
    got_rows++;
    if (got_rows == NPROD * 4) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d rows", got_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
