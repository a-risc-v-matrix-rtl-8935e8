// tb_vec_dcache: preloads every table region and the user region, reads them
// back through the vector port, checks that unmapped addresses read zero, that
// stores reach user memory, and that stores to the tables are dropped and
// flagged.
module tb_vec_dcache;
  import fixp_pkg::*;

  logic        clk = 0, we = 0, pl_we = 0, st_err;
  logic [15:0] addr = 0, pl_addr = 0, dbg_addr = 0;
  fxvec_t      rdata, wdata = '0, pl_data = '0, dbg_data;
  int          checks = 0, failures = 0;

  vec_dcache dut (.*);

  always #5 clk = ~clk;

  function automatic logic [63:0] pat(int a);
    return {16'(a), 16'(a ^ 16'h5a5a), 16'(~a), 16'(a * 3)};
  endfunction

  // first and last word of each region
  int region_lo [6] = '{'h0000, 'h6200, 'h6380, 'h63a0, 'h8000, 'ha000};
  int region_hi [6] = '{'h61f8, 'h6378, 'h6398, 'h63b8, 'h9ff8, 'hbff8};
  int unmapped  [3] = '{'h63c0, 'h7ff8, 'hc000};

  initial begin
    @(negedge clk);
    for (int r = 0; r < 6; r++) begin
      pl_we = 1; pl_addr = 16'(region_lo[r]); pl_data = pat(region_lo[r]); @(negedge clk);
      pl_addr = 16'(region_hi[r]); pl_data = pat(region_hi[r]); @(negedge clk);
    end
    pl_addr = 16'h7ff8; pl_data = '1; @(negedge clk);   // unmapped: ignored
    pl_we = 0;
    for (int r = 0; r < 6; r++) begin
      addr = 16'(region_lo[r]); #1;
      checks++; if (rdata !== pat(region_lo[r])) begin failures++; $display("FAIL read %h", addr); end
      addr = 16'(region_hi[r]); #1;
      checks++; if (rdata !== pat(region_hi[r])) begin failures++; $display("FAIL read %h", addr); end
    end
    foreach (unmapped[i]) begin
      addr = 16'(unmapped[i]); #1;
      checks++; if (rdata !== '0) begin failures++; $display("FAIL unmapped %h", addr); end
    end
    // store into user memory
    @(negedge clk); addr = 16'ha100; wdata = 64'h1234_5678_9abc_def0; we = 1; #1;
    checks++; if (st_err) failures++;
    @(negedge clk); we = 0; dbg_addr = 16'ha100; #1;
    checks++; if (dbg_data !== 64'h1234_5678_9abc_def0) begin failures++; $display("FAIL user store"); end
    // store into a table is dropped
    @(negedge clk); addr = 16'h0000; wdata = '0; we = 1; #1;
    checks++; if (!st_err) begin failures++; $display("FAIL no st_err"); end
    @(negedge clk); we = 0; dbg_addr = 16'h0000; #1;
    checks++; if (dbg_data !== pat(0)) begin failures++; $display("FAIL table overwritten"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
