// systolic_cell: one multiply-accumulate cell of the systolic array.
//
// The inputs A, B, start and stop are latched every cycle. The latched A and B
// are multiplied; on a cycle whose latched start is set the product is loaded
// into the accumulator, otherwise it is added to it. On a cycle whose latched
// stop is set the accumulator value including that cycle's product is copied to
// the result register, which then holds until the next stop. The latched A,
// start and stop leave on the right (a_out, start_out, stop_out) and the latched
// B leaves at the bottom (b_out), so a neighbour sees them one cycle later.
//
// The register set, the start/stop behaviour and the out-going signals are the
// cell's as described for the design. That the last product is included when
// stop is seen, and that start/stop travel with A, are this design's choices.
// All registers clear on the synchronous active-low reset.
module systolic_cell
  import fixp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  fx_t  a_in,
  input  fx_t  b_in,
  input  logic start_in,
  input  logic stop_in,
  output fx_t  a_out,
  output fx_t  b_out,
  output logic start_out,
  output logic stop_out,
  output fx_t  result_out
);

  fx_t  a_q, b_q, acc_q, res_q;
  logic start_q, stop_q;
  fx_t  prod, acc_sum, acc_next;
  logic mul_ovf, add_ovf;

  fixp_mul u_mul (.a(a_q), .b(b_q), .p(prod), .ovf(mul_ovf));
  fixp_add u_add (.a(acc_q), .b(prod), .s(acc_sum), .ovf(add_ovf));

  assign acc_next = start_q ? prod : acc_sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      start_q <= 1'b0;
      stop_q  <= 1'b0;
      acc_q   <= '0;
      res_q   <= '0;
    end else begin
      a_q     <= a_in;
      b_q     <= b_in;
      start_q <= start_in;
      stop_q  <= stop_in;
      acc_q   <= acc_next;
      if (stop_q) res_q <= acc_next;
    end
  end

  assign a_out      = a_q;
  assign b_out      = b_q;
  assign start_out  = start_q;
  assign stop_out   = stop_q;
  assign result_out = res_q;

endmodule
