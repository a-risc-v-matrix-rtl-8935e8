// instr_buffer: FIFO between the CPU and the issue unit's control.
//
// Holds vector instructions until the control accepts them. `full` tells the
// CPU to stall the instruction it is trying to hand over. Push and pop may
// happen in the same cycle, also when full (the popped slot is reused). The
// head is visible whenever `empty` is low (first-word fall-through).
// The buffer and its stall are the design's; the depth of 4 is this design's
// choice.
module instr_buffer
  import fixp_pkg::*;
#(
  parameter int unsigned DEPTH = 4
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  vinstr_t din,
  output logic    full,
  input  logic    pop,
  output vinstr_t head,
  output logic    empty
);

  localparam int unsigned PW = $clog2(DEPTH);

  vinstr_t        mem [DEPTH];
  logic [PW-1:0]  rd_ptr, wr_ptr;
  logic [PW:0]    count;
  logic           do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (PW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign head    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push && full && !pop |-> 1'b0)
    else $error("instr_buffer: push while full");

endmodule
