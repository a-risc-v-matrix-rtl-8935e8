// array_unit: the systolic-array issue unit (coprocessor) with its control.
//
// Vector instructions from the CPU wait in an instruction buffer. A control
// state machine takes one at a time and runs it over the four registers of the
// named groups on four consecutive cycles, row r on cycle r: register 4*g+r is
// read, the selected unit works on it, and the result is written back in the
// same cycle. The units are the vector adder (VFIXADD), the ReLU (VFIXRELU),
// the data memory (VFIXLOAD/VFIXSTOR, addresses base + r*stride*8) and the
// systolic array (VFIXMULT, vd = vs1 x vs2 as 4x4 matrices).
//
// The array returns row r of a product 8 cycles after row r went in, so a
// multiply's write-back overlaps the next instruction. An 8-stage delay line
// carries the destination register alongside the array, and a scoreboard on it
// keeps order:
//   * a VFIXMULT may start while earlier products are in flight unless it reads
//     a group one of them still has to write;
//   * any other instruction waits until all products have been written, so the
//     single write port is never contended.
// The next instruction can start in the cycle after the last row of the
// previous one. `busy` is high while anything is buffered or in flight.
//
// The unit list, the register file organisation, the instruction buffer with
// CPU stall, the four-cycle execution and the 8-cycle array delay are the
// design's. The scoreboard rules, the start-next-in-last-cycle timing, the
// memory address unit (stride counted in 64-bit words, unsigned) and the event
// outputs are this design's choices.
module array_unit
  import fixp_pkg::*;
#(
  parameter int unsigned IBUF_DEPTH = 4,
  parameter int unsigned ADDR_W     = 16
)(
  input  logic              clk,
  input  logic              rst_n,
  // from the CPU
  input  logic              in_valid,
  input  vinstr_t           in_instr,
  output logic              full,       // CPU must hold in_valid/in_instr
  output logic              busy,
  // data memory preload and debug ports
  input  logic              pl_we,
  input  logic [ADDR_W-1:0] pl_addr,
  input  fxvec_t            pl_data,
  input  logic [ADDR_W-1:0] dbg_addr,
  output fxvec_t            dbg_data,
  // events, one cycle each
  output logic              ev_mul_overlap,  // multiply started with another in flight
  output logic              ev_hazard_wait,  // instruction held back by the scoreboard
  output logic              ev_store_err     // store outside user memory dropped
);

  localparam int unsigned WB_STAGES = 8;

  typedef struct packed {
    logic       v;
    logic [6:0] idx;
  } wb_t;

  // ---------------- instruction buffer ----------------
  vinstr_t head;
  logic    empty, take;

  instr_buffer #(.DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .rst_n,
    .push(in_valid), .din(in_instr), .full,
    .pop(take), .head, .empty
  );

  // ---------------- control ----------------
  vinstr_t    cur;
  logic       run_q;
  logic [1:0] cnt;
  wb_t        wbpipe [WB_STAGES];

  logic pend_any, pend_hit, cur_mul, can_take, hazard;

  always_comb begin
    cur_mul  = run_q && (cur.op == VOP_MUL);
    pend_any = cur_mul;
    pend_hit = cur_mul && (cur.vd == head.vs1 || cur.vd == head.vs2);
    for (int k = 0; k < WB_STAGES-1; k++) begin
      if (wbpipe[k].v) begin
        pend_any = 1'b1;
        if (wbpipe[k].idx[6:2] == head.vs1 || wbpipe[k].idx[6:2] == head.vs2) pend_hit = 1'b1;
      end
    end
    can_take = !run_q || (cnt == 2'd3);
    hazard   = (head.op == VOP_MUL) ? pend_hit : pend_any;
    take     = can_take && !empty && !hazard;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      cnt   <= '0;
      cur   <= '0;
    end else if (take) begin
      run_q <= 1'b1;
      cnt   <= '0;
      cur   <= head;
    end else if (run_q) begin
      cnt <= cnt + 2'd1;
      if (cnt == 2'd3) run_q <= 1'b0;
    end
  end

  assign ev_mul_overlap = take && (head.op == VOP_MUL) && (pend_any || wbpipe[WB_STAGES-1].v);
  assign ev_hazard_wait = can_take && !empty && hazard;

  // ---------------- register file ----------------
  logic [6:0] ra1, ra2, wa;
  fxvec_t     rd1, rd2, wd;
  logic       we;

  assign ra1 = {(cur.op == VOP_STOR) ? cur.vd : cur.vs1, cnt};
  assign ra2 = {cur.vs2, cnt};

  vreg_file #(.NREGS(128)) u_rf (
    .clk, .rst_n,
    .ra1, .rd1, .ra2, .rd2,
    .we, .wa, .wd
  );

  // ---------------- execution units ----------------
  fxvec_t           add_y, relu_y, mem_y, c_vec;
  logic [LANES-1:0] add_ovf;
  logic             c_valid;
  logic [1:0]       c_row;
  logic [ADDR_W-1:0] maddr;
  logic             mem_we;

  vec_adder u_add  (.a(rd1), .b(rd2), .s(add_y), .ovf(add_ovf));
  vec_relu  u_relu (.a(rd1), .y(relu_y));

  assign maddr  = cur.base[ADDR_W-1:0] + ADDR_W'((32'(cnt) * 32'(cur.stride)) << 3);
  assign mem_we = run_q && (cur.op == VOP_STOR);

  vec_dcache #(.ADDR_W(ADDR_W)) u_dcache (
    .clk,
    .addr(maddr), .rdata(mem_y), .we(mem_we), .wdata(rd1), .st_err(ev_store_err),
    .pl_we, .pl_addr, .pl_data,
    .dbg_addr, .dbg_data
  );

  systolic_array #(.N(LANES)) u_array (
    .clk, .rst_n,
    .a_load (cur_mul), .a_row(cnt), .a_vec(rd1),
    .b_valid(cur_mul), .b_vec(rd2),
    .c_valid, .c_row, .c_vec
  );

  // Destination delay line, aligned with the array's result rows.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < WB_STAGES; k++) wbpipe[k] <= '0;
    end else begin
      wbpipe[0] <= '{v: cur_mul, idx: {cur.vd, cnt}};
      for (int k = 1; k < WB_STAGES; k++) wbpipe[k] <= wbpipe[k-1];
    end
  end

  // ---------------- write-back mux ----------------
  always_comb begin
    we = 1'b0;
    wa = {cur.vd, cnt};
    wd = add_y;
    if (wbpipe[WB_STAGES-1].v) begin
      we = 1'b1;
      wa = wbpipe[WB_STAGES-1].idx;
      wd = c_vec;
    end else if (run_q) begin
      unique case (cur.op)
        VOP_ADD:  begin we = 1'b1; wd = add_y;  end
        VOP_RELU: begin we = 1'b1; wd = relu_y; end
        VOP_LOAD: begin we = 1'b1; wd = mem_y;  end
        default:  we = 1'b0;
      endcase
    end
  end

  assign busy = run_q || !empty || pend_any || wbpipe[WB_STAGES-1].v;

  // The scoreboard must keep unit write-back and product write-back apart,
  // and the array must deliver rows exactly when the delay line expects them.
  a_wb_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
      wbpipe[WB_STAGES-1].v |-> !(run_q && cur.op inside {VOP_ADD, VOP_RELU, VOP_LOAD}))
    else $error("array_unit: write-back conflict");
  a_array_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid == wbpipe[WB_STAGES-1].v && (!c_valid || c_row == wbpipe[WB_STAGES-1].idx[1:0]))
    else $error("array_unit: array result out of step with delay line");

endmodule
