// systolic_array: 4x4 grid of systolic cells computing C = A x B for 4x4
// fixed-point matrices, with the skew registers that feed it.
//
// Operands arrive one vector register per cycle. On cycle r the issue logic
// presents row r of A (a_load, a_row = r) and row r of B (b_valid). Row r of A
// is parallel-loaded into that row's three "abuf" registers: element 0 goes to
// the first cell at once with start, elements 1..3 follow on the next three
// cycles, element 3 carrying stop. Because row r is loaded on cycle r the rows
// come out one cycle apart. Row r of B enters all four columns together;
// column j passes it through j "bbuf" registers, so column j lags by j cycles.
// Element A[i][k] and element B[k][j] therefore meet in cell (i,j).
//
// Result row i is complete 8 cycles after row i of the operands was presented:
// c_valid is high for one cycle with c_row = i and c_vec = row i of C. A new
// product can start every 4 cycles, so up to three are in flight.
//
// The abuf/bbuf arrangement (three abufs per row, 0..3 bbufs per column) and
// the 8-cycle delay follow the design; parallel loading of the abufs, the
// order of elements and the output handshake are this design's choices.
module systolic_array
  import fixp_pkg::*;
#(
  parameter int unsigned N = LANES  // array is N x N; the issue logic assumes 4
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_load,            // a_vec is row a_row of A
  input  logic [$clog2(N)-1:0] a_row,
  input  fx_t [0:N-1] a_vec,
  input  logic       b_valid,           // b_vec is the next row of B
  input  fx_t [0:N-1] b_vec,
  output logic       c_valid,
  output logic [$clog2(N)-1:0] c_row,
  output fx_t [0:N-1] c_vec
);

  typedef struct packed {
    fx_t  v;
    logic start;
    logic stop;
  } abuf_t;

  // Horizontal and vertical links: index j is the input of column j,
  // index N is the right/bottom edge.
  fx_t   a_link  [N][N+1];
  logic  st_link [N][N+1];
  logic  sp_link [N][N+1];
  fx_t   b_link  [N+1][N];
  fx_t   res     [N][N];

  abuf_t abuf [N][N-1];   // abuf[i][0] is next to the array
  fx_t   bbuf [N][N];     // bbuf[j][0..j-1] used for column j

  // Row feeders.
  for (genvar i = 0; i < N; i++) begin : g_rows
    logic load_me;
    assign load_me = a_load && (a_row == i[$clog2(N)-1:0]);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < N-1; k++) abuf[i][k] <= '0;
      end else if (load_me) begin
        for (int k = 0; k < N-1; k++) begin
          abuf[i][k].v     <= a_vec[k+1];
          abuf[i][k].start <= 1'b0;
          abuf[i][k].stop  <= (k == N-2);
        end
      end else begin
        for (int k = 0; k < N-2; k++) abuf[i][k] <= abuf[i][k+1];
        abuf[i][N-2] <= '0;
      end
    end

    always_comb begin
      if (load_me) begin
        a_link[i][0]  = a_vec[0];
        st_link[i][0] = 1'b1;
        sp_link[i][0] = (N == 1);
      end else begin
        a_link[i][0]  = abuf[i][0].v;
        st_link[i][0] = abuf[i][0].start;
        sp_link[i][0] = abuf[i][0].stop;
      end
    end
  end

  // Column feeders: column j delays the B row by j cycles.
  for (genvar j = 0; j < N; j++) begin : g_cols
    fx_t b_top;
    assign b_top = b_valid ? b_vec[j] : '0;
    if (j == 0) begin : g_direct
      assign b_link[0][0] = b_top;
    end else begin : g_delay
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int k = 0; k < j; k++) bbuf[j][k] <= '0;
        end else begin
          bbuf[j][j-1] <= b_top;
          for (int k = 0; k < j-1; k++) bbuf[j][k] <= bbuf[j][k+1];
        end
      end
      assign b_link[0][j] = bbuf[j][0];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < N; j++) begin : g_c
      systolic_cell u_cell (
        .clk, .rst_n,
        .a_in      (a_link[i][j]),
        .b_in      (b_link[i][j]),
        .start_in  (st_link[i][j]),
        .stop_in   (sp_link[i][j]),
        .a_out     (a_link[i][j+1]),
        .b_out     (b_link[i+1][j]),
        .start_out (st_link[i][j+1]),
        .stop_out  (sp_link[i][j+1]),
        .result_out(res[i][j])
      );
    end
  end

  // A row is complete one cycle after its stop has reached the last column.
  logic [N-1:0] row_done;
  always_ff @(posedge clk) begin
    if (!rst_n) row_done <= '0;
    else for (int i = 0; i < N; i++) row_done[i] <= sp_link[i][N];
  end

  always_comb begin
    c_valid = |row_done;
    c_row   = '0;
    for (int i = 0; i < N; i++) if (row_done[i]) c_row = i[$clog2(N)-1:0];
    for (int j = 0; j < N; j++) c_vec[j] = res[c_row][j];
  end

endmodule
