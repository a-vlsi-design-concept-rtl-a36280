// jacobi_evd_top: full parallel Jacobi EVD engine for an N x N real
// symmetric matrix (N = 2*M, default 50 x 50 on a 25 x 25 PE array).
//
// Blocks: evd_input_regs (matrix in), evd_array (PEs with mu-rotation
// CORDIC datapaths, angle distribution and interchange), evd_controller
// (sweep/step sequencing), evd_output_regs (matrix out).
//
// Use: pulse start with num_sweeps and repeat_en set (1: 6-CORDIC, several
// mu-rotations per slot; 0: mu-CORDIC, one per slot); stream N*N words
// row-major on in_valid/in_data while in_ready is high; after the sweeps
// the matrix comes out row-major on out_valid/out_row/out_col/out_data, its
// diagonal holding the eigenvalues; done pulses at the end. Words are 32-bit
// two's complement; rotations preserve the Frobenius norm, so inputs must
// keep every element below 2^(W-1) in magnitude (|a| summed over a row of
// the input below 2^(W-2) is sufficient). One step takes 22 cycles, one
// sweep (N-1)*22.
//
// The mon_* ports expose what the diagonal PEs do (command, start of each
// mu-rotation, its method) and the sweep/step counters, for monitoring.
module jacobi_evd_top
  import evd_pkg::*;
#(
  parameter int unsigned M  = 25,
  parameter int unsigned W  = 32,
  localparam int unsigned N  = 2 * M,
  localparam int unsigned IW = (N > 2) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [7:0]          num_sweeps,
  input  logic                repeat_en,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic [IW-1:0]       out_row,
  output logic [IW-1:0]       out_col,
  output logic signed [W-1:0] out_data,
  output logic                busy,
  output logic                done,
  output logic [7:0]          mon_sweep,
  output logic [7:0]          mon_step,
  output logic                mon_xchg,
  output rot_cmd_t            mon_cmd [M],
  output logic [M-1:0]        mon_rot_begin,
  output method_e             mon_method [M]
);

  logic                load_go, load_done, out_go, out_done, busy_any;
  logic                search_start, rotl_start, rotr_start, xchg_en;
  logic                wr_en;
  logic [IW-1:0]       wr_row, wr_col;
  logic signed [W-1:0] wr_data;
  logic signed [W-1:0] mat [N][N];
  logic                mode_q;

  // The mode is taken at start and held for the whole run.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                mode_q <= 1'b1;
    else if (start && !busy)   mode_q <= repeat_en;
  end

  evd_input_regs #(.M(M), .W(W)) u_in (
    .clk      (clk),
    .rst_n    (rst_n),
    .go       (load_go),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_data  (in_data),
    .wr_en    (wr_en),
    .wr_row   (wr_row),
    .wr_col   (wr_col),
    .wr_data  (wr_data),
    .load_done(load_done)
  );

  evd_array #(.M(M), .W(W)) u_array (
    .clk           (clk),
    .rst_n         (rst_n),
    .repeat_en     (mode_q),
    .load_en       (wr_en),
    .load_row      (wr_row),
    .load_col      (wr_col),
    .load_data     (wr_data),
    .search_start  (search_start),
    .rotl_start    (rotl_start),
    .rotr_start    (rotr_start),
    .xchg_en       (xchg_en),
    .mat_o         (mat),
    .busy_any      (busy_any),
    .diag_cmd      (mon_cmd),
    .diag_rot_begin(mon_rot_begin),
    .diag_method   (mon_method)
  );

  evd_controller #(.M(M)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .num_sweeps  (num_sweeps),
    .load_done   (load_done),
    .out_done    (out_done),
    .busy_any    (busy_any),
    .load_go     (load_go),
    .search_start(search_start),
    .rotl_start  (rotl_start),
    .rotr_start  (rotr_start),
    .xchg_en     (xchg_en),
    .out_go      (out_go),
    .busy        (busy),
    .done        (done),
    .sweep       (mon_sweep),
    .step        (mon_step)
  );

  evd_output_regs #(.M(M), .W(W)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .go       (out_go),
    .mat_i    (mat),
    .out_valid(out_valid),
    .out_row  (out_row),
    .out_col  (out_col),
    .out_data (out_data),
    .out_done (out_done)
  );

  assign mon_xchg = xchg_en;

endmodule
