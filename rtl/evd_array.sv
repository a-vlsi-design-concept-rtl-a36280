// evd_array: the M x M processor array of the parallel (Brent-Luk) Jacobi
// EVD for an N x N symmetric matrix, N = 2*M.
//
// PE(p,q) holds rows 2p, 2p+1 and columns 2q, 2q+1 of the matrix (0-based).
// The diagonal PEs compute rotation commands; the command of PE(p,p) goes to
// every PE of PE row p (theta_r) and of PE column p (theta_c). In the
// reference the commands are relayed PE to PE outwards from the diagonal;
// a relay that only passes the command on is the same wire, so here it is
// drawn as one net per row and column. Every PE then rotates its block from
// the left and from the right. The interchange (xchg_en) moves every matrix element
// by at most one PE, diagonally or within its PE, so that the index pairs
// held by the diagonal PEs follow the round-robin ordering with index 0
// fixed: after N-1 steps every pair (i,j) has been a diagonal sub-problem
// once, which is one sweep. The same permutation is applied to rows and
// columns, so the matrix stays symmetric and a diagonal block stays on the
// diagonal. The ordering follows the array figure (fixed corner, moves to
// diagonal neighbours); the exact permutation is the standard one for this
// array.
//
// Ports: load_* writes one element (row, col) per cycle; search_start,
// rotl_start, rotr_start and xchg_en come from the controller and act on all
// PEs at once. mat_o shows the whole matrix in its current index positions.
// busy_any is high while any PE is rotating. diag_* expose the diagonal
// PEs' rotation activity for monitoring.
module evd_array
  import evd_pkg::*;
#(
  parameter int unsigned M  = 25,
  parameter int unsigned W  = 32,
  localparam int unsigned N  = 2 * M,
  localparam int unsigned IW = (N > 2) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                repeat_en,
  input  logic                load_en,
  input  logic [IW-1:0]       load_row,
  input  logic [IW-1:0]       load_col,
  input  logic signed [W-1:0] load_data,
  input  logic                search_start,
  input  logic                rotl_start,
  input  logic                rotr_start,
  input  logic                xchg_en,
  output logic signed [W-1:0] mat_o [N][N],
  output logic                busy_any,
  output rot_cmd_t            diag_cmd   [M],
  output logic [M-1:0]        diag_rot_begin,
  output method_e             diag_method [M]
);

  logic signed [W-1:0] blk  [M][M][2][2];
  logic signed [W-1:0] xin  [M][M][2][2];
  logic [M*M-1:0]      busy_v;

  for (genvar p = 0; p < M; p++) begin : g_row
    for (genvar q = 0; q < M; q++) begin : g_col
      rot_cmd_t row_i, col_i, row_u, col_u;
      logic     rb;
      method_e  meth;

      if (q == p) begin : g_cd
        assign row_i = '0;
        assign col_i = '0;
      end else begin : g_co
        assign row_i = diag_cmd[p];
        assign col_i = diag_cmd[q];
      end

      // Interchange sources.
      for (genvar i = 0; i < 2; i++) begin : g_i
        for (genvar j = 0; j < 2; j++) begin : g_j
          if (M == 1) begin : g_one
            assign xin[p][q][i][j] = blk[p][q][i][j];
          end else begin : g_mv
            assign xin[p][q][i][j] =
              blk[src_pe(p, i, M)][src_pe(q, j, M)][src_slot(p, i, M)][src_slot(q, j, M)];
          end
          assign mat_o[2*p+i][2*q+j] = blk[p][q][i][j];
        end
      end

      evd_pe #(.W(W), .IS_DIAG(p == q)) u_pe (
        .clk         (clk),
        .rst_n       (rst_n),
        .repeat_en   (repeat_en),
        .load_en     (load_en && (load_row[IW-1:1] == (IW-1)'(p)) &&
                                 (load_col[IW-1:1] == (IW-1)'(q))),
        .load_r      (load_row[0]),
        .load_c      (load_col[0]),
        .load_data   (load_data),
        .search_start(search_start),
        .rotl_start  (rotl_start),
        .rotr_start  (rotr_start),
        .xchg_en     (xchg_en),
        .xchg_in     (xin[p][q]),
        .row_cmd_i   (row_i),
        .col_cmd_i   (col_i),
        .row_cmd_o   (row_u),
        .col_cmd_o   (col_u),
        .a_o         (blk[p][q]),
        .busy        (busy_v[p*M+q]),
        .rot_begin   (rb),
        .method      (meth)
      );

      if (p == q) begin : g_mon
        assign diag_cmd[p]       = row_u;   // own command of PE(p,p)
        assign diag_rot_begin[p] = rb;
        assign diag_method[p]    = meth;
      end
    end
  end

  assign busy_any = |busy_v;

endmodule
