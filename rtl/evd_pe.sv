// evd_pe: processor element of the Jacobi EVD array.
//
// Holds a 2x2 sub-block a[r][c] of the matrix and applies the two-sided
// rotation PE' = Q(theta_r) * PE * Q(theta_c)^T in two phases that reuse one
// rotation controller and two mu-rotation datapaths:
//   left phase  (rotl_start): columns (a00,a10) and (a01,a11) rotated by theta_r
//   right phase (rotr_start): rows    (a00,a01) and (a10,a11) rotated by theta_c
// Each datapath has its own aux register pair. With Q = [c -s; s c] both
// phases are the same vector rotation x' = c*x - s*y, y' = s*x + c*y.
//
// A diagonal PE (IS_DIAG = 1) also runs angle_search on its own block
// (p = a01 + a10, d = a11 - a00) and sends the result as both its row and its
// column command; an off-diagonal PE uses the row command of its row's
// diagonal PE for the left phase and the column command of its column's
// diagonal PE for the right phase. row_cmd_o / col_cmd_o show the commands
// in use.
// Two datapaths per PE and the phase split are this design's choices.
//
// Other operations: load_en writes load_data into slot (load_r, load_c);
// xchg_en replaces the whole block with xchg_in (the interchange).
// Timing: search_start -> command ready SEARCH_IT+1 cycles later;
// rotl_start / rotr_start -> at most MAX_CYC busy cycles each.
module evd_pe
  import evd_pkg::*;
#(
  parameter int unsigned W       = 32,
  parameter bit          IS_DIAG = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                repeat_en,
  input  logic                load_en,
  input  logic                load_r,
  input  logic                load_c,
  input  logic signed [W-1:0] load_data,
  input  logic                search_start,
  input  logic                rotl_start,
  input  logic                rotr_start,
  input  logic                xchg_en,
  input  logic signed [W-1:0] xchg_in  [2][2],
  input  rot_cmd_t            row_cmd_i,
  input  rot_cmd_t            col_cmd_i,
  output rot_cmd_t            row_cmd_o,
  output rot_cmd_t            col_cmd_o,
  output logic signed [W-1:0] a_o      [2][2],
  output logic                busy,
  output logic                rot_begin,
  output method_e             method
);

  logic signed [W-1:0] a  [2][2];
  logic signed [W-1:0] xa [2];
  logic signed [W-1:0] ya [2];
  logic signed [W-1:0] dx [2], dy [2], dxn [2], dyn [2], dxa [2], dya [2];
  logic                phase_right;
  rot_cmd_t            own_cmd, row_cmd, col_cmd;
  mu_ctrl_t            ctrl;

  if (IS_DIAG) begin : g_diag
    logic search_done;
    angle_search #(.W(W)) u_search (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (search_start),
      .repeat_en(repeat_en),
      .p        ((W+1)'(a[0][1]) + (W+1)'(a[1][0])),
      .d        ((W+1)'(a[1][1]) - (W+1)'(a[0][0])),
      .cmd      (own_cmd),
      .done     (search_done)
    );
    assign row_cmd = own_cmd;
    assign col_cmd = own_cmd;
  end else begin : g_offdiag
    assign own_cmd = '0;
    assign row_cmd = row_cmd_i;
    assign col_cmd = col_cmd_i;
  end

  assign row_cmd_o = row_cmd;
  assign col_cmd_o = col_cmd;

  mu_rotation_ctrl u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (rotl_start | rotr_start),
    .cmd      (rotr_start ? col_cmd : row_cmd),
    .repeat_en(repeat_en),
    .ctrl     (ctrl),
    .busy     (busy),
    .rot_begin(rot_begin),
    .method   (method)
  );

  // Operand routing of the two phases.
  always_comb begin
    if (!phase_right) begin
      dx[0] = a[0][0]; dy[0] = a[1][0];
      dx[1] = a[0][1]; dy[1] = a[1][1];
    end else begin
      dx[0] = a[0][0]; dy[0] = a[0][1];
      dx[1] = a[1][0]; dy[1] = a[1][1];
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_dp
    mu_cordic_datapath #(.W(W)) u_dp (
      .ctrl(ctrl),
      .x   (dx[i]),
      .y   (dy[i]),
      .xa  (xa[i]),
      .ya  (ya[i]),
      .xn  (dxn[i]),
      .yn  (dyn[i]),
      .xan (dxa[i]),
      .yan (dya[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a           <= '{default: '0};
      xa          <= '{default: '0};
      ya          <= '{default: '0};
      phase_right <= 1'b0;
    end else begin
      if (rotl_start)      phase_right <= 1'b0;
      else if (rotr_start) phase_right <= 1'b1;
      if (xchg_en) begin
        a <= xchg_in;
      end else if (load_en) begin
        a[load_r][load_c] <= load_data;
      end else if (busy) begin
        xa <= dxa;
        ya <= dya;
        if (!phase_right) begin
          a[0][0] <= dxn[0]; a[1][0] <= dyn[0];
          a[0][1] <= dxn[1]; a[1][1] <= dyn[1];
        end else begin
          a[0][0] <= dxn[0]; a[0][1] <= dyn[0];
          a[1][0] <= dxn[1]; a[1][1] <= dyn[1];
        end
      end
    end
  end

  assign a_o = a;

endmodule
