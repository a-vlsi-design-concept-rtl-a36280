// evd_output_regs: output register stage of the EVD array.
//
// On go it streams the whole matrix held by the array, row-major, one
// registered word per cycle (out_valid, out_row, out_col, out_data). After
// the last sweep the diagonal words are the eigenvalue estimates and the
// off-diagonal words the residual. out_done pulses with the last word.
// The matrix is shown in the array's current index order, which the
// interchange has permuted; eigenvalues need no particular order. The
// format is this design's own; the reference only names an output register
// block.
module evd_output_regs #(
  parameter int unsigned M  = 25,
  parameter int unsigned W  = 32,
  localparam int unsigned N  = 2 * M,
  localparam int unsigned IW = (N > 2) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                go,
  input  logic signed [W-1:0] mat_i [N][N],
  output logic                out_valid,
  output logic [IW-1:0]       out_row,
  output logic [IW-1:0]       out_col,
  output logic signed [W-1:0] out_data,
  output logic                out_done
);

  logic [IW-1:0] row, col;
  logic          run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      run       <= 1'b0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_data  <= '0;
      out_done  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_done  <= 1'b0;
      if (go) begin
        run <= 1'b1;
        row <= '0;
        col <= '0;
      end else if (run) begin
        out_valid <= 1'b1;
        out_row   <= row;
        out_col   <= col;
        out_data  <= mat_i[row][col];
        if (col == IW'(N - 1)) begin
          col <= '0;
          if (row == IW'(N - 1)) begin
            run      <= 1'b0;
            out_done <= 1'b1;
          end else begin
            row <= row + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
