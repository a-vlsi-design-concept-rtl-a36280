// evd_input_regs: input register stage of the EVD array.
//
// Accepts the N x N matrix as a stream of signed words in row-major order
// (a[0][0], a[0][1], .., a[N-1][N-1]) with a valid/ready handshake while
// go is high, and issues one registered write (row, col, data) per accepted
// word to the PE array, which places it by the 2x2 block rule
// PE(p,q) <- rows 2p,2p+1 / columns 2q,2q+1. load_done pulses in the cycle
// the last write is presented. The streaming format is this design's own;
// the reference only names an input register block.
module evd_input_regs #(
  parameter int unsigned M  = 25,
  parameter int unsigned W  = 32,
  localparam int unsigned N  = 2 * M,
  localparam int unsigned IW = (N > 2) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                go,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_data,
  output logic                wr_en,
  output logic [IW-1:0]       wr_row,
  output logic [IW-1:0]       wr_col,
  output logic signed [W-1:0] wr_data,
  output logic                load_done
);

  logic [IW-1:0] row, col;
  logic          last_q;

  assign in_ready = go && !last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row     <= '0;
      col     <= '0;
      wr_en   <= 1'b0;
      wr_row  <= '0;
      wr_col  <= '0;
      wr_data <= '0;
      last_q  <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      if (!go) begin
        row    <= '0;
        col    <= '0;
        last_q <= 1'b0;
      end else if (in_valid && in_ready) begin
        wr_en   <= 1'b1;
        wr_row  <= row;
        wr_col  <= col;
        wr_data <= in_data;
        if (col == IW'(N - 1)) begin
          col <= '0;
          if (row == IW'(N - 1)) last_q <= 1'b1;
          else                   row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  assign load_done = wr_en && (wr_row == IW'(N - 1)) && (wr_col == IW'(N - 1));

endmodule
