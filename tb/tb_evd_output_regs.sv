// tb_evd_output_regs: fills the matrix input with a random 6 x 6 matrix,
// pulses go and checks that all N*N words come out row-major, one per cycle,
// with their addresses, and that out_done comes with the last one.
`timescale 1ns/1ps
module tb_evd_output_regs;
  localparam int M = 3, W = 32, N = 2 * M, IW = $clog2(N);

  logic clk = 0, rst_n = 0, go = 0;
  logic signed [W-1:0] mat_i [N][N];
  logic out_valid, out_done;
  logic [IW-1:0] out_row, out_col;
  logic signed [W-1:0] out_data;
  int checks = 0, failures = 0;

  evd_output_regs #(.M(M), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n, gap;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) mat_i[i][j] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1;
    @(negedge clk);
    go = 0;
    n = 0; gap = 0;
    while (n < N * N && gap < 10) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        check(int'(out_row) == n / N && int'(out_col) == n % N &&
              out_data == mat_i[n / N][n % N], $sformatf("word %0d", n));
        check(out_done == (n == N * N - 1), "out_done");
        n++;
        gap = 0;
      end else if (n > 0) begin
        gap++;
        check(0, "gap in the output stream");
      end
    end
    check(n == N * N, $sformatf("%0d words", n));
    repeat (3) @(posedge clk);
    #1 check(!out_valid, "stream stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
