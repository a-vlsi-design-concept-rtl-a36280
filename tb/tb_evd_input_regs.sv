// tb_evd_input_regs: streams a 6 x 6 matrix with random gaps in in_valid and
// checks that each accepted word comes out once, one cycle later, with its
// row-major (row, col) address, that in_ready drops after the last word,
// that load_done marks the last write, and that nothing is accepted while
// go is low.
`timescale 1ns/1ps
module tb_evd_input_regs;
  localparam int M = 3, W = 32, N = 2 * M, IW = $clog2(N);

  logic clk = 0, rst_n = 0, go = 0, in_valid = 0;
  logic in_ready, wr_en, load_done;
  logic signed [W-1:0] in_data = 0, wr_data;
  logic [IW-1:0] wr_row, wr_col;
  int checks = 0, failures = 0;

  evd_input_regs #(.M(M), .W(W)) dut (.*);
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

  int n_wr = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      check(int'(wr_row) == n_wr / N && int'(wr_col) == n_wr % N && wr_data == W'(32'h1000 + n_wr),
            $sformatf("write %0d: (%0d,%0d) %h", n_wr, wr_row, wr_col, wr_data));
      n_wr++;
    end
    if (load_done) begin
      n_done++;
      check(wr_en && n_wr == N * N, "load_done on the last write");
    end
  end

  initial begin
    int idx;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid = 1; in_data = 32'h1000;
    repeat (3) @(negedge clk);
    check(n_wr == 0 && !in_ready, "accepted while go is low");
    go = 1;
    idx = 0;
    while (idx < N * N) begin
      in_valid = ($urandom_range(3) != 0);
      in_data  = W'(32'h1000 + idx);
      @(posedge clk);
      if (in_valid && in_ready) idx++;
      @(negedge clk);
    end
    in_valid = 1;
    repeat (3) @(negedge clk);
    check(!in_ready, "in_ready after the last word");
    check(n_wr == N * N && n_done == 1, $sformatf("%0d writes, %0d done", n_wr, n_done));
    go = 0;
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
