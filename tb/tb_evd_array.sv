// tb_evd_array: checks the PE array on a 6 x 6 matrix (3 x 3 PEs).
//
// 1. Load: every element written by (row, col) shows up at mat_o[row][col].
// 2. Interchange: with a labelled matrix, every xchg_en must move the
//    elements as a round-robin ordering of the indices with index 0 fixed
//    (upper indices shift right, lower indices shift left, turning at both
//    ends), tracked here as a list of positions. Over N-1 steps the index
//    pairs held by the diagonal PEs must cover each of the N(N-1)/2 pairs
//    exactly once (one sweep).
// 3. Rotation step on a random symmetric matrix: the Frobenius norm is kept,
//    the matrix stays symmetric, and the 2x2 off-diagonal of every diagonal
//    block shrinks.
`timescale 1ns/1ps
module tb_evd_array;
  import evd_pkg::*;
  localparam int M = 3, W = 32, N = 2 * M, IW = $clog2(N);

  logic clk = 0, rst_n = 0, repeat_en = 1;
  logic load_en = 0;
  logic [IW-1:0] load_row = 0, load_col = 0;
  logic signed [W-1:0] load_data = 0;
  logic search_start = 0, rotl_start = 0, rotr_start = 0, xchg_en = 0;
  logic signed [W-1:0] mat_o [N][N];
  logic busy_any;
  rot_cmd_t diag_cmd [M];
  logic [M-1:0] diag_rot_begin;
  method_e diag_method [M];
  int checks = 0, failures = 0;

  evd_array #(.M(M), .W(W)) dut (.*);
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

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  longint v [N][N];

  task automatic load_all();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        load_en = 1; load_row = IW'(i); load_col = IW'(j); load_data = W'(v[i][j]);
      end
    @(negedge clk);
    load_en = 0;
  endtask

  task automatic pulse(ref logic s, input int wait_cycles);
    @(negedge clk);
    s = 1;
    @(negedge clk);
    s = 0;
    repeat (wait_cycles) @(negedge clk);
  endtask

  initial begin
    int pos [N];      // original index held at each position
    int npos [N];
    int seen [N][N];
    int a, b;
    real f0, f1, off0, off1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // labelled load
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) v[i][j] = 1000 * i + j;
    load_all();
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      check(mat_o[i][j] == W'(v[i][j]), $sformatf("load [%0d][%0d]", i, j));
    for (int i = 0; i < N; i++) pos[i] = i;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) seen[i][j] = 0;
    for (int s = 0; s < N - 1; s++) begin
      for (int p = 0; p < M; p++) begin
        a = pos[2*p]; b = pos[2*p+1];
        if (a > b) begin a = pos[2*p+1]; b = pos[2*p]; end
        seen[a][b]++;
      end
      pulse(xchg_en, 0);
      // position 2p = upper slot of PE p, 2p+1 = lower slot
      npos[0] = pos[0];
      npos[2] = pos[1];
      for (int p = 2; p < M; p++) npos[2*p] = pos[2*(p-1)];
      for (int p = 0; p < M - 1; p++) npos[2*p+1] = pos[2*(p+1)+1];
      npos[2*(M-1)+1] = pos[2*(M-1)];
      pos = npos;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        check(mat_o[i][j] == W'(v[pos[i]][pos[j]]),
              $sformatf("step %0d: mat[%0d][%0d] = %0d expected %0d", s, i, j, mat_o[i][j], v[pos[i]][pos[j]]));
    end
    for (int i = 0; i < N; i++) for (int j = i + 1; j < N; j++)
      check(seen[i][j] == 1, $sformatf("pair (%0d,%0d) met %0d times in a sweep", i, j, seen[i][j]));
    // one rotation step
    for (int i = 0; i < N; i++) for (int j = i; j < N; j++) begin
      v[i][j] = longint'($urandom_range(32'h07ff_ffff)) - 64'sh0400_0000;
      v[j][i] = v[i][j];
    end
    load_all();
    f0 = 0; off0 = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) f0 += real'(v[i][j]) ** 2;
    pulse(search_start, SEARCH_IT + 1);
    pulse(rotl_start, MAX_CYC);
    check(!busy_any, "left rotation not finished");
    pulse(rotr_start, MAX_CYC);
    check(!busy_any, "right rotation not finished");
    f1 = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      f1 += real'(mat_o[i][j]) ** 2;
      check(fabs(real'(mat_o[i][j]) - real'(mat_o[j][i])) <= 64.0, "symmetry");
    end
    check(fabs($sqrt(f1) - $sqrt(f0)) <= 1.0e-6 * $sqrt(f0), "Frobenius norm");
    for (int p = 0; p < M; p++)
      check(fabs(real'(mat_o[2*p][2*p+1])) <= 0.6 * fabs(real'(v[2*p][2*p+1])) + 64.0,
            $sformatf("diagonal block %0d not reduced", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
