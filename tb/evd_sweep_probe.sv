// evd_sweep_probe: test helper. Runs one jacobi_evd_top of size M on a
// random symmetric matrix, once in 6-CORDIC mode and once in mu-CORDIC
// mode, for MAXSW sweeps each, and after every sweep measures the
// off-diagonal Frobenius norm relative to the norm of the matrix. It
// reports, per mode, the first sweep after which that ratio is below TOL
// (MAXSW+1 if never). finished rises when both runs are over.
`timescale 1ns/1ps
module evd_sweep_probe
  import evd_pkg::*;
#(
  parameter int  M     = 2,
  parameter int  SEED  = 1,
  parameter int  MAXSW = 20,
  parameter real TOL   = 1.0e-5
) (
  input  logic clk,
  input  logic rst_n,
  output int   sweeps_rep,
  output int   sweeps_single,
  output logic finished
);
  localparam int W = 32, N = 2 * M, IW = (N > 2) ? $clog2(N) : 1;

  logic start = 1'b0, repeat_en = 1'b1, in_valid = 1'b0;
  logic [7:0] num_sweeps = 8'(MAXSW);
  logic signed [W-1:0] in_data = '0;
  logic in_ready, out_valid, busy, done, mon_xchg;
  logic [IW-1:0] out_row, out_col;
  logic signed [W-1:0] out_data;
  logic [7:0] mon_sweep, mon_step;
  rot_cmd_t mon_cmd [M];
  logic [M-1:0] mon_rot_begin;
  method_e mon_method [M];

  jacobi_evd_top #(.M(M)) dut (.*);

  longint a_int [N][N];
  real    fro;
  int     conv;

  // After the last interchange of a sweep, measure the residual.
  always @(posedge clk) if (rst_n) begin
    if (mon_xchg && int'(mon_step) == N - 2) begin
      real off;
      #1;
      off = 0.0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (i != j) off += real'(dut.mat[i][j]) * real'(dut.mat[i][j]);
      if (conv > MAXSW && $sqrt(off) < TOL * fro) conv = int'(mon_sweep) + 1;
    end
  end

  task automatic run(input bit rep);
    int idx;
    conv = MAXSW + 1;
    @(negedge clk);
    repeat_en = rep;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    idx = 0;
    while (idx < N * N) begin
      in_valid = 1'b1;
      in_data  = W'(a_int[idx / N][idx % N]);
      @(posedge clk);
      if (in_ready) idx++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int unsigned mag, s;
    longint v;
    finished = 1'b0;
    s = $urandom(SEED);
    mag = 32'((1 << 30) / N);
    fro = 0.0;
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        v = longint'($urandom_range(2 * mag)) - longint'(mag);
        a_int[i][j] = v;
        a_int[j][i] = v;
      end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) fro += real'(a_int[i][j]) ** 2;
    fro = $sqrt(fro);
    @(posedge rst_n);
    run(1'b1);
    sweeps_rep = conv;
    run(1'b0);
    sweeps_single = conv;
    finished = 1'b1;
  end
endmodule
