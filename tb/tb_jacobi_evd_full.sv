// tb_jacobi_evd_full: end-to-end test of the Jacobi EVD engine at its default
// size, a 50 x 50 matrix on the 25 x 25 PE array (top parameters untouched).
//
// Runs the same random symmetric matrix twice, first with repeated
// mu-rotations per slot (6-CORDIC), then with one per slot (mu-CORDIC).
// Each result is checked against eigenvalues computed here in double
// precision by a plain cyclic Jacobi method: sorted diagonal against sorted
// reference eigenvalues, the residual off-diagonal norm, and the trace. It
// also checks the cycle count of the sweep phase (sweeps * (N-1) steps of
// 22 cycles) and counts how often each mechanism occurred: rotations of the
// methods I..IV, slots with repeated rotations, skipped rotations, the
// interchange and the mode switch; a mechanism that never occurred counts
// as a failure.
`timescale 1ns/1ps
module tb_jacobi_evd_full;
  import evd_pkg::*;

  localparam int M  = 25;   // the top's default size
  localparam int W  = 32;
  localparam int N  = 2 * M;
  localparam int IW = (N > 2) ? $clog2(N) : 1;
  localparam int SWEEPS_REP    = 12;
  localparam int SWEEPS_SINGLE = 16;
  localparam real EIG_TOL = 2.0e-5;   // relative to the Frobenius norm
  localparam real OFF_TOL = 1.0e-4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, repeat_en = 1'b1, in_valid = 1'b0;
  logic [7:0] num_sweeps = '0;
  logic signed [W-1:0] in_data = '0;
  logic in_ready, out_valid, busy, done, mon_xchg;
  logic [IW-1:0] out_row, out_col;
  logic signed [W-1:0] out_data;
  logic [7:0] mon_sweep, mon_step;
  rot_cmd_t mon_cmd [M];
  logic [M-1:0] mon_rot_begin;
  method_e mon_method [M];

  jacobi_evd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    #(64'd10 * 64'd4_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_method [4];
  int n_repeat_slots = 0, n_skip = 0, n_xchg = 0, n_rot = 0;
  int slot_rots [M];
  int n_mode_switch = 0;
  logic last_mode = 1'b1;
  logic in_slot = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.rotl_start || dut.rotr_start) begin
      for (int p = 0; p < M; p++) begin
        if (in_slot && slot_rots[p] > 1) n_repeat_slots++;
        slot_rots[p] = 0;
        if (!mon_cmd[p].en && dut.rotl_start) n_skip++;
      end
      in_slot <= 1'b1;
    end
    for (int p = 0; p < M; p++)
      if (mon_rot_begin[p]) begin
        n_method[int'(mon_method[p])]++;
        slot_rots[p]++;
        n_rot++;
      end
    if (mon_xchg) n_xchg++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  real A   [N][N];
  real ref_eig [N];
  longint a_int [N][N];

  // Double-precision cyclic Jacobi, independent of the design.
  task automatic ref_jacobi();
    real B [N][N];
    real off, th, c, s, t, bip, biq;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) B[i][j] = A[i][j];
    for (int sw = 0; sw < 60; sw++) begin
      off = 0.0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (i != j) off += B[i][j] * B[i][j];
      if (off < 1.0e-24) break;
      for (int pi = 0; pi < N - 1; pi++)
        for (int qi = pi + 1; qi < N; qi++) begin
          if (B[pi][qi] != 0.0) begin
            th = (B[qi][qi] - B[pi][pi]) / (2.0 * B[pi][qi]);
            t  = ((th >= 0.0) ? 1.0 : -1.0) / (fabs(th) + $sqrt(th * th + 1.0));
            c  = 1.0 / $sqrt(t * t + 1.0);
            s  = t * c;
            for (int k = 0; k < N; k++) begin
              bip = B[k][pi]; biq = B[k][qi];
              B[k][pi] = c * bip - s * biq;
              B[k][qi] = s * bip + c * biq;
            end
            for (int k = 0; k < N; k++) begin
              bip = B[pi][k]; biq = B[qi][k];
              B[pi][k] = c * bip - s * biq;
              B[qi][k] = s * bip + c * biq;
            end
          end
        end
    end
    for (int i = 0; i < N; i++) ref_eig[i] = B[i][i];
  endtask

  task automatic sort_real(ref real v [N]);
    real tmp;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N - 1 - i; j++)
        if (v[j] > v[j+1]) begin tmp = v[j]; v[j] = v[j+1]; v[j+1] = tmp; end
  endtask

  task automatic run(input bit rep, input int sweeps);
    real got [N][N];
    real eig [N];
    real fro, off, tr_in, tr_out, maxerr;
    longint t_last_in, t_first_out, expect_gap;
    int idx, nout;
    @(negedge clk);
    repeat_en  = rep;
    num_sweeps = 8'(sweeps);
    start      = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(dut.mode_q == rep, "mode not taken at start");
    if (dut.mode_q != last_mode) n_mode_switch++;
    last_mode = dut.mode_q;
    idx = 0;
    while (idx < N * N) begin
      in_valid = 1'b1;
      in_data  = W'(a_int[idx / N][idx % N]);
      @(posedge clk);
      if (in_ready) begin
        idx++;
        t_last_in = cycle;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    nout = 0;
    t_first_out = 0;
    while (nout < N * N) begin
      @(posedge clk);
      if (out_valid) begin
        if (nout == 0) t_first_out = cycle;
        got[out_row][out_col] = real'(out_data);
        nout++;
      end
    end
    @(posedge clk);
    expect_gap = longint'(sweeps) * (N - 1) * 22 + 4;
    check(t_first_out - t_last_in == expect_gap,
          $sformatf("sweep phase took %0d cycles, expected %0d", t_first_out - t_last_in, expect_gap));
    fro = 0.0; off = 0.0; tr_in = 0.0; tr_out = 0.0;
    for (int i = 0; i < N; i++) begin
      tr_in += A[i][i];
      tr_out += got[i][i];
      eig[i] = got[i][i];
      for (int j = 0; j < N; j++) begin
        fro += A[i][j] * A[i][j];
        if (i != j) off += got[i][j] * got[i][j];
      end
    end
    fro = $sqrt(fro);
    off = $sqrt(off);
    sort_real(eig);
    maxerr = 0.0;
    for (int i = 0; i < N; i++) begin
      check(fabs(eig[i] - ref_eig[i]) <= EIG_TOL * fro,
            $sformatf("eigenvalue %0d: got %f expected %f", i, eig[i], ref_eig[i]));
      if (fabs(eig[i] - ref_eig[i]) > maxerr) maxerr = fabs(eig[i] - ref_eig[i]);
    end
    check(off <= OFF_TOL * fro, $sformatf("off-diagonal norm %e of %e", off, fro));
    check(fabs(tr_in - tr_out) <= N * EIG_TOL * fro, "trace");
    $display("mode %0d, %0d sweeps: max eigenvalue error %.3e, off-diagonal %.3e (relative to |A|_F)",
             rep, sweeps, maxerr / fro, off / fro);
  endtask

  initial begin
    int unsigned mag;
    longint v;
    mag = 32'(((1 << (W - 2)) / N));
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        v = longint'($urandom_range(2 * mag)) - longint'(mag);
        a_int[i][j] = v;
        a_int[j][i] = v;
        A[i][j] = real'(v);
        A[j][i] = real'(v);
      end
    ref_jacobi();
    sort_real(ref_eig);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b1, SWEEPS_REP);
    run(1'b0, SWEEPS_SINGLE);
    $display("rotations %0d: method I %0d, II %0d, III %0d, IV %0d; repeated slots %0d; skipped %0d; interchanges %0d",
             n_rot, n_method[0], n_method[1], n_method[2], n_method[3], n_repeat_slots, n_skip, n_xchg);
    check(n_method[0] > 0, "method I never used");
    check(n_method[1] > 0, "method II never used");
    check(n_method[2] > 0, "method III never used");
    check(n_method[3] > 0, "method IV never used");
    check(n_repeat_slots > 0, "no slot with repeated rotations");
    check(n_skip > 0, "no skipped rotation");
    check(n_mode_switch > 0, "no mode switch");
    check(n_xchg == (SWEEPS_REP + SWEEPS_SINGLE) * (N - 1), "interchange count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
