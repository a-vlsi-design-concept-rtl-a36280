// tb_evd_controller: checks the step/sweep sequencing for N = 6 (M = 3).
//
// A run of S sweeps must issue, after load_done, S*(N-1) steps, each made of
// search_start, rotl_start, rotr_start and one xchg_en cycle, spaced
// SEARCH_IT+1, MAX_CYC+1 and MAX_CYC+1 cycles apart (22 cycles per step);
// then out_go once, and done one cycle after out_done. Also checked: the
// sweep and step counters, load_go while loading, and that zero sweeps go
// straight to the readout.
`timescale 1ns/1ps
module tb_evd_controller;
  import evd_pkg::*;
  localparam int M = 3, N = 2 * M;

  logic clk = 0, rst_n = 0, start = 0, load_done = 0, out_done = 0, busy_any = 0;
  logic [7:0] num_sweeps = 0;
  logic load_go, search_start, rotl_start, rotr_start, xchg_en, out_go, busy, done;
  logic [7:0] sweep, step;
  int checks = 0, failures = 0;

  evd_controller #(.M(M)) dut (.*);
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

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_s, n_l, n_r, n_x, n_o;
  longint t_s, t_l, t_r, t_x;
  always @(posedge clk) if (rst_n) begin
    if (search_start) begin n_s++; t_s = cyc; end
    if (rotl_start) begin
      n_l++; t_l = cyc;
      check(t_l - t_s == SEARCH_IT + 1, "search slot length");
    end
    if (rotr_start) begin
      n_r++; t_r = cyc;
      check(t_r - t_l == MAX_CYC + 1, "left slot length");
    end
    if (xchg_en) begin
      n_x++; t_x = cyc;
      check(t_x - t_r == MAX_CYC + 1, "right slot length");
      check(int'(step) == (n_x - 1) % (N - 1) && int'(sweep) == (n_x - 1) / (N - 1), "step/sweep counters");
    end
    if (out_go) n_o++;
  end

  task automatic run(input int sweeps);
    longint t0, t1;
    n_s = 0; n_l = 0; n_r = 0; n_x = 0; n_o = 0;
    @(negedge clk);
    num_sweeps = 8'(sweeps); start = 1;
    @(negedge clk);
    start = 0;
    repeat (5) begin
      check(load_go, "load_go while loading");
      @(negedge clk);
    end
    load_done = 1;
    @(negedge clk);
    load_done = 0;
    t0 = cyc;
    while (!out_go) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 == longint'(sweeps) * (N - 1) * 22,
          $sformatf("%0d sweeps took %0d cycles", sweeps, t1 - t0));
    repeat (3) @(negedge clk);
    out_done = 1;
    @(negedge clk);
    out_done = 0;
    check(done, "done after out_done");
    @(negedge clk);
    check(!busy && !done, "back to idle");
    check(n_s == sweeps * (N - 1) && n_l == n_s && n_r == n_s && n_x == n_s && n_o == 1,
          $sformatf("counts s=%0d l=%0d r=%0d x=%0d o=%0d", n_s, n_l, n_r, n_x, n_o));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1);
    run(3);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
