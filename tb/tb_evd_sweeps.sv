// tb_evd_sweeps: number of sweeps to convergence against array size.
//
// Random symmetric matrices on PE arrays of 2x2, 5x5, 10x10 and 25x25
// (matrices of 4 to 50 rows), each in 6-CORDIC and in mu-CORDIC mode. The
// sweep after which the off-diagonal norm falls below 1e-5 of the matrix
// norm is printed per size and mode. Checks: every run converges within
// 20 sweeps, and the 6-CORDIC never needs more sweeps than the mu-CORDIC.
`timescale 1ns/1ps
module tb_evd_sweeps;
  localparam int NS = 4;
  localparam int SZ [NS] = '{2, 5, 10, 25};

  logic clk = 1'b0, rst_n = 1'b0;
  int   s_rep [NS], s_single [NS];
  logic [NS-1:0] fin;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NS; g++) begin : g_p
    evd_sweep_probe #(.M(SZ[g]), .SEED(17 + g)) u_probe (
      .clk(clk), .rst_n(rst_n), .sweeps_rep(s_rep[g]), .sweeps_single(s_single[g]), .finished(fin[g]));
  end

  initial begin
    #(64'd10 * 64'd3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&fin);
    for (int g = 0; g < NS; g++) begin
      $display("array %0dx%0d (matrix %0dx%0d): 6-CORDIC %0d sweeps, mu-CORDIC %0d sweeps",
               SZ[g], SZ[g], 2 * SZ[g], 2 * SZ[g], s_rep[g], s_single[g]);
      checks++;
      if (s_rep[g] > 20 || s_single[g] > 20) begin failures++; $display("FAIL: no convergence"); end
      checks++;
      if (s_rep[g] > s_single[g]) begin failures++; $display("FAIL: 6-CORDIC needed more sweeps"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
