// tb_mu_rotation_ctrl: checks the rotation controller against the 32-bit
// mu-rotation angle table.
//
// A datapath with its registers is closed around the controller, as in a
// PE. For every index k = 1..32 and both signs it checks:
//  - the busy cycle count of a single rotation against the table's cycle
//    count, and of a repeated slot against the sum over k..k+R-1 (R from
//    the table), never above 6;
//  - the number of mu-rotations started in the slot (rot_begin) and the
//    method reported for k (I: k >= 16, II: 8..15, III: 5..7, IV: 1..4);
//  - for k <= 14, that rotating (2^30, 0) gives tan(2*theta) equal to the
//    table's "2 tan theta" column within 2e-4 relative, with the sign;
//  - that the vector length is kept within 1e-7 (orthonormal rotation).
`timescale 1ns/1ps
module tb_mu_rotation_ctrl;
  import evd_pkg::*;
  localparam int W = 32;

  logic clk = 0, rst_n = 0, start = 0, repeat_en = 0;
  rot_cmd_t cmd;
  mu_ctrl_t ctrl;
  logic busy, rot_begin;
  method_e method;
  logic signed [W-1:0] x, y, xa, ya, xn, yn, xan, yan;
  int checks = 0, failures = 0;

  mu_rotation_ctrl dut (.*);
  mu_cordic_datapath #(.W(W)) u_dp (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (busy) begin x <= xn; y <= yn; xa <= xan; ya <= yan; end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference table: cycle count, repeat count and 2*tan(theta) per index.
  int  tcyc [1:32] = '{6,5,5,4,3,3,3,2,2,2,2,2,2,2,2,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1};
  int  trep [1:32] = '{1,1,1,1,2,2,2,3,3,3,3,3,3,4,5,6,6,6,6,6,6,6,6,6,6,6,6,5,4,3,2,1};
  real tang [1:14] = '{1.49070, 0.54296, 0.25501, 0.12561, 6.25841e-2, 3.12606e-2,
                       1.56263e-2, 7.81266e-3, 3.90627e-3, 1.95313e-3, 9.76563e-4,
                       4.88281e-4, 2.44141e-4, 1.22070e-4};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rotate(input int k, input bit neg, input bit rep, output int ncyc, output int nrot);
    @(negedge clk);
    x = 32'sd1 <<< 30; y = 0; xa = 0; ya = 0;
    cmd.en = 1'b1; cmd.k = 6'(k); cmd.neg = neg; repeat_en = rep;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    ncyc = 0; nrot = 0;
    while (busy) begin
      ncyc++;
      if (rot_begin) nrot++;
      @(negedge clk);
      if (ncyc > 20) break;
    end
  endtask

  initial begin
    int ncyc, nrot, exp_cyc, exp_rep;
    real t, t2, len, rx, ry;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 1; k <= 32; k++) begin
      for (int sg = 0; sg < 2; sg++) begin
        // single rotation
        rotate(k, sg[0], 1'b0, ncyc, nrot);
        check(ncyc == tcyc[k], $sformatf("k=%0d cycles %0d expected %0d", k, ncyc, tcyc[k]));
        check(nrot == 1, $sformatf("k=%0d single slot started %0d rotations", k, nrot));
        rx = real'(x); ry = real'(y);
        len = $sqrt(rx * rx + ry * ry) / real'(32'sd1 <<< 30);
        check(len > 1.0 - 1.0e-7 && len < 1.0 + 1.0e-7, $sformatf("k=%0d length %.10f", k, len));
        if (k <= 14) begin
          t  = ry / rx;
          t2 = 2.0 * t / (1.0 - t * t);
          if (sg == 1) t2 = -t2;
          check(t2 > tang[k] * (1.0 - 2.0e-4) && t2 < tang[k] * (1.0 + 2.0e-4),
                $sformatf("k=%0d sign %0d tan2theta %.6e table %.6e", k, sg, t2, tang[k]));
        end
        // repeated slot
        rotate(k, sg[0], 1'b1, ncyc, nrot);
        exp_cyc = 0;
        for (int j = k; j < k + trep[k] && j <= 32; j++) exp_cyc += tcyc[j];
        check(ncyc == exp_cyc && ncyc <= 6, $sformatf("k=%0d repeated slot %0d cycles expected %0d", k, ncyc, exp_cyc));
        check(nrot == trep[k], $sformatf("k=%0d repeated slot %0d rotations expected %0d", k, nrot, trep[k]));
      end
    end
    // method of each index, through a fresh single rotation
    for (int k = 1; k <= 32; k++) begin
      @(negedge clk);
      cmd.en = 1; cmd.k = 6'(k); cmd.neg = 0; repeat_en = 0; start = 1;
      @(negedge clk); start = 0;
      check(method == ((k <= 4) ? M_IV : (k <= 7) ? M_III : (k <= 15) ? M_II : M_I),
            $sformatf("k=%0d method %s", k, method.name()));
      while (busy) @(negedge clk);
    end
    // disabled command: no activity
    @(negedge clk);
    cmd.en = 0; cmd.k = 6'd3; start = 1;
    @(negedge clk); start = 0;
    check(!busy, "disabled command started a rotation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
