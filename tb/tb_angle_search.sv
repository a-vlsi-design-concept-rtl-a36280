// tb_angle_search: checks the angle search of the diagonal PE.
//
// For random and directed (p, d) pairs the expected index is worked out here
// from first principles in floating point: the angle of each mu-rotation
// (atan of its sine/cosine terms), the total angle of a slot (one rotation,
// or k .. k+R-1 in repeat mode), the threshold tan(2*sqrt(phi_k*phi_k+1))
// and the smallest k with |p/d| at or above it. Cases within 1e-6 of a
// threshold are skipped. Also checked: the sign, "no rotation" for p = 0 and
// for tiny |tau|, k = 1 for d = 0, and the latency of SEARCH_IT+1 cycles.
`timescale 1ns/1ps
module tb_angle_search;
  import evd_pkg::*;
  localparam int W = 32;

  logic clk = 0, rst_n = 0, start = 0, repeat_en = 0;
  logic signed [W:0] p, d;
  rot_cmd_t cmd;
  logic done;
  int checks = 0, failures = 0;

  angle_search #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  trep [1:32] = '{1,1,1,1,2,2,2,3,3,3,3,3,3,4,5,6,6,6,6,6,6,6,6,6,6,6,6,5,4,3,2,1};
  real thr [2][1:32];

  function automatic real theta(input int k);
    real t = 2.0 ** (-k);
    if (k >= 16)     return $atan(t);
    else if (k >= 8) return $atan(t / (1.0 - t * t / 2.0));
    else if (k >= 5) return $atan((t - t * t * t / 8.0) / (1.0 - t * t / 2.0));
    else             return $atan(t / (1.0 - t * t / 4.0));
  endfunction

  function automatic real phi(input int k, input int mode);
    real s = 0.0;
    if (mode == 0) return theta(k);
    for (int j = k; j < k + trep[k]; j++) s += theta(j);
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input longint pv, input longint dv, input bit mode);
    real tau, mind;
    int  ek, lat;
    bit  near;
    @(negedge clk);
    p = (W+1)'(pv); d = (W+1)'(dv); repeat_en = mode; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == SEARCH_IT + 1, $sformatf("latency %0d", lat));
    if (pv == 0) begin
      check(!cmd.en, "p = 0 must give no rotation");
      return;
    end
    tau = (dv == 0) ? 1.0e30 : real'(pv) / real'(dv);
    if (tau < 0.0) tau = -tau;
    ek = 33; near = 0;
    for (int k = 32; k >= 1; k--) if (tau >= thr[mode][k]) ek = k;
    for (int k = 1; k <= 32; k++) begin
      mind = (tau - thr[mode][k]) / thr[mode][k];
      if (mind < 1.0e-6 && mind > -1.0e-6) near = 1;
    end
    if (near) return;
    if (ek == 33) check(!cmd.en, $sformatf("tau %e: expected no rotation", tau));
    else begin
      check(cmd.en && int'(cmd.k) == ek, $sformatf("p %0d d %0d tau %e mode %0d: k %0d expected %0d", pv, dv, tau, mode, cmd.k, ek));
      check(cmd.neg == ((pv < 0) != (dv < 0)), "sign");
    end
  endtask

  initial begin
    longint pv, dv;
    for (int mode = 0; mode < 2; mode++)
      for (int k = 1; k <= 32; k++) begin
        real a, b;
        a = phi(k, mode);
        b = (k < 32) ? phi(k + 1, mode) : a / 2.0;
        thr[mode][k] = $tan(2.0 * $sqrt(a * b));
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0, 12345, 0);
    one(1000, 0, 1);
    one(-1000, 0, 0);
    one(1, 64'sd1 <<< 32, 1);
    for (int n = 0; n < 1500; n++) begin
      int e;
      e  = $urandom_range(31);
      pv = longint'($urandom) >>> e;
      if ($urandom_range(1)) pv = -pv;
      dv = longint'($urandom) - 64'sd2147483648;
      dv = dv * 2 + longint'($urandom_range(1));
      one(pv, dv, n[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
