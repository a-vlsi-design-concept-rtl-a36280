// tb_mu_cordic_datapath: random test of one inner iteration of the
// mu-rotation datapath. For random operands and control words the expected
// outputs are formed here from the operand selection rule (S0 picks live or
// aux, S1 straight or crossed), an arithmetic shift and an add or subtract,
// computed in 64-bit arithmetic and truncated to the word width.
`timescale 1ns/1ps
module tb_mu_cordic_datapath;
  import evd_pkg::*;
  localparam int W = 32;

  mu_ctrl_t ctrl;
  logic signed [W-1:0] x, y, xa, ya, xn, yn, xan, yan;
  int checks = 0, failures = 0;

  mu_cordic_datapath #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sra(input longint v, input int s);
    longint r = v;
    for (int i = 0; i < s; i++) r = (r < 0) ? -((-r + 1) / 2) : r / 2;
    return r;
  endfunction

  initial begin
    longint ox, oy, ex, ey, eax, eay;
    for (int n = 0; n < 2000; n++) begin
      x  = $urandom; y = $urandom; xa = $urandom; ya = $urandom;
      ctrl.s0 = $urandom_range(1); ctrl.s1 = $urandom_range(1);
      ctrl.kx = 6'($urandom_range(34)); ctrl.ky = 6'($urandom_range(34));
      ctrl.sub_x = $urandom_range(1); ctrl.sub_y = $urandom_range(1);
      ctrl.active = ($urandom_range(9) != 0);
      #1;
      eax = ctrl.s0 ? longint'(xa) : longint'(x);
      eay = ctrl.s0 ? longint'(ya) : longint'(y);
      ox  = ctrl.s1 ? eay : eax;
      oy  = ctrl.s1 ? eax : eay;
      ox  = sra(ox, int'(ctrl.kx));
      oy  = sra(oy, int'(ctrl.ky));
      ex  = ctrl.sub_x ? longint'(x) - ox : longint'(x) + ox;
      ey  = ctrl.sub_y ? longint'(y) - oy : longint'(y) + oy;
      if (!ctrl.active) begin ex = x; ey = y; eax = xa; eay = ya; end
      checks++;
      if (xn !== W'(ex) || yn !== W'(ey) || xan !== W'(eax) || yan !== W'(eay)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d ctrl=%p x=%0d y=%0d xa=%0d ya=%0d -> %0d %0d %0d %0d", n, ctrl, x, y, xa, ya, xn, yn, xan, yan);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
