// mu_rotation_ctrl: per-PE controller of the mu-rotation datapath.
//
// A start pulse latches a rotation command (index k, sign, enable). From the
// next cycle on the controller emits one control word per cycle, walking
// through the inner iterations of the method that builds index k (see
// evd_pkg for the four methods). In repeat mode (the "6-CORDIC") it then
// continues with the indices k+1, k+2, .. until the table's repeat count for
// k is used up, so that one slot costs close to the 6-cycle critical path of
// index 1; in single mode (the "mu-CORDIC") it stops after index k.
//
// Control word per inner iteration j of index k (s = rotation sign):
//   j = 0, all methods : crossed, live operands, shift k   (x -= s*y>>k, y += s*x>>k)
//   j = 1, II / III    : straight, aux operands, shift 2k+1, subtract
//   j = 2, III         : crossed,  aux operands, shift 3k+3 (x += s*ya.., y -= s*xa..)
//   j = 1, IV          : straight, aux operands, shift 2k+2, subtract
//   j = 2+f, IV        : straight, live operands, shift (2k+2)*2^f, subtract for f = 0
//                        and add for f > 0  (norm division (1-u)(1+u^2)(1+u^4)..)
// Method boundaries, cycle and repeat counts follow the reference angle
// table; the shift-add forms are this design's own.
//
// Timing: start in cycle t, control words in cycles t+1 .. t+C, where C is
// at most 6; busy is high while words are emitted. rot_begin marks the first
// cycle of every mu-rotation and method gives its method (for monitoring).
module mu_rotation_ctrl
  import evd_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  rot_cmd_t cmd,
  input  logic     repeat_en,
  output mu_ctrl_t ctrl,
  output logic     busy,
  output logic     rot_begin,
  output method_e  method
);

  logic [5:0] cur_k;
  logic [2:0] rep_left;
  logic [2:0] step;
  logic       neg;

  logic [2:0] ncyc;
  logic [5:0] k2p1, k2p2, k3p3;
  logic [1:0] f;

  always_comb begin
    method = method_of(cur_k);
    ncyc   = cycles_of(cur_k);
    k2p1   = {cur_k[4:0], 1'b1};
    k2p2   = {cur_k[4:0], 1'b0} + 6'd2;
    k3p3   = cur_k + {cur_k[4:0], 1'b0} + 6'd3;
    f      = 2'(step - 3'd2);
    ctrl        = '0;
    ctrl.active = busy;
    if (step == 3'd0) begin
      ctrl.s0    = 1'b0;
      ctrl.s1    = 1'b1;
      ctrl.kx    = cur_k;
      ctrl.ky    = cur_k;
      ctrl.sub_x = ~neg;
      ctrl.sub_y = neg;
    end else if (method == M_IV) begin
      ctrl.s1 = 1'b0;
      if (step == 3'd1) begin
        ctrl.s0    = 1'b1;
        ctrl.kx    = k2p2;
        ctrl.ky    = k2p2;
        ctrl.sub_x = 1'b1;
        ctrl.sub_y = 1'b1;
      end else begin
        ctrl.s0    = 1'b0;
        ctrl.kx    = k2p2 << f;
        ctrl.ky    = k2p2 << f;
        ctrl.sub_x = (f == 2'd0);
        ctrl.sub_y = (f == 2'd0);
      end
    end else if (step == 3'd1) begin
      ctrl.s0    = 1'b1;
      ctrl.s1    = 1'b0;
      ctrl.kx    = k2p1;
      ctrl.ky    = k2p1;
      ctrl.sub_x = 1'b1;
      ctrl.sub_y = 1'b1;
    end else begin
      ctrl.s0    = 1'b1;
      ctrl.s1    = 1'b1;
      ctrl.kx    = k3p3;
      ctrl.ky    = k3p3;
      ctrl.sub_x = neg;
      ctrl.sub_y = ~neg;
    end
    rot_begin = busy && (step == 3'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cur_k    <= 6'd1;
      rep_left <= 3'd1;
      step     <= 3'd0;
      neg      <= 1'b0;
    end else if (start) begin
      busy     <= cmd.en && (cmd.k != 6'd0) && (cmd.k <= 6'(KMAX));
      cur_k    <= cmd.k;
      rep_left <= repeat_en ? repeat_of(cmd.k) : 3'd1;
      step     <= 3'd0;
      neg      <= cmd.neg;
    end else if (busy) begin
      if (step == ncyc - 3'd1) begin
        step <= 3'd0;
        if (rep_left > 3'd1 && cur_k < 6'(KMAX)) begin
          cur_k    <= cur_k + 6'd1;
          rep_left <= rep_left - 3'd1;
        end else begin
          busy <= 1'b0;
        end
      end else begin
        step <= step + 3'd1;
      end
    end
  end

endmodule
