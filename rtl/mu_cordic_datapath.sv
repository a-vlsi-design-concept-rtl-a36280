// mu_cordic_datapath: one inner iteration of the simplified scaling-free
// mu-rotation CORDIC element (two adders, two shifters, four multiplexers).
//
// Structure, as in the block diagram of the simplified PE:
//   first mux pair  (S0): the x-side mux picks x or x_a, the y-side mux y or y_a
//   second mux pair (S1): straight (x-shifter gets the x-side value) or crossed
//   shifters              arithmetic right shift by kx / ky
//   adders                x' = x +/- shifted, y' = y +/- shifted (sub_x / sub_y)
// The aux outputs x'_a / y'_a return the first-stage mux outputs, so the aux
// registers capture the live x/y in a cycle with S0 = 0 and hold their value
// in a cycle with S0 = 1. This is how a multi-cycle rotation keeps the
// pre-rotation operands; that use of the aux path is this design's choice.
//
// Purely combinational; the registers (REG) live in the PE. Shift amounts
// of W or more give the sign fill (0 or -1). A cycle with active = 0 leaves
// all four values unchanged.
module mu_cordic_datapath
  import evd_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  mu_ctrl_t        ctrl,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  input  logic signed [W-1:0] xa,
  input  logic signed [W-1:0] ya,
  output logic signed [W-1:0] xn,
  output logic signed [W-1:0] yn,
  output logic signed [W-1:0] xan,
  output logic signed [W-1:0] yan
);

  logic signed [W-1:0] mux0_x, mux0_y;   // first stage (S0)
  logic signed [W-1:0] mux1_x, mux1_y;   // second stage (S1)
  logic signed [W-1:0] sh_x, sh_y;       // shifter outputs

  always_comb begin
    mux0_x = ctrl.s0 ? xa : x;
    mux0_y = ctrl.s0 ? ya : y;
    mux1_x = ctrl.s1 ? mux0_y : mux0_x;
    mux1_y = ctrl.s1 ? mux0_x : mux0_y;
    sh_x   = mux1_x >>> ctrl.kx;
    sh_y   = mux1_y >>> ctrl.ky;
    if (ctrl.active) begin
      xn  = ctrl.sub_x ? x - sh_x : x + sh_x;
      yn  = ctrl.sub_y ? y - sh_y : y + sh_y;
      xan = mux0_x;
      yan = mux0_y;
    end else begin
      xn  = x;
      yn  = y;
      xan = xa;
      yan = ya;
    end
  end

endmodule
