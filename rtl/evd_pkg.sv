// evd_pkg: shared types and constants of the parallel Jacobi EVD array.
//
// The angle set is the 32-bit mu-rotation set: index k = 1..32 selects a
// rotation whose tangent is close to 2^-k. Each index is built by one of four
// shift-add methods (I..IV). The method boundaries, cycle counts and repeat
// counts are the ones of the reference angle table for 32-bit accuracy; the
// exact shift-add form of each method is this design's own construction
// (see mu_rotation_ctrl), chosen so that the norm error of every rotation is
// below 2^-32 and its tan(2*theta) matches the reference table:
//   I   (k >= 16): x' = x - s*2^-k*y                         1 cycle
//   II  (8..15)  : x' = x - 2^-(2k+1)*x - s*2^-k*y           2 cycles
//   III (5..7)   : x' = II + s*2^-(3k+3)*y                    3 cycles
//   IV  (1..4)   : x' = x - 2^-(2k+2)*x - s*2^-k*y, then the norm 1+2^-(2k+2)
//                  is divided out by factors (1-u)(1+u^2)(1+u^4)(1+u^8)
// (y' is the mirror image with the opposite sign on the cross term).
//
// Angle selection thresholds (THR_SINGLE, THR_REPEAT) are unsigned Q2.48
// numbers. For index k the threshold is tan(2*sqrt(phi_k*phi_{k+1})) with
// phi_k the total angle the PE turns for index k (a single rotation for
// THR_SINGLE, the sum of the rotations k .. k+R_k-1 for THR_REPEAT), and
// phi_33 = phi_32/2. The search picks the smallest k with |tau| >= THR[k].
package evd_pkg;

  localparam int unsigned KMAX      = 32;  // number of mu-rotation indices
  localparam int unsigned SHW       = 6;   // shift amount width (0..63)
  localparam int unsigned MAX_CYC   = 6;   // critical path: cycles per rotation slot
  localparam int unsigned SEARCH_IT = 6;   // binary search iterations over 1..33

  typedef enum logic [1:0] {M_I = 2'd0, M_II = 2'd1, M_III = 2'd2, M_IV = 2'd3} method_e;

  // Rotation command sent from a diagonal PE along its row and column.
  typedef struct packed {
    logic       en;     // 0: no rotation (off-diagonal already zero)
    logic [5:0] k;      // angle index 1..32
    logic       neg;    // 1: rotate by -theta_k
  } rot_cmd_t;

  // Control word of one inner iteration of the datapath (Fig. "simplified PE").
  typedef struct packed {
    logic           s0;      // 1: shifters read the aux registers, 0: the live x/y
    logic           s1;      // 1: crossed (x-adder gets y operand), 0: straight
    logic [SHW-1:0] kx;      // shift of the operand added to x
    logic [SHW-1:0] ky;      // shift of the operand added to y
    logic           sub_x;   // 1: x' = x - operand, 0: x' = x + operand
    logic           sub_y;
    logic           active;  // 0: registers hold
  } mu_ctrl_t;

  function automatic method_e method_of(input logic [5:0] k);
    if (k <= 6'd4)       return M_IV;
    else if (k <= 6'd7)  return M_III;
    else if (k <= 6'd15) return M_II;
    else                 return M_I;
  endfunction

  // Cycles of one rotation of index k (reference table, column "cycle count").
  function automatic logic [2:0] cycles_of(input logic [5:0] k);
    case (k)
      6'd1:             return 3'd6;
      6'd2, 6'd3:       return 3'd5;
      6'd4:             return 3'd4;
      6'd5, 6'd6, 6'd7: return 3'd3;
      default:          return (k <= 6'd15) ? 3'd2 : 3'd1;
    endcase
  endfunction

  // Repeat count of index k (reference table, column "repeat"): the PE runs
  // the indices k, k+1, .., k+R-1 in one slot of at most 6 cycles.
  function automatic logic [2:0] repeat_of(input logic [5:0] k);
    if (k <= 6'd4)        return 3'd1;
    else if (k <= 6'd7)   return 3'd2;
    else if (k <= 6'd13)  return 3'd3;
    else if (k == 6'd14)  return 3'd4;
    else if (k == 6'd15)  return 3'd5;
    else if (k <= 6'd27)  return 3'd6;
    else                  return 3'(6'd33 - k);   // 28..32 -> 5..1
  endfunction

  localparam logic [49:0] THR_SINGLE [1:32] = '{
    50'h0d6d28876fdf6, 50'h05e25b8611854, 50'h02db1bbec52e8, 50'h016aeeb87fe26,
    50'h00b5245318a4c, 50'h005a8664f5ac6, 50'h002d41bd07975, 50'h0016a0afd7b42,
    50'h000b50516164b, 50'h0005a827df646, 50'h0002d413d5888, 50'h00016a09e77f0,
    50'h0000b504f356e, 50'h00005a82799e6, 50'h00002d413ccd8, 50'h000016a09e669,
    50'h00000b504f334, 50'h000005a82799a, 50'h000002d413ccd, 50'h0000016a09e66,
    50'h000000b504f33, 50'h0000005a8279a, 50'h0000002d413cd, 50'h00000016a09e6,
    50'h0000000b504f3, 50'h00000005a827a, 50'h00000002d413d, 50'h000000016a09e,
    50'h00000000b504f, 50'h000000005a828, 50'h000000002d414, 50'h0000000016a0a
  };

  localparam logic [49:0] THR_REPEAT [1:32] = '{
    50'h0d6d28876fdf6, 50'h05e25b8611854, 50'h02db1bbec52e8, 50'h01bd143e6ab50,
    50'h010feec279965, 50'h0087d09f7d645, 50'h004954464d52e, 50'h00279968bd000,
    50'h0013cc950acf7, 50'h0009e6469afb1, 50'h0004f322d0304, 50'h00027991586e7,
    50'h000147e70603b, 50'h0000ac82c86e0, 50'h00005862b1660, 50'h00002c8c37da4,
    50'h000016461becf, 50'h00000b230df67, 50'h0000059186fb4, 50'h000002c8c37da,
    50'h0000016461bed, 50'h000000b230df6, 50'h00000059186fb, 50'h0000002c8c37e,
    50'h00000016461bf, 50'h0000000b230df, 50'h00000005862b1, 50'h00000002b20b2,
    50'h0000000147e70, 50'h0000000092a47, 50'h00000000376cf, 50'h0000000016a0a
  };

  // Source of an index slot in the interchange (round-robin ordering with
  // index position 1 fixed). Slot 0 = upper (odd) index of PE p, slot 1 =
  // lower (even) index; PEs are numbered 0..m-1. Returns {pe, slot}.
  //   new u_0 <- u_0, new u_1 <- l_0, new u_p <- u_{p-1} (p >= 2),
  //   new l_p <- l_{p+1} (p < m-1), new l_{m-1} <- u_{m-1}
  function automatic int src_pe(input int p, input int s, input int m);
    if (s == 0) return (p == 0) ? 0 : p - 1;
    else        return (p == m - 1) ? p : p + 1;
  endfunction

  function automatic int src_slot(input int p, input int s, input int m);
    if (s == 0) return (p == 1) ? 1 : 0;
    else        return (p == m - 1) ? 0 : 1;
  endfunction

endpackage
