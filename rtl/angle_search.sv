// angle_search: picks the mu-rotation for a diagonal 2x2 sub-problem.
//
// The optimal Jacobi angle satisfies tan(2*theta) = tau = p/d with
// p = a12 + a21 (= 2*a12 for a symmetric block) and d = a22 - a11. Instead
// of computing an arctangent, the search compares |tau| with a table of
// tangent values: it returns the smallest index k with |tau| >= THR[k]
// (evd_pkg), i.e. the mu-rotation whose angle is closest to theta on a
// logarithmic scale. The division is avoided by comparing |p| * 2^48 with
// |d| * THR[k]; a binary search over k = 1..33 needs six such comparisons,
// one per cycle, on one multiplier. Index 33 (|tau| below every threshold)
// and p = 0 give "no rotation". The sign of the rotation is sign(p)*sign(d).
// The comparison against stored tangent values follows the reference; the
// binary search, the thresholds and the multiplier are this design's own.
//
// repeat_en selects the thresholds for the repeated (6-CORDIC) or single
// (mu-CORDIC) rotation slot. Timing: start in cycle t (p and d sampled),
// result in cmd and done from cycle t+SEARCH_IT+1 on; cmd holds until the
// next start. done is high while a result is held.
module angle_search
  import evd_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              repeat_en,
  input  logic signed [W:0] p,
  input  logic signed [W:0] d,
  output rot_cmd_t          cmd,
  output logic              done
);

  logic [W:0]  abs_p, abs_d;
  logic        neg_q, pzero_q, mode_q, running;
  logic [5:0]  lo, hi, mid, lo_n, hi_n;
  logic [2:0]  it;
  logic [49:0] thr;
  logic        ge;

  always_comb begin
    mid = 6'(({1'b0, lo} + {1'b0, hi}) >> 1);
    thr = mode_q ? THR_REPEAT[mid[4:0] == 5'd0 ? 32 : int'(mid[4:0])]
                 : THR_SINGLE[mid[4:0] == 5'd0 ? 32 : int'(mid[4:0])];
    ge  = ({abs_p, 48'd0} >= ({48'd0, abs_d} * {{(W-1){1'b0}}, thr}));
    if (ge) begin
      lo_n = lo;
      hi_n = mid;
    end else begin
      lo_n = mid + 6'd1;
      hi_n = hi;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      abs_p   <= '0;
      abs_d   <= '0;
      neg_q   <= 1'b0;
      pzero_q <= 1'b1;
      mode_q  <= 1'b1;
      running <= 1'b0;
      lo      <= 6'd1;
      hi      <= 6'd33;
      it      <= 3'd0;
      cmd     <= '0;
      done    <= 1'b0;
    end else if (start) begin
      abs_p   <= p[W] ? -p : p;
      abs_d   <= d[W] ? -d : d;
      neg_q   <= p[W] ^ d[W];
      pzero_q <= (p == '0);
      mode_q  <= repeat_en;
      running <= 1'b1;
      lo      <= 6'd1;
      hi      <= 6'd33;
      it      <= 3'd0;
      done    <= 1'b0;
    end else if (running) begin
      lo <= lo_n;
      hi <= hi_n;
      it <= it + 3'd1;
      if (it == 3'(SEARCH_IT - 1)) begin
        running <= 1'b0;
        done    <= 1'b1;
        cmd.en  <= !pzero_q && (lo_n <= 6'(KMAX));
        cmd.k   <= lo_n;
        cmd.neg <= neg_q;
      end
    end
  end

endmodule
