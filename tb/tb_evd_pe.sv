// tb_evd_pe: checks the processor element.
//
// A diagonal PE gets random symmetric 2x2 blocks: after search, left and
// right rotation its block must equal Q(phi) A Q(phi)^T, computed here in
// floating point with the exact angle phi of the chosen mu-rotation slot
// (atan of the method's sine/cosine terms), and its off-diagonal must have
// shrunk to at most 0.6 of its value (the largest mu-rotation is 28 degrees,
// so a 45-degree problem is only partly solved in one step). An off-diagonal
// PE gets random blocks and random row/column commands and must produce
// Q(phi_r) A Q(phi_c)^T. Also checked:
// the load path, the interchange path and that each rotation phase ends
// within 6 cycles.
`timescale 1ns/1ps
module tb_evd_pe;
  import evd_pkg::*;
  localparam int W = 32;

  logic clk = 0, rst_n = 0, repeat_en = 0;
  logic load_en = 0, load_r = 0, load_c = 0;
  logic signed [W-1:0] load_data = 0;
  logic search_start = 0, rotl_start = 0, rotr_start = 0, xchg_en = 0;
  logic signed [W-1:0] xchg_in [2][2];
  rot_cmd_t row_in, col_in, d_row_o, d_col_o, o_row_o, o_col_o;
  logic signed [W-1:0] d_a [2][2], o_a [2][2];
  logic d_busy, o_busy, d_rb, o_rb;
  method_e d_m, o_m;
  int checks = 0, failures = 0;

  evd_pe #(.W(W), .IS_DIAG(1'b1)) u_diag (
    .clk, .rst_n, .repeat_en, .load_en, .load_r, .load_c, .load_data,
    .search_start, .rotl_start, .rotr_start, .xchg_en, .xchg_in,
    .row_cmd_i('0), .col_cmd_i('0), .row_cmd_o(d_row_o), .col_cmd_o(d_col_o),
    .a_o(d_a), .busy(d_busy), .rot_begin(d_rb), .method(d_m));
  evd_pe #(.W(W), .IS_DIAG(1'b0)) u_off (
    .clk, .rst_n, .repeat_en, .load_en, .load_r, .load_c, .load_data,
    .search_start, .rotl_start, .rotr_start, .xchg_en, .xchg_in,
    .row_cmd_i(row_in), .col_cmd_i(col_in), .row_cmd_o(o_row_o), .col_cmd_o(o_col_o),
    .a_o(o_a), .busy(o_busy), .rot_begin(o_rb), .method(o_m));

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int trep [1:32] = '{1,1,1,1,2,2,2,3,3,3,3,3,3,4,5,6,6,6,6,6,6,6,6,6,6,6,6,5,4,3,2,1};

  function automatic real theta(input int k);
    real t = 2.0 ** (-k);
    if (k >= 16)     return $atan(t);
    else if (k >= 8) return $atan(t / (1.0 - t * t / 2.0));
    else if (k >= 5) return $atan((t - t * t * t / 8.0) / (1.0 - t * t / 2.0));
    else             return $atan(t / (1.0 - t * t / 4.0));
  endfunction

  function automatic real phi(input rot_cmd_t c, input bit mode);
    real s = 0.0;
    int  r;
    if (!c.en) return 0.0;
    r = mode ? trep[int'(c.k)] : 1;
    for (int j = int'(c.k); j < int'(c.k) + r && j <= 32; j++) s += theta(j);
    return c.neg ? -s : s;
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input longint v [2][2]);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        @(negedge clk);
        load_en = 1; load_r = i[0]; load_c = j[0]; load_data = W'(v[i][j]);
      end
    @(negedge clk);
    load_en = 0;
  endtask

  task automatic phase(input bit right);
    int n;
    @(negedge clk);
    if (right) rotr_start = 1; else rotl_start = 1;
    @(negedge clk);
    rotl_start = 0; rotr_start = 0;
    n = 0;
    while (d_busy || o_busy) begin @(negedge clk); n++; end
    check(n <= MAX_CYC, $sformatf("rotation phase took %0d cycles", n));
  endtask

  // expected = Q(tr) A Q(tc)^T
  task automatic expect_blk(input longint v [2][2], input real tr, input real tc,
                            input logic signed [W-1:0] got [2][2], input string who);
    real b [2][2], e [2][2], cr, sr, cc, sc, tol;
    cr = $cos(tr); sr = $sin(tr); cc = $cos(tc); sc = $sin(tc);
    for (int j = 0; j < 2; j++) begin
      b[0][j] = cr * real'(v[0][j]) - sr * real'(v[1][j]);
      b[1][j] = sr * real'(v[0][j]) + cr * real'(v[1][j]);
    end
    for (int i = 0; i < 2; i++) begin
      e[i][0] = cc * b[i][0] - sc * b[i][1];
      e[i][1] = sc * b[i][0] + cc * b[i][1];
    end
    tol = 32.0 + 1.0e-7 * 2.0 ** 30;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        check(fabs(real'(got[i][j]) - e[i][j]) <= tol,
              $sformatf("%s a[%0d][%0d] = %0d expected %.1f", who, i, j, got[i][j], e[i][j]));
  endtask

  initial begin
    longint v [2][2];
    real th_d, th_r, th_c;
    int n_reduced = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      repeat_en = n[0];
      for (int i = 0; i < 2; i++)
        for (int j = i; j < 2; j++) begin
          v[i][j] = longint'($urandom_range(32'h3fff_ffff)) - 64'sh2000_0000;
          if (j > i && n % 4 == 2) v[i][j] = v[i][j] >>> $urandom_range(28);
          v[j][i] = v[i][j];
        end
      row_in.en = ($urandom_range(7) != 0); row_in.k = 6'($urandom_range(1, 32)); row_in.neg = $urandom_range(1);
      col_in.en = ($urandom_range(7) != 0); col_in.k = 6'($urandom_range(1, 32)); col_in.neg = $urandom_range(1);
      load(v);
      check(d_a == '{'{W'(v[0][0]), W'(v[0][1])}, '{W'(v[1][0]), W'(v[1][1])}}, "load");
      @(negedge clk);
      search_start = 1;
      @(negedge clk);
      search_start = 0;
      repeat (SEARCH_IT + 1) @(negedge clk);
      th_d = phi(d_row_o, repeat_en);
      th_r = phi(row_in, repeat_en);
      th_c = phi(col_in, repeat_en);
      check(d_row_o == d_col_o && o_row_o == row_in && o_col_o == col_in, "command routing");
      phase(1'b0);
      phase(1'b1);
      expect_blk(v, th_d, th_d, d_a, "diag");
      expect_blk(v, th_r, th_c, o_a, "off");
      check(fabs(real'(d_a[0][1])) <= 0.6 * fabs(real'(v[0][1])) + 64.0,
            $sformatf("off-diagonal %0d not reduced from %0d", d_a[0][1], v[0][1]));
      if (d_row_o.en) n_reduced++;
    end
    check(n_reduced > 0, "no rotation happened");
    // interchange
    @(negedge clk);
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) xchg_in[i][j] = $urandom;
    xchg_en = 1;
    @(negedge clk);
    xchg_en = 0;
    check(d_a == xchg_in && o_a == xchg_in, "interchange");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
