// tb_mfu: drives the matrix formation unit with quarter-turn angles (whose
// matrices are exact) and random angles, and compares A = Rz*Ry*Rx of the
// object angles and B = transpose(Rz*Ry*Rx) of the observer angles with the
// same rotations computed in real arithmetic (tolerance 8 LSB of 2**FRAC).
// Also checks that done comes exactly 8 cycles after start and that A*B of
// identical angle sets is the identity.
module tb_mfu;
  import sp_pkg::*;

  localparam int  N   = 2 ** ANGLE_W;
  localparam real PI  = 3.14159265358979;
  localparam int  TOL = 8;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  ang3_t ang_obj, ang_obs;
  logic  busy, done;
  mat3_t mat_a, mat_b;
  int    checks = 0, failures = 0;

  mfu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef real rmat_t [3][3];

  function automatic rmat_t rrot(ang3_t a);
    real p, t, g;
    rmat_t m;
    p = 2.0 * PI * a.psi / N;
    t = 2.0 * PI * a.theta / N;
    g = 2.0 * PI * a.gamma / N;
    m[0][0] = $cos(p) * $cos(t);
    m[0][1] = $cos(p) * $sin(t) * $sin(g) - $sin(p) * $cos(g);
    m[0][2] = $cos(p) * $sin(t) * $cos(g) + $sin(p) * $sin(g);
    m[1][0] = $sin(p) * $cos(t);
    m[1][1] = $sin(p) * $sin(t) * $sin(g) + $cos(p) * $cos(g);
    m[1][2] = $sin(p) * $sin(t) * $cos(g) - $cos(p) * $sin(g);
    m[2][0] = -$sin(t);
    m[2][1] = $cos(t) * $sin(g);
    m[2][2] = $cos(t) * $cos(g);
    return m;
  endfunction

  task automatic compare(string name, mat3_t got, rmat_t exp_m, bit trans);
    int e, g;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        e = int'($floor((trans ? exp_m[c][r] : exp_m[r][c]) * (2.0 ** FRAC) + 0.5));
        g = int'(got[r][c]);
        checks++;
        if (g - e > TOL || e - g > TOL) begin
          failures++;
          $display("%s[%0d][%0d] = %0d, expected %0d", name, r, c, g, e);
        end
      end
  endtask

  task automatic run(ang3_t ao, ang3_t an);
    int cyc;
    ang_obj = ao;
    ang_obs = an;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 8) begin
      failures++;
      $display("done after %0d cycles, expected 8", cyc);
    end
    compare("A", mat_a, rrot(ao), 1'b0);
    compare("B", mat_b, rrot(an), 1'b1);
  endtask

  initial begin
    ang3_t a, b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // quarter turns
    for (int i = 0; i < 4; i++) begin
      a = '{psi: angle_t'(i * N / 4), theta: angle_t'(((i + 1) % 4) * N / 4), gamma: angle_t'(((i + 2) % 4) * N / 4)};
      b = '{psi: angle_t'(((i + 3) % 4) * N / 4), theta: '0, gamma: angle_t'(i * N / 4)};
      run(a, b);
    end
    // random angles
    for (int i = 0; i < 200; i++) begin
      a = '{psi: angle_t'($urandom), theta: angle_t'($urandom), gamma: angle_t'($urandom)};
      b = '{psi: angle_t'($urandom), theta: angle_t'($urandom), gamma: angle_t'($urandom)};
      run(a, b);
    end
    // same angles for object and observer: A*B is the identity
    a = '{psi: angle_t'(100), theta: angle_t'(200), gamma: angle_t'(300)};
    run(a, a);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        longint s;
        s = 0;
        for (int k = 0; k < 3; k++) s += longint'(mat_a[r][k]) * longint'(mat_b[k][c]);
        s = s >>> FRAC;
        checks++;
        if ((r == c && (s > 2 ** FRAC + 2 * TOL || s < 2 ** FRAC - 2 * TOL)) ||
            (r != c && (s > 2 * TOL || s < -2 * TOL))) begin
          failures++;
          $display("(A*B)[%0d][%0d] = %0d", r, c, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
