// tb_scene_processor: end-to-end test of the scene processor at its default
// size (K = 32 planes, 64 objects).
//
// Frame 1 uses the window of the published simulation (a_w = 2, b_w = 0x64,
// d_w = 0x63, R_o = 0x63) with one object straight ahead whose planes all
// face the observer: FV = 1 and RA = FFFFFFFF are expected. Further frames
// fill all 64 objects with random positions, angles, radii and plane normals,
// with the observer turned by quarter turns (so that B is exact and the
// reference can be computed in integers) and once with random observer
// angles. The reference model in this file computes, per object, the
// observer-space centre, the pyramid sides, the visibility terms and, for
// visible objects, RA from the scalar products; matrix A and B are compared
// with real-valued rotations. The next unit's ready is toggled at random in
// some frames. One frame runs with ready held high and checks the cycle
// count per object (K + 70 visible, 67 invisible).
// Counted mechanisms, each required at least once: visible object, each of
// the five visibility terms failing, list computation skipped, RA bit set,
// RA bit cleared, output stall, empty frame, frame longer than the table.
module tb_scene_processor;
  import sp_pkg::*;

  localparam int  K     = 32;
  localparam int  N_OBJ = 64;
  localparam int  NA    = 2 ** ANGLE_W;
  localparam real PI    = 3.14159265358979;
  localparam int  TOL   = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic obj_we = 1'b0;
  logic [$clog2(N_OBJ)-1:0] obj_waddr;
  obj_rec_t obj_wdata;
  logic nrm_we = 1'b0;
  logic [$clog2(N_OBJ*K)-1:0] nrm_waddr;
  nvec_t nrm_wdata;
  posvec_t p_obs;
  window_t win;
  logic [$clog2(N_OBJ+1)-1:0] num_obj;
  logic start = 1'b0;
  logic busy, done;
  logic out_valid, out_ready;
  logic [$clog2(N_OBJ)-1:0] out_id;
  logic out_fv;
  logic [K-1:0] out_ra;
  mat3_t out_a, out_b;
  vec3_t out_con;
  side_t out_aw, out_bw;
  logic [4:0] out_cond;

  scene_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_visible = 0, n_skip = 0, n_bit1 = 0, n_bit0 = 0, n_stall = 0;
  int n_empty = 0, n_clamp = 0;
  int n_termfail [5];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  obj_rec_t objs [N_OBJ];
  nvec_t    nrms [N_OBJ][K];

  function automatic int srand(int range);
    return int'($urandom_range(2 * range)) - range;
  endfunction

  task automatic check(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s = %0d, expected %0d", what, got, exp_v);
    end
  endtask

  typedef real rmat_t [3][3];
  function automatic rmat_t rrot(ang3_t a);
    real p, t, g;
    rmat_t m;
    p = 2.0 * PI * a.psi / NA;
    t = 2.0 * PI * a.theta / NA;
    g = 2.0 * PI * a.gamma / NA;
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

  // compare a matrix with a real rotation (transposed for B)
  task automatic check_mat(string name, mat3_t got, rmat_t m, bit trans);
    int e, g;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        e = int'($floor((trans ? m[c][r] : m[r][c]) * (2.0 ** FRAC) + 0.5));
        g = int'(got[r][c]);
        checks++;
        if (g - e > TOL || e - g > TOL) begin
          failures++;
          $display("%s[%0d][%0d] = %0d, expected %0d", name, r, c, g, e);
        end
      end
  endtask

  task automatic load_tables(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      obj_we = 1'b1;
      obj_waddr = ($clog2(N_OBJ))'(i);
      obj_wdata = objs[i];
    end
    @(negedge clk) obj_we = 1'b0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < K; j++) begin
        @(negedge clk);
        nrm_we = 1'b1;
        nrm_waddr = ($clog2(N_OBJ*K))'(i * K + j);
        nrm_wdata = nrms[i][j];
      end
    @(negedge clk) nrm_we = 1'b0;
  endtask

  // check one output record against the reference; exact_b: B is exact and
  // the reference uses the ideal rotation, otherwise it uses the unit's B
  task automatic check_record(int i, bit exact_b);
    rmat_t  bm;
    longint bq [3][3];
    longint d [3];
    longint c [3];
    longint aw, bw, s;
    real    r;
    logic [4:0] ec;
    logic [K-1:0] era;
    bm = rrot(p_obs.ang);
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        bq[a][b] = exact_b ? longint'($floor(bm[b][a] * (2.0 ** FRAC) + 0.5))
                           : longint'(out_b[a][b]);
    d[0] = longint'(objs[i].p.pos.x) - longint'(p_obs.pos.x);
    d[1] = longint'(objs[i].p.pos.y) - longint'(p_obs.pos.y);
    d[2] = longint'(objs[i].p.pos.z) - longint'(p_obs.pos.z);
    for (int a = 0; a < 3; a++) c[a] = (bq[a][0] * d[0] + bq[a][1] * d[1] + bq[a][2] * d[2]) >>> FRAC;
    aw = (longint'(win.a) * c[0]) / longint'(win.d);
    bw = (longint'(win.b) * c[0]) / longint'(win.d);
    r  = real'(objs[i].r);
    ec[0] = real'(c[0]) > real'(win.d) - r;
    ec[1] = real'(c[1]) < real'(bw) / 2.0 + r;
    ec[2] = real'(c[1]) > -real'(bw) / 2.0 - r;
    ec[3] = real'(c[2]) < real'(aw) / 2.0 + r;
    ec[4] = real'(c[2]) > -real'(aw) / 2.0 - r;
    era = '0;
    if (&ec)
      for (int j = 0; j < K; j++) begin
        s = d[0] * longint'(nrms[i][j].x) + d[1] * longint'(nrms[i][j].y) +
            d[2] * longint'(nrms[i][j].z);
        era[j] = (s >= 0);
      end
    check("id", out_id, i);
    check("x_con", out_con.x, c[0]);
    check("y_con", out_con.y, c[1]);
    check("z_con", out_con.z, c[2]);
    check("A_w", out_aw, aw);
    check("B_w", out_bw, bw);
    check("cond", out_cond, ec);
    check("FV", out_fv, &ec);
    check("RA", out_ra, era);
    check_mat("A", out_a, rrot(objs[i].p.ang), 1'b0);
    check_mat("B", out_b, bm, 1'b1);
    for (int t = 0; t < 5; t++) if (!ec[t]) n_termfail[t]++;
    if (&ec) begin
      n_visible++;
      n_bit1 += $countones(era);
      n_bit0 += K - $countones(era);
    end else begin
      n_skip++;
    end
  endtask

  // run one frame of n objects; stall_pct: chance of ready low per cycle;
  // timed: check cycles between accepted records
  task automatic run_frame(int n, int stall_pct, bit exact_b, bit timed);
    int got, cyc, exp_cyc, n_eff;
    n_eff = (n > N_OBJ) ? N_OBJ : n;
    num_obj = ($clog2(N_OBJ+1))'(n);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    got = 0;
    cyc = 1;
    while (!done) begin
      out_ready = ($urandom_range(99) >= stall_pct);
      #1;
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        if (got < N_OBJ) begin
          check_record(got, exact_b);
          if (timed && got > 0) begin
            exp_cyc = out_fv ? K + 70 : 67;
            check("cycles per object", cyc, exp_cyc);
          end
        end
        got++;
        cyc = 0;
      end
      @(negedge clk);
      cyc++;
    end
    out_ready = 1'b0;
    check("records", got, n_eff);
    if (n == 0) n_empty++;
    if (n > N_OBJ) n_clamp++;
  endtask

  task automatic random_scene(int range);
    for (int i = 0; i < N_OBJ; i++) begin
      objs[i].p.pos = '{x: p_obs.pos.x + srand(range), y: p_obs.pos.y + srand(range),
                        z: p_obs.pos.z + srand(range)};
      objs[i].p.ang = '{psi: angle_t'($urandom), theta: angle_t'($urandom),
                        gamma: angle_t'($urandom)};
      objs[i].r = win_t'($urandom_range(0, 300));
      for (int j = 0; j < K; j++)
        nrms[i][j] = '{x: coef_t'(srand(2 ** FRAC)), y: coef_t'(srand(2 ** FRAC)),
                       z: coef_t'(srand(2 ** FRAC))};
    end
  endtask

  initial begin
    for (int t = 0; t < 5; t++) n_termfail[t] = 0;
    out_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // frame 1: the configuration of the published simulation
    p_obs = '{pos: '{x: 0, y: 0, z: 0}, ang: '{psi: '0, theta: '0, gamma: '0}};
    win   = '{a: 16'h2, b: 16'h64, d: 16'h63};
    objs[0] = '{p: '{pos: '{x: 500, y: 10, z: -10}, ang: '{psi: angle_t'(10), theta: '0, gamma: '0}},
                r: 16'h63};
    for (int j = 0; j < K; j++) nrms[0][j] = '{x: coef_t'(2 ** FRAC), y: coef_t'(j * 50), z: coef_t'(-j * 50)};
    load_tables(1);
    run_frame(1, 0, 1'b1, 1'b0);
    check("published case FV", out_fv, 1);
    check("published case RA", out_ra, {K{1'b1}});

    // empty frame
    run_frame(0, 0, 1'b1, 1'b0);

    // full frames with the observer turned by quarter turns
    win = '{a: 16'd300, b: 16'd400, d: 16'd100};
    for (int f = 0; f < 4; f++) begin
      p_obs = '{pos: '{x: srand(1000000), y: srand(1000000), z: srand(1000000)},
                ang: '{psi: angle_t'(f * NA / 4), theta: angle_t'(((f + 1) % 2) * NA / 4),
                       gamma: angle_t'((f % 3) * NA / 4)}};
      random_scene(3000);
      load_tables(N_OBJ);
      run_frame(N_OBJ, (f == 0) ? 0 : 30, 1'b1, f == 0);
    end

    // observer with random angles; more objects asked for than the table holds
    p_obs = '{pos: '{x: 123, y: -456, z: 789},
              ang: '{psi: angle_t'(77), theta: angle_t'(900), gamma: angle_t'(333)}};
    random_scene(2000);
    load_tables(N_OBJ);
    run_frame(N_OBJ + 1, 20, 1'b0, 1'b0);

    $display("visible %0d, list skipped %0d, RA bits set %0d / cleared %0d, stall cycles %0d",
             n_visible, n_skip, n_bit1, n_bit0, n_stall);
    $display("term failures %0d %0d %0d %0d %0d, empty frames %0d, clamped frames %0d",
             n_termfail[0], n_termfail[1], n_termfail[2], n_termfail[3], n_termfail[4],
             n_empty, n_clamp);
    checks += 12;
    if (n_visible == 0) begin failures++; $display("no visible object"); end
    if (n_skip == 0) begin failures++; $display("no skipped list"); end
    if (n_bit1 == 0) begin failures++; $display("no RA bit set"); end
    if (n_bit0 == 0) begin failures++; $display("no RA bit cleared"); end
    if (n_stall == 0) begin failures++; $display("no output stall"); end
    if (n_empty == 0) begin failures++; $display("no empty frame"); end
    if (n_clamp == 0) begin failures++; $display("no clamped frame"); end
    for (int t = 0; t < 5; t++)
      if (n_termfail[t] == 0) begin failures++; $display("term %0d never failed", t); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
