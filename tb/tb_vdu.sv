// tb_vdu: drives the visibility detection unit with random object and
// observer positions, random global-to-observer matrices and random windows,
// and compares the observer-space centre, the pyramid sides A_w and B_w and
// the visual flag with a reference computed in the testbench (64-bit integer
// transform and division, real-valued visibility condition). Counts how often
// each of the five terms of the condition fails, requires every one to fail
// at least once, and checks the 52-cycle latency.
module tb_vdu;
  import sp_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    start = 1'b0;
  vec3_t   p_obj, p_obs;
  mat3_t   mat_b;
  win_t    r_o;
  window_t win;
  logic    busy, done;
  vec3_t   con;
  side_t   a_side, b_side;
  logic [4:0] cond;
  logic    fv;
  int      checks = 0, failures = 0;
  int      fail_cnt [5];
  int      vis_cnt = 0;

  vdu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic run();
    longint d [3];
    longint c [3];
    longint aw, bw;
    real    xr, yr, zr, r;
    logic [4:0] ec;
    int     cyc;
    d[0] = longint'(p_obj.x) - longint'(p_obs.x);
    d[1] = longint'(p_obj.y) - longint'(p_obs.y);
    d[2] = longint'(p_obj.z) - longint'(p_obs.z);
    for (int i = 0; i < 3; i++)
      c[i] = (longint'(mat_b[i][0]) * d[0] + longint'(mat_b[i][1]) * d[1] +
              longint'(mat_b[i][2]) * d[2]) >>> FRAC;
    aw = (longint'(win.a) * c[0]) / longint'(win.d);
    bw = (longint'(win.b) * c[0]) / longint'(win.d);
    xr = real'(c[0]);
    yr = real'(c[1]);
    zr = real'(c[2]);
    r  = real'(r_o);
    ec[0] = xr > real'(win.d) - r;
    ec[1] = yr < real'(bw) / 2.0 + r;
    ec[2] = yr > -real'(bw) / 2.0 - r;
    ec[3] = zr < real'(aw) / 2.0 + r;
    ec[4] = zr > -real'(aw) / 2.0 - r;

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check("latency", cyc, 52);
    check("x_con", con.x, c[0]);
    check("y_con", con.y, c[1]);
    check("z_con", con.z, c[2]);
    check("A_w", a_side, aw);
    check("B_w", b_side, bw);
    check("cond", cond, ec);
    check("FV", fv, &ec);
    for (int i = 0; i < 5; i++) if (!ec[i]) fail_cnt[i]++;
    if (&ec) vis_cnt++;
  endtask

  initial begin
    for (int i = 0; i < 5; i++) fail_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // a case with the window of the published simulation: a_w = 2,
    // b_w = 0x64, d_w = 0x63, R_o = 0x63, identity matrix
    mat_b = '0;
    for (int i = 0; i < 3; i++) mat_b[i][i] = coef_t'(2 ** FRAC);
    win   = '{a: 16'h2, b: 16'h64, d: 16'h63};
    r_o   = 16'h63;
    p_obs = '{x: 0, y: 0, z: 0};
    p_obj = '{x: 1000, y: 30, z: -20};
    run();
    checks++;
    if (!fv) begin
      failures++;
      $display("object straight ahead not visible");
    end
    // random cases
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          mat_b[i][j] = (n % 2 == 0) ? ((i == j) ? coef_t'(2 ** FRAC) : '0)
                                      : coef_t'(srand(2 ** FRAC));
      win   = '{a: win_t'($urandom_range(1, 400)), b: win_t'($urandom_range(1, 400)),
                d: win_t'($urandom_range(1, 300))};
      r_o   = win_t'($urandom_range(0, 200));
      p_obs = '{x: srand(100000), y: srand(100000), z: srand(100000)};
      p_obj = '{x: p_obs.x + srand(3000), y: p_obs.y + srand(2000), z: p_obs.z + srand(2000)};
      run();
    end
    // extreme coordinates
    p_obs = '{x: -32'sd2000000000, y: 0, z: 0};
    p_obj = '{x: 32'sd100000000, y: 32'sd5000, z: -32'sd5000};
    win   = '{a: 16'hffff, b: 16'hffff, d: 16'd1};
    r_o   = 16'hffff;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) mat_b[i][j] = (i == j) ? coef_t'(2 ** FRAC) : '0;
    run();
    for (int i = 0; i < 5; i++) begin
      checks++;
      $display("condition term %0d failed %0d times", i, fail_cnt[i]);
      if (fail_cnt[i] == 0) begin
        failures++;
        $display("condition term %0d never failed", i);
      end
    end
    checks++;
    $display("visible objects: %0d", vis_cnt);
    if (vis_cnt < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
