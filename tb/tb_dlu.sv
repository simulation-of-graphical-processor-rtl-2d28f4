// tb_dlu: drives the detail/loader unit with random object and observer
// positions and random plane normals (held in a testbench memory with one
// cycle of read latency) and compares the list number RA with the signs of
// the scalar products computed in 64-bit integers. Runs both sign
// conventions (NEG_SET = 0 and 1), includes planes through which the
// observer gives S = 0, the all-ones list number of the published
// simulation (K = 32, RA = FFFFFFFF), and checks the K + 1 cycle latency.
module tb_dlu;
  import sp_pkg::*;

  localparam int K  = 32;
  localparam int IW = $clog2(K);

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  vec3_t p_obj, p_obs;
  int    checks = 0, failures = 0;
  nvec_t nrm [K];

  logic [IW-1:0] n_addr0, n_addr1;
  logic          n_rd0, n_rd1;
  nvec_t         n_data0, n_data1;
  logic          busy0, busy1, done0, done1;
  logic [K-1:0]  ra0, ra1;

  dlu #(.K(K), .NEG_SET(1'b0)) dut0 (
    .clk, .rst_n, .start, .p_obj, .p_obs, .n_addr(n_addr0), .n_rd(n_rd0),
    .n_data(n_data0), .busy(busy0), .done(done0), .ra(ra0));
  dlu #(.K(K), .NEG_SET(1'b1)) dut1 (
    .clk, .rst_n, .start, .p_obj, .p_obs, .n_addr(n_addr1), .n_rd(n_rd1),
    .n_data(n_data1), .busy(busy1), .done(done1), .ra(ra1));

  always_ff @(posedge clk) begin
    if (n_rd0) n_data0 <= nrm[n_addr0];
    if (n_rd1) n_data1 <= nrm[n_addr1];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int srand(int range);
    return int'($urandom_range(2 * range)) - range;
  endfunction

  int ones = 0, zeros = 0, zero_s = 0;

  task automatic run();
    logic [K-1:0] exp_ra;
    longint s;
    int cyc;
    for (int i = 0; i < K; i++) begin
      s = (longint'(p_obj.x) - longint'(p_obs.x)) * longint'(nrm[i].x) +
          (longint'(p_obj.y) - longint'(p_obs.y)) * longint'(nrm[i].y) +
          (longint'(p_obj.z) - longint'(p_obs.z)) * longint'(nrm[i].z);
      exp_ra[i] = (s >= 0);
      if (s == 0) zero_s++;
    end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done0) begin
      @(negedge clk);
      cyc++;
    end
    checks += 4;
    if (cyc != K + 1) begin
      failures++;
      $display("done after %0d cycles, expected %0d", cyc, K + 1);
    end
    if (!done1) begin
      failures++;
      $display("the two units finished in different cycles");
    end
    if (ra0 != exp_ra) begin
      failures++;
      $display("RA = %h, expected %h", ra0, exp_ra);
    end
    if (ra1 != ~exp_ra) begin
      failures++;
      $display("RA (NEG_SET=1) = %h, expected %h", ra1, ~exp_ra);
    end
    ones  += $countones(exp_ra);
    zeros += K - $countones(exp_ra);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // observer in front of every plane: RA = FFFFFFFF
    for (int i = 0; i < K; i++) nrm[i] = '{x: coef_t'(2 ** FRAC), y: coef_t'(i * 100), z: '0};
    p_obs = '{x: 0, y: 0, z: 0};
    p_obj = '{x: 1000, y: 1, z: 5};
    run();
    checks++;
    if (ra0 != '1) begin
      failures++;
      $display("all-positive case gave %h", ra0);
    end
    // random
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < K; i++)
        nrm[i] = '{x: coef_t'(srand(2 ** FRAC)), y: coef_t'(srand(2 ** FRAC)),
                   z: coef_t'(srand(2 ** FRAC))};
      if (n % 10 == 0) nrm[n % K] = '{x: 16'sd3, y: -16'sd3, z: 16'sd0};
      p_obs = '{x: srand(2000000000), y: srand(2000000000), z: srand(2000000000)};
      p_obj = '{x: p_obs.x + srand(100000), y: p_obs.y + srand(100000), z: p_obs.z + srand(100000)};
      if (n % 10 == 0) p_obj = '{x: p_obs.x + 7, y: p_obs.y + 7, z: p_obs.z + 9};
      run();
    end
    checks++;
    $display("bits set %0d, bits cleared %0d, S = 0 cases %0d", ones, zeros, zero_s);
    if (ones == 0 || zeros == 0 || zero_s == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
