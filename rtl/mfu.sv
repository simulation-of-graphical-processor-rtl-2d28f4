// mfu: matrix formation unit.
//
// Builds the two rotation matrices the scene processor needs for one object:
//   A - from the object's coordinate system to the global one, formed from
//       the angles {psi, theta, gamma} of the object's position vector P_o;
//   B - from the global coordinate system to the observer's, formed from the
//       angles of the observer's position vector P_n.
// As the scene-processor description says, the angles are used as pointers
// into a sine/cosine ROM; the values read are kept in registers and the
// matrix coefficients are then formed from them.
//
// Rotation convention (this design's choice): psi turns about z, theta about
// y, gamma about x, and R = Rz(psi) * Ry(theta) * Rx(gamma). A = R(object
// angles); B = transpose(R(observer angles)), the inverse rotation. Each
// triple product is formed as ((a*b) >>> FRAC) * c >>> FRAC, truncating.
//
// Timing: start is sampled in IDLE. The six angles are presented to the ROM
// in the six following cycles, the sines and cosines arrive one cycle later,
// and mat_a / mat_b are registered with a one-cycle done pulse 8 cycles after
// start. busy is high from the cycle after start until done.
module mfu
  import sp_pkg::*;
#(
  parameter int AW = ANGLE_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  ang3_t ang_obj,   // angles of P_o
  input  ang3_t ang_obs,   // angles of P_n
  output logic  busy,
  output logic  done,
  output mat3_t mat_a,
  output mat3_t mat_b
);

  // index 0..2: object psi, theta, gamma; 3..5: observer psi, theta, gamma
  angle_t       ang_q [6];
  coef_t        s_q   [6];
  coef_t        c_q   [6];
  logic [3:0]   step;
  angle_t       rom_addr;
  coef_t        rom_sin, rom_cos;

  sincos_rom #(.AW(AW), .DW(COEF_W), .FRAC(FRAC)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .sin_q(rom_sin),
    .cos_q(rom_cos)
  );

  function automatic coef_t qmul(coef_t a, coef_t b);
    logic signed [2*COEF_W-1:0] p;
    p = a * b;
    return coef_t'(p >>> FRAC);
  endfunction

  function automatic mat3_t rot(coef_t sp, coef_t cp, coef_t st, coef_t ct,
                                coef_t sg, coef_t cg);
    mat3_t m;
    m[0][0] = qmul(cp, ct);
    m[0][1] = qmul(qmul(cp, st), sg) - qmul(sp, cg);
    m[0][2] = qmul(qmul(cp, st), cg) + qmul(sp, sg);
    m[1][0] = qmul(sp, ct);
    m[1][1] = qmul(qmul(sp, st), sg) + qmul(cp, cg);
    m[1][2] = qmul(qmul(sp, st), cg) - qmul(cp, sg);
    m[2][0] = -st;
    m[2][1] = qmul(ct, sg);
    m[2][2] = qmul(ct, cg);
    return m;
  endfunction

  function automatic mat3_t transpose(mat3_t m);
    mat3_t t;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        t[r][c] = m[c][r];
    return t;
  endfunction

  assign rom_addr = (step >= 4'd1 && step <= 4'd6) ? ang_q[3'(step - 4'd1)] : '0;
  assign busy     = (step != 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step  <= '0;
      done  <= 1'b0;
      mat_a <= '0;
      mat_b <= '0;
      for (int i = 0; i < 6; i++) begin
        ang_q[i] <= '0;
        s_q[i]   <= '0;
        c_q[i]   <= '0;
      end
    end else begin
      done <= 1'b0;
      if (step == 4'd0) begin
        if (start) begin
          ang_q[0] <= ang_obj.psi;
          ang_q[1] <= ang_obj.theta;
          ang_q[2] <= ang_obj.gamma;
          ang_q[3] <= ang_obs.psi;
          ang_q[4] <= ang_obs.theta;
          ang_q[5] <= ang_obs.gamma;
          step     <= 4'd1;
        end
      end else if (step <= 4'd7) begin
        // ROM data for the angle presented in step-1 is valid in step
        if (step >= 4'd2) begin
          s_q[3'(step - 4'd2)] <= rom_sin;
          c_q[3'(step - 4'd2)] <= rom_cos;
        end
        step <= step + 4'd1;
      end else begin
        mat_a <= rot(s_q[0], c_q[0], s_q[1], c_q[1], s_q[2], c_q[2]);
        mat_b <= transpose(rot(s_q[3], c_q[3], s_q[4], c_q[4], s_q[5], c_q[5]));
        done  <= 1'b1;
        step  <= 4'd0;
      end
    end
  end

endmodule
