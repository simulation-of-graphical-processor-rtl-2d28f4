// vdu: visibility detection unit.
//
// For one object it
//   1. moves the object centre into the observer coordinate system,
//        {x_con, y_con, z_con} = B * (P_o.xyz - P_n.xyz),
//      where B is the global-to-observer matrix from the matrix formation unit
//      (the object centre is the origin of its own system, so its global
//      position is P_o.xyz);
//   2. forms the sides of the base of the viewing pyramid at depth x_con,
//        A_w = a_w * x_con / d_w,   B_w = b_w * x_con / d_w,
//      with two sequential dividers working in parallel;
//   3. sets the visual flag FV for the bounding sphere of radius R_o:
//        FV = (x_con > d_w - R_o) & (y_con <  B_w/2 + R_o) & (y_con > -B_w/2 - R_o)
//                                 & (z_con <  A_w/2 + R_o) & (z_con > -A_w/2 - R_o).
// The formulas are those of the scene-processor description. To keep the
// halving exact the y/z tests are evaluated doubled (2*y_con < B_w + 2*R_o
// and so on). The divisions truncate toward zero; the transform sums the
// three products and shifts right by FRAC (truncating). x is the depth axis.
//
// Interface: start is sampled while idle, together with all data inputs,
// which are latched. done pulses once with con, a_side, b_side, cond and fv
// valid; they hold until the next start. cond[4:0] are the five terms of
// the condition in the order written above (bit 0 = depth test).
// Timing: done comes NW + 4 = 52 cycles after the start edge (transform,
// divider start, 48 divider cycles, collection, test).
module vdu
  import sp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  vec3_t   p_obj,    // object centre, global coordinates (P_o)
  input  vec3_t   p_obs,    // observer position, global coordinates (P_n)
  input  mat3_t   mat_b,    // global -> observer
  input  win_t    r_o,      // bounding-sphere radius
  input  window_t win,      // a_w, b_w, d_w
  output logic    busy,
  output logic    done,
  output vec3_t   con,      // object centre in observer coordinates
  output side_t   a_side,   // A_w
  output side_t   b_side,   // B_w
  output logic [4:0] cond,
  output logic    fv
);

  localparam int NW = COORD_W + WIN_W;   // dividend width
  localparam int DWD = COORD_W + 1;      // difference width
  localparam int PW = DWD + COEF_W + 2;  // sum-of-products width
  localparam int CW = SIDE_W + 3;        // comparison width

  typedef enum logic [2:0] {S_IDLE, S_XFORM, S_DIVSTART, S_DIVWAIT, S_TEST} state_t;
  state_t state;

  logic signed [DWD-1:0] d_q [3];
  mat3_t   b_q;
  win_t    r_q;
  window_t win_q;

  logic          div_start;
  logic [NW-1:0] dvd_a, dvd_b, quo_a, quo_b;
  logic          busy_a, busy_b, done_a, done_b;
  logic          got_a, got_b;
  logic [COORD_W-1:0] x_mag;

  // one row of B times the difference vector, in observer coordinates
  function automatic coord_t row_mul(mat3_t m, int r, logic signed [DWD-1:0] d0,
                                     logic signed [DWD-1:0] d1,
                                     logic signed [DWD-1:0] d2);
    logic signed [PW-1:0] s;
    s = PW'(m[r][0]) * PW'(d0) + PW'(m[r][1]) * PW'(d1) + PW'(m[r][2]) * PW'(d2);
    return coord_t'(s >>> FRAC);
  endfunction

  assign x_mag = con.x[COORD_W-1] ? COORD_W'(-con.x) : COORD_W'(con.x);
  assign dvd_a = NW'(x_mag) * NW'(win_q.a);
  assign dvd_b = NW'(x_mag) * NW'(win_q.b);
  assign div_start = (state == S_DIVSTART);
  assign busy = (state != S_IDLE);

  udiv #(.NW(NW), .DW(WIN_W)) u_div_a (
    .clk, .rst_n, .start(div_start), .dividend(dvd_a), .divisor(win_q.d),
    .busy(busy_a), .done(done_a), .quotient(quo_a)
  );
  udiv #(.NW(NW), .DW(WIN_W)) u_div_b (
    .clk, .rst_n, .start(div_start), .dividend(dvd_b), .divisor(win_q.d),
    .busy(busy_b), .done(done_b), .quotient(quo_b)
  );

  // the dividers must be idle whenever a new division is started
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               div_start |-> !busy_a && !busy_b);

  // visibility terms, all in CW-bit signed arithmetic
  logic signed [CW-1:0] xc, yc2, zc2, aw, bw, r2, dmr;
  logic [4:0] cond_c;
  assign xc  = CW'(con.x);
  assign yc2 = CW'(con.y) <<< 1;
  assign zc2 = CW'(con.z) <<< 1;
  assign aw  = CW'(a_side);
  assign bw  = CW'(b_side);
  assign r2  = CW'({1'b0, r_q}) <<< 1;
  assign dmr = CW'({1'b0, win_q.d}) - CW'({1'b0, r_q});
  assign cond_c[0] = xc > dmr;
  assign cond_c[1] = yc2 < bw + r2;
  assign cond_c[2] = yc2 > -bw - r2;
  assign cond_c[3] = zc2 < aw + r2;
  assign cond_c[4] = zc2 > -aw - r2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      con    <= '0;
      a_side <= '0;
      b_side <= '0;
      cond   <= '0;
      fv     <= 1'b0;
      b_q    <= '0;
      r_q    <= '0;
      win_q  <= '0;
      got_a  <= 1'b0;
      got_b  <= 1'b0;
      for (int i = 0; i < 3; i++) d_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          d_q[0] <= DWD'(p_obj.x) - DWD'(p_obs.x);
          d_q[1] <= DWD'(p_obj.y) - DWD'(p_obs.y);
          d_q[2] <= DWD'(p_obj.z) - DWD'(p_obs.z);
          b_q    <= mat_b;
          r_q    <= r_o;
          win_q  <= win;
          state  <= S_XFORM;
        end
        S_XFORM: begin
          con.x <= row_mul(b_q, 0, d_q[0], d_q[1], d_q[2]);
          con.y <= row_mul(b_q, 1, d_q[0], d_q[1], d_q[2]);
          con.z <= row_mul(b_q, 2, d_q[0], d_q[1], d_q[2]);
          state <= S_DIVSTART;
        end
        S_DIVSTART: begin
          got_a <= 1'b0;
          got_b <= 1'b0;
          state <= S_DIVWAIT;
        end
        S_DIVWAIT: begin
          if (done_a) begin
            a_side <= con.x[COORD_W-1] ? -SIDE_W'(quo_a) : SIDE_W'(quo_a);
            got_a  <= 1'b1;
          end
          if (done_b) begin
            b_side <= con.x[COORD_W-1] ? -SIDE_W'(quo_b) : SIDE_W'(quo_b);
            got_b  <= 1'b1;
          end
          if ((got_a || done_a) && (got_b || done_b)) state <= S_TEST;
        end
        S_TEST: begin
          cond  <= cond_c;
          fv    <= &cond_c;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
