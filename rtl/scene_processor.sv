// scene_processor: the scene manager of a real-time image generator.
//
// The scene processor is the first stage of the rendering pipeline (scene,
// geometry, rasterisation and video processors). For each object of the
// data base it
//   - reads the object's position vector P_o = {x, y, z, psi, theta, gamma}
//     and bounding-sphere radius R_o from the object table;
//   - has the matrix formation unit (mfu) build matrix A (object -> global)
//     from P_o's angles and matrix B (global -> observer) from the angles of
//     the observer's vector P_n;
//   - has the visibility detection unit (vdu) move the object centre into
//     observer coordinates and set the visual flag FV against the viewing
//     pyramid of the window (a_w, b_w, d_w);
//   - for a visible object, has the detail/loader unit (dlu) compute the
//     priority-list number RA from the K subdivision-plane normals of the
//     object, read from the plane-normal table;
//   - hands the result to the next processor unit over a valid/ready port.
// The chain MFU -> VDU -> DLU, the data base and the formulas follow the
// description of the scene processor. Running the units one after another
// per object, the table layout, the host write ports, skipping the list
// computation for invisible objects (RA = 0 is then sent) and the output
// handshake are this design's choices.
//
// Interface: the host fills the tables through obj_* and nrm_* (normal i of
// object n at address n*K + i) while the processor is idle, sets p_obs, win
// and num_obj (1..N_OBJ; larger values are taken as N_OBJ) and pulses
// start. One record per object, in table order, leaves on out_*: out_valid stays high and the record stable until
// out_ready is seen high. out_cond gives the five terms of the visibility
// condition (see vdu). done pulses after the last record is taken; busy
// is high in between.
// Timing per object with out_ready held high: K + 70 cycles for a visible
// object (102 for K = 32) and 67 for an invisible one: 2 cycles of table
// read, 8 in the MFU, 52 in the VDU, K + 1 in the DLU, one hand-over cycle
// per unit and one for the output.
module scene_processor
  import sp_pkg::*;
#(
  parameter int K       = 32,   // subdivision planes per object = bits of RA (power of 2)
  parameter int N_OBJ   = 64,   // objects in the data base
  parameter bit NEG_SET = 1'b0  // RA bit written for a negative scalar product
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host access to the object table
  input  logic                          obj_we,
  input  logic [$clog2(N_OBJ)-1:0]      obj_waddr,
  input  obj_rec_t                      obj_wdata,
  // host access to the plane-normal table
  input  logic                          nrm_we,
  input  logic [$clog2(N_OBJ*K)-1:0]    nrm_waddr,
  input  nvec_t                         nrm_wdata,
  // frame set-up
  input  posvec_t                       p_obs,     // observer P_n
  input  window_t                       win,
  input  logic [$clog2(N_OBJ+1)-1:0]    num_obj,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // to the next processor unit
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [$clog2(N_OBJ)-1:0]      out_id,
  output logic                          out_fv,
  output logic [K-1:0]                  out_ra,
  output mat3_t                         out_a,
  output mat3_t                         out_b,
  output vec3_t                         out_con,
  output side_t                         out_aw,
  output side_t                         out_bw,
  output logic [4:0]                    out_cond   // terms of the visibility condition
);

  localparam int OAW = $clog2(N_OBJ);
  localparam int KW  = $clog2(K);
  localparam int NAW = $clog2(N_OBJ * K);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_GET, S_MFU, S_VDU, S_DLU, S_OUT
  } state_t;
  state_t state;

  logic [OAW-1:0]           idx;
  logic [$clog2(N_OBJ+1)-1:0] cnt_q;
  posvec_t                  obs_q;
  window_t                  win_q;
  obj_rec_t                 rec_q, obj_rdata;
  logic                     obj_re;

  logic                     mfu_start, mfu_busy, mfu_done;
  logic                     vdu_start, vdu_busy, vdu_done, vdu_fv;
  logic                     dlu_start, dlu_busy, dlu_done, dlu_rd;
  logic [KW-1:0]            dlu_addr;
  nvec_t                    nrm_rdata;
  logic [K-1:0]             dlu_ra;

  data_base #(.T(obj_rec_t), .DEPTH(N_OBJ)) u_obj_db (
    .clk, .we(obj_we), .waddr(obj_waddr), .wdata(obj_wdata),
    .re(obj_re), .raddr(idx), .rdata(obj_rdata)
  );

  data_base #(.T(nvec_t), .DEPTH(N_OBJ * K)) u_nrm_db (
    .clk, .we(nrm_we), .waddr(nrm_waddr), .wdata(nrm_wdata),
    .re(dlu_rd), .raddr(NAW'({idx, dlu_addr})), .rdata(nrm_rdata)
  );

  mfu u_mfu (
    .clk, .rst_n, .start(mfu_start), .ang_obj(rec_q.p.ang), .ang_obs(obs_q.ang),
    .busy(mfu_busy), .done(mfu_done), .mat_a(out_a), .mat_b(out_b)
  );

  vdu u_vdu (
    .clk, .rst_n, .start(vdu_start), .p_obj(rec_q.p.pos), .p_obs(obs_q.pos),
    .mat_b(out_b), .r_o(rec_q.r), .win(win_q), .busy(vdu_busy), .done(vdu_done),
    .con(out_con), .a_side(out_aw), .b_side(out_bw), .cond(out_cond), .fv(vdu_fv)
  );

  dlu #(.K(K), .NEG_SET(NEG_SET)) u_dlu (
    .clk, .rst_n, .start(dlu_start), .p_obj(rec_q.p.pos), .p_obs(obs_q.pos),
    .n_addr(dlu_addr), .n_rd(dlu_rd), .n_data(nrm_rdata), .busy(dlu_busy),
    .done(dlu_done), .ra(dlu_ra)
  );

  assign obj_re    = (state == S_LOAD);
  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_id    = idx;
  assign out_fv    = vdu_fv;
  assign out_ra    = vdu_fv ? dlu_ra : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      cnt_q     <= '0;
      obs_q     <= '0;
      win_q     <= '0;
      rec_q     <= '0;
      done      <= 1'b0;
      mfu_start <= 1'b0;
      vdu_start <= 1'b0;
      dlu_start <= 1'b0;
    end else begin
      done      <= 1'b0;
      mfu_start <= 1'b0;
      vdu_start <= 1'b0;
      dlu_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          cnt_q <= (32'(num_obj) > N_OBJ) ? ($clog2(N_OBJ+1))'(N_OBJ) : num_obj;
          obs_q <= p_obs;
          win_q <= win;
          if (num_obj == '0) done <= 1'b1;
          else state <= S_LOAD;
        end
        S_LOAD: state <= S_GET;             // object-table read in flight
        S_GET: begin
          rec_q     <= obj_rdata;
          mfu_start <= 1'b1;
          state     <= S_MFU;
        end
        S_MFU: if (mfu_done) begin
          vdu_start <= 1'b1;
          state     <= S_VDU;
        end
        S_VDU: if (vdu_done) begin
          if (vdu_fv) begin
            dlu_start <= 1'b1;
            state     <= S_DLU;
          end else begin
            state <= S_OUT;
          end
        end
        S_DLU: if (dlu_done) state <= S_OUT;
        S_OUT: if (out_ready) begin
          if (32'(idx) + 1 >= 32'(cnt_q)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // output record is held while the next unit stalls
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_ra) && $stable(out_con) && $stable(out_id));
  // a unit is only started when it is idle
  a_units_idle: assert property (@(posedge clk) disable iff (!rst_n)
    !(mfu_start && mfu_busy) && !(vdu_start && vdu_busy) && !(dlu_start && dlu_busy));
  // the tables are written only while the processor is idle
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (obj_we || nrm_we) |-> state == S_IDLE);

endmodule
