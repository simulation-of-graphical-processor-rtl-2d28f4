// dlu: detail/loader unit.
//
// Forms the number of the priority list of primitives for one object. The
// object's primitives are pre-sorted into 2**K lists by a topological tree
// of K subdivision planes (one plane per tree level, shared by all nodes of
// that level). The list to use for the current viewpoint is selected by the
// side of each plane the observer is on:
//   S_i = (P_o.x - P_n.x)*N_i.x + (P_o.y - P_n.y)*N_i.y + (P_o.z - P_n.z)*N_i.z
// for i = K-1 down to 0, and bit i of the list number RA is set from the
// sign of S_i. With NEG_SET = 0 (default) a negative S_i clears the bit and a
// non-negative one sets it, as the prose of the description states and as
// its tree figure orders the lists ("<" branches lead to the lower numbers).
// The description's flow charts draw the opposite assignment (S < 0 gives
// RA[i] = 1); NEG_SET = 1 selects that reading. S_i = 0 counts as
// non-negative.
//
// Normals are read from the plane-normal table, one per cycle, through
// n_addr / n_rd with one cycle of read latency (n_data is valid the cycle
// after n_rd). One scalar product is formed per cycle with three
// multipliers.
// Interface: start is sampled while idle with p_obj and p_obs; ra is cleared
// at start and complete when done pulses, K + 1 cycles after the start edge.
module dlu
  import sp_pkg::*;
#(
  parameter int K       = 32,    // planes in the topological tree = bits of RA
  parameter bit NEG_SET = 1'b0   // value written to RA[i] when S_i < 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  vec3_t                  p_obj,   // P_o position
  input  vec3_t                  p_obs,   // P_n position
  output logic [$clog2(K)-1:0]   n_addr,  // plane index i
  output logic                   n_rd,
  input  nvec_t                  n_data,  // N_i, one cycle after n_rd
  output logic                   busy,
  output logic                   done,
  output logic [K-1:0]           ra
);

  localparam int IW  = $clog2(K);
  localparam int DWD = COORD_W + 1;
  localparam int PW  = DWD + COEF_W + 2;

  logic signed [DWD-1:0] d_q [3];
  logic                  iss_on;
  logic [IW-1:0]         iss_idx;
  logic                  pend_v;
  logic [IW-1:0]         pend_idx;
  logic signed [PW-1:0]  s_val;

  assign n_addr = iss_idx;
  assign n_rd   = iss_on;
  assign busy   = iss_on | pend_v;

  // expression (1): scalar product of the position difference and N_i
  assign s_val = PW'(d_q[0]) * PW'(n_data.x) + PW'(d_q[1]) * PW'(n_data.y) +
                 PW'(d_q[2]) * PW'(n_data.z);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_on   <= 1'b0;
      iss_idx  <= '0;
      pend_v   <= 1'b0;
      pend_idx <= '0;
      done     <= 1'b0;
      ra       <= '0;
      for (int i = 0; i < 3; i++) d_q[i] <= '0;
    end else begin
      done   <= 1'b0;
      pend_v <= iss_on;
      pend_idx <= iss_idx;
      if (!busy && start) begin
        d_q[0]  <= DWD'(p_obj.x) - DWD'(p_obs.x);
        d_q[1]  <= DWD'(p_obj.y) - DWD'(p_obs.y);
        d_q[2]  <= DWD'(p_obj.z) - DWD'(p_obs.z);
        ra      <= '0;
        iss_on  <= 1'b1;
        iss_idx <= IW'(K - 1);
      end else if (iss_on) begin
        if (iss_idx == '0) iss_on <= 1'b0;
        else iss_idx <= iss_idx - 1'b1;
      end
      if (pend_v) begin
        ra[pend_idx] <= s_val[PW-1] ? NEG_SET : ~NEG_SET;
        if (pend_idx == '0) done <= 1'b1;
      end
    end
  end

endmodule
