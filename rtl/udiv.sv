// udiv: sequential unsigned restoring divider.
//
// Computes quotient = dividend / divisor (truncating) one quotient bit per
// clock, most significant bit first. start is sampled when the divider is
// idle; done pulses NW cycles later with the quotient valid, and the
// quotient holds until the next start. Division by zero gives all ones.
// Used by the visibility detection unit to form the viewing-pyramid sides;
// the algorithm is this design's choice.
module udiv #(
  parameter int NW = 48,   // dividend and quotient width
  parameter int DW = 16    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient
);

  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] num_q;
  logic [DW-1:0] den_q;
  logic [DW-1:0] rem_q;
  logic          qbit;
  logic [CW-1:0] cnt_q;
  logic [DW:0]   rem_sh;
  logic [DW:0]   diff;

  assign rem_sh = {rem_q, num_q[NW-1]};
  assign diff   = rem_sh - {1'b0, den_q};
  assign qbit   = ~diff[DW] | (den_q == '0);
  assign busy   = (cnt_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q    <= '0;
      den_q    <= '0;
      rem_q    <= '0;
      cnt_q    <= '0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (cnt_q == '0) begin
        if (start) begin
          num_q <= dividend;
          den_q <= divisor;
          rem_q <= '0;
          cnt_q <= CW'(NW);
        end
      end else begin
        num_q <= {num_q[NW-2:0], qbit};
        rem_q <= diff[DW] ? rem_sh[DW-1:0] : diff[DW-1:0];
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          done     <= 1'b1;
          quotient <= {num_q[NW-2:0], qbit};
        end
      end
    end
  end

endmodule
