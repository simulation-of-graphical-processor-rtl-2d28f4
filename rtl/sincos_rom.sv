// sincos_rom: sine and cosine table addressed by an angle.
//
// The matrix formation unit uses an angle as a table pointer and reads its
// sine and cosine from a ROM; this module is that ROM. It holds one full
// period of sin() with 2**AW entries; the cosine is read from the same table
// a quarter period further on, so one address gives both values in the same
// cycle through two read ports.
//
// Table contents: entry i = round(sin(2*pi*i / 2**AW) * 2**FRAC). They are
// computed at elaboration by a fixed-point Taylor series (terms up to x**17,
// argument folded into the first quadrant), so no data file is needed.
//
// Interface: addr is the angle (fraction of a full turn). sin_q and cos_q are
// registered: they hold the values for the addr of the previous clock edge.
// The table size and number format are this design's choice; the text only
// says that sin and cos come from a ROM.
module sincos_rom #(
  parameter int AW   = sp_pkg::ANGLE_W,
  parameter int DW   = sp_pkg::COEF_W,
  parameter int FRAC = sp_pkg::FRAC
) (
  input  logic                 clk,
  input  logic [AW-1:0]        addr,
  output logic signed [DW-1:0] sin_q,
  output logic signed [DW-1:0] cos_q
);

  localparam int N = 2 ** AW;
  localparam longint PI_Q28 = 64'd843314857;  // round(pi * 2**28)

  // sin(2*pi*i/N) * 2**FRAC, rounded to nearest
  function automatic logic signed [DW-1:0] sin_fx(int i);
    int     quad;
    int     r;
    longint x;
    longint x2;
    longint term;
    longint sum;
    longint mag;
    quad = (i / (N / 4)) % 4;
    r    = i % (N / 4);
    if (quad % 2 == 1) r = N / 4 - r;
    x    = (longint'(r) * 2 * PI_Q28) / longint'(N);  // radians, 28 fraction bits
    x2   = (x * x) >>> 28;
    term = x;
    sum  = x;
    for (int n = 1; n <= 8; n++) begin
      term = -((term * x2) >>> 28) / longint'(2 * n * (2 * n + 1));
      sum  = sum + term;
    end
    mag = (sum * (longint'(1) <<< FRAC) + (longint'(1) <<< 27)) >>> 28;
    return (quad >= 2) ? DW'(-mag) : DW'(mag);
  endfunction

  logic signed [DW-1:0] table_q [N];

  initial begin
    for (int i = 0; i < N; i++) table_q[i] = sin_fx(i);
  end

  always_ff @(posedge clk) begin
    sin_q <= table_q[addr];
    cos_q <= table_q[AW'(addr + AW'(N / 4))];
  end

endmodule
