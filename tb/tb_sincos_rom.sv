// tb_sincos_rom: checks every entry of the sine/cosine ROM against
// round(sin(2*pi*i/N) * 2**FRAC) and round(cos(...)) computed with real
// arithmetic, allowing one LSB, and checks the one-cycle read latency.
module tb_sincos_rom;
  import sp_pkg::*;

  localparam int AW = ANGLE_W;
  localparam int N  = 2 ** AW;

  logic clk = 1'b0;
  logic [AW-1:0] addr;
  coef_t sin_q, cos_q;
  int checks = 0, failures = 0;

  sincos_rom dut (.clk(clk), .addr(addr), .sin_q(sin_q), .cos_q(cos_q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_q(real v);
    return int'($floor(v * real'(2 ** FRAC) + 0.5));
  endfunction

  initial begin
    int es, ec;
    for (int i = 0; i < N; i++) begin
      addr = AW'(i);
      @(posedge clk);
      #1;
      es = ref_q($sin(2.0 * 3.14159265358979 * i / N));
      ec = ref_q($cos(2.0 * 3.14159265358979 * i / N));
      checks += 2;
      if (int'(sin_q) - es > 1 || es - int'(sin_q) > 1) begin
        failures++;
        $display("sin[%0d] = %0d, expected %0d", i, sin_q, es);
      end
      if (int'(cos_q) - ec > 1 || ec - int'(cos_q) > 1) begin
        failures++;
        $display("cos[%0d] = %0d, expected %0d", i, cos_q, ec);
      end
    end
    // latency: output changes only at the clock edge
    addr = AW'(N / 4);
    @(posedge clk);
    #1;
    addr = '0;
    #2;
    checks++;
    if (sin_q != coef_t'(2 ** FRAC)) begin
      failures++;
      $display("registered output changed before the clock edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
