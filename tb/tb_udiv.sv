// tb_udiv: checks the sequential divider against the / operator on random
// and corner-case operands (divisor 1, dividend 0, all-ones dividend,
// divisor larger than the dividend, divisor 0 giving all ones) and checks
// that done comes NW cycles after start.
module tb_udiv;

  localparam int NW = 48;
  localparam int DW = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [NW-1:0] dividend, quotient;
  logic [DW-1:0] divisor;
  logic          busy, done;
  int            checks = 0, failures = 0;

  udiv #(.NW(NW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [NW-1:0] n, logic [DW-1:0] d);
    logic [NW-1:0] e;
    int cyc;
    e = (d == '0) ? '1 : n / NW'(d);
    dividend = n;
    divisor  = d;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (!busy) begin
        failures++;
        $display("busy low during a division");
      end
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (cyc != NW) begin
      failures++;
      $display("done after %0d cycles", cyc);
    end
    if (quotient != e) begin
      failures++;
      $display("%0d / %0d = %0d, expected %0d", n, d, quotient, e);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(48'd12345678, 16'd1);
    run(48'd0, 16'd77);
    run('1, 16'd3);
    run('1, '1);
    run(48'd100, 16'd1000);
    run(48'd5, 16'd0);
    for (int i = 0; i < 300; i++)
      run(NW'({$urandom, $urandom} >> $urandom_range(47)), DW'($urandom_range(1, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
