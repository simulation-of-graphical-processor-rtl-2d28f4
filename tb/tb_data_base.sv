// tb_data_base: writes random object records into the data base RAM, reads
// them back in a shuffled order and checks the data, the one-cycle read
// latency, that rdata holds while re is low, and that a write does not
// disturb other words.
module tb_data_base;
  import sp_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr, raddr;
  obj_rec_t wdata, rdata;
  obj_rec_t model [DEPTH];
  int checks = 0, failures = 0;

  data_base #(.T(obj_rec_t), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic obj_rec_t rnd_rec();
    obj_rec_t r;
    r.p.pos = '{x: coord_t'($urandom), y: coord_t'($urandom), z: coord_t'($urandom)};
    r.p.ang = '{psi: angle_t'($urandom), theta: angle_t'($urandom), gamma: angle_t'($urandom)};
    r.r = win_t'($urandom);
    return r;
  endfunction

  task automatic read_check(int a);
    @(negedge clk);
    re = 1'b1;
    raddr = AW'(a);
    @(negedge clk);
    re = 1'b0;
    checks++;
    if (rdata != model[a]) begin
      failures++;
      $display("word %0d read wrong", a);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = AW'(i);
      wdata = rnd_rec();
      model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 3 * DEPTH; n++) read_check(int'($urandom_range(DEPTH - 1)));
    // rdata holds while re is low
    read_check(5);
    raddr = AW'(6);
    @(negedge clk);
    checks++;
    if (rdata != model[5]) begin
      failures++;
      $display("rdata changed without re");
    end
    // overwrite one word, neighbours unchanged
    @(negedge clk);
    we = 1'b1;
    waddr = AW'(10);
    wdata = rnd_rec();
    model[10] = wdata;
    @(negedge clk) we = 1'b0;
    for (int a = 9; a <= 11; a++) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
