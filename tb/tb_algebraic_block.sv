// tb_algebraic_block: all 256 coarse peaks. Expected values are written
// directly from the window definition: TH+ = 128x + 128 and TH- = 128x - 128,
// replaced by the fixed windows (0, 256) and (32511, 32767) at
// the two end bins, and DELTA equal to TH+ - 256.
// Includes the worked example x = 16 -> 2176 / 1920 / 1920, and checks that
// the outputs hold while LOAD is low.
module tb_algebraic_block;
  localparam int unsigned NP = 15, NS = 8;
  logic clk = 0, rst = 1, load = 0;
  logic [NS-1:0] x_pc = '0;
  logic [NP-1:0] th_lo, th_hi, delta;
  int checks = 0, failures = 0;

  algebraic_block #(.NP(NP), .NS(NS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, hi;
    @(negedge clk); rst = 0;
    for (int x = 0; x < 256; x++) begin
      @(negedge clk);
      x_pc = NS'(x); load = 1;
      @(negedge clk);
      load = 0; x_pc = NS'($urandom);
      hi = x * 128 + 128;
      lo = x * 128 - 128;
      if (x == 0)   begin lo = 0;     hi = 256;   end
      if (x == 255) begin lo = 32511; hi = 32767; end
      check(int'(th_hi) == hi, $sformatf("x=%0d TH+ %0d expected %0d", x, th_hi, hi));
      check(int'(th_lo) == lo, $sformatf("x=%0d TH- %0d expected %0d", x, th_lo, lo));
      check(int'(delta) == hi - 256, $sformatf("x=%0d delta %0d expected %0d", x, delta, hi - 256));
      if (x == 16) check(th_hi == 2176 && th_lo == 1920 && delta == 1920, "worked example x=16");
      @(negedge clk);
      check(int'(th_hi) == hi && int'(delta) == hi - 256, "held while LOAD low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
