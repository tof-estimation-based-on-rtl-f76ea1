// tb_clear_counter: a sweep presents 0..255 on consecutive clocks with LAST
// only on 255, lasts exactly 256 clocks, and restarts from 0 after EN drops.
module tb_clear_counter;
  localparam int unsigned AW = 8;
  logic clk = 0, rst, en, last;
  logic [AW-1:0] cnt;
  int checks = 0, failures = 0;

  clear_counter #(.AW(AW)) dut (.*);

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
    int n;
    rst = 1; en = 0;
    @(negedge clk); rst = 0;
    for (int s = 0; s < 5; s++) begin
      @(negedge clk); en = 1;
      n = 0;
      do begin
        #1;
        check(int'(cnt) == n, $sformatf("cnt %0d expected %0d", cnt, n));
        check(last == (n == (1 << AW) - 1), "last flag");
        n++;
        @(negedge clk);
      end while (!(n == (1 << AW)));
      check(n == 256, "sweep length 256 clocks");
      en = 0;
      repeat ($urandom_range(1, 5)) @(negedge clk);
      // partial sweep, then abort
      en = 1; repeat (s * 7 + 1) @(negedge clk); en = 0;
      @(negedge clk);
      #1 check(cnt == 0 && !last, "counter returns to 0 with EN low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
