// tb_reset_memory: random writes set flags, RST clears all of them; SEL is
// compared with a bit-array model at random addresses.
module tb_reset_memory;
  localparam int unsigned AW = 8;
  logic clk = 0, rst, wen, sel;
  logic [AW-1:0] addr;
  bit model [1 << AW];
  int checks = 0, failures = 0;

  reset_memory #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wen = 0; addr = '0;
    @(negedge clk);
    foreach (model[i]) model[i] = 0;
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      addr = AW'($urandom);
      #1;
      check(sel == model[addr], $sformatf("sel at %0d", addr));
      rst = (n % 1500 == 1499);
      wen = !rst && ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (rst) foreach (model[i]) model[i] = 0;
      else if (wen) model[addr] = 1;
    end
    // after a reset every flag reads 0
    @(negedge clk); rst = 1; wen = 0;
    @(negedge clk); rst = 0;
    for (int a = 0; a < (1 << AW); a++) begin
      addr = AW'(a); #1;
      check(!sel, "flag clear after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
