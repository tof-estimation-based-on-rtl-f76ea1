// tb_s2p: sends random 15-bit readings MSB first with WS on the last bit and
// random gaps, and checks PIXV, the one-clock PIX_VALID strobe, its one-clock
// latency after the LSB, and that PIXV holds still between readings.
module tb_s2p;
  localparam int unsigned NP = 15;
  logic clk = 0, rst = 1, sd = 0, ws = 0;
  logic [NP-1:0] pixv;
  logic pix_valid;
  int checks = 0, failures = 0;

  s2p #(.NP(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [NP-1:0] v, prev;
    repeat (3) @(negedge clk);
    rst = 0;
    prev = '0;
    for (int n = 0; n < 300; n++) begin
      v = NP'($urandom);
      if (n == 0) v = '1;
      if (n == 1) v = '0;
      for (int b = NP - 1; b >= 0; b--) begin
        @(negedge clk);
        sd = v[b];
        ws = (b == 0);
        if (b != 0) begin
          check(!pix_valid || b == NP - 1, "no strobe inside a word");
          check(pixv == prev, "PIXV holds between words");
        end
      end
      @(negedge clk);
      ws = 0;
      sd = 1'($urandom);
      check(pix_valid, "strobe one clock after the LSB");
      check(pixv == v, $sformatf("pixv %h expected %h", pixv, v));
      prev = v;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(!pix_valid, "strobe lasts one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
