// tb_hist_bram: random single-port traffic against an array model; checks
// the one-clock read latency, read-before-write data on a write, and that a
// disabled clock leaves the output unchanged.
module tb_hist_bram;
  localparam int unsigned AW = 8, DW = 12;
  logic clk = 0, en, we;
  logic [AW-1:0] addr;
  logic [DW-1:0] di, dout;
  logic [DW-1:0] model [1 << AW];
  logic [DW-1:0] exp_do;
  int checks = 0, failures = 0;

  hist_bram #(.AW(AW), .DW(DW)) dut (.*);

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
    en = 1; we = 1; di = '0;
    // fill every word first so the model is known
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      addr = AW'(a); di = DW'($urandom); model[a] = di;
    end
    @(negedge clk);
    en = 0; we = 0;
    @(negedge clk);
    exp_do = dout;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      we = 1'($urandom);
      addr = AW'($urandom);
      di = DW'($urandom);
      if (en) begin
        exp_do = model[addr];
        if (we) model[addr] = di;
      end
      @(posedge clk); #1;
      check(dout == exp_do, $sformatf("dout %h expected %h", dout, exp_do));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
