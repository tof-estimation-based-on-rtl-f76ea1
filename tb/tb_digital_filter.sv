// tb_digital_filter: drives random and boundary readings against windows
// built from random coarse peaks and checks PASS (both bounds excluded, only
// with EN high) and the shifted address SA = PIXV - DELTA.
module tb_digital_filter;
  localparam int unsigned NP = 15, NS = 8;
  logic en;
  logic [NP-1:0] pixv, th_lo, th_hi, delta;
  logic [NS-1:0] sa;
  logic pass;
  int checks = 0, failures = 0;

  digital_filter #(.NP(NP), .NS(NS)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, lo, hi, p;
    bit exp_pass;
    for (int n = 0; n < 3000; n++) begin
      x = $urandom_range(1, 254);
      lo = x * 128 - 128;
      hi = x * 128 + 128;
      case (n % 6)
        0: p = lo;
        1: p = hi;
        2: p = lo + 1;
        3: p = hi - 1;
        default: p = $urandom_range(0, 32767);
      endcase
      en = (n % 7 != 0);
      th_lo = NP'(lo); th_hi = NP'(hi); delta = NP'(lo); pixv = NP'(p);
      #1;
      exp_pass = en && p > lo && p < hi;
      check(pass == exp_pass, $sformatf("pass x=%0d p=%0d en=%0d", x, p, en));
      if (exp_pass) check(int'(sa) == p - lo, $sformatf("sa %0d for p=%0d lo=%0d", sa, p, lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
