// tb_tof_adder: ToF = fine peak + DELTA for random operands in range, plus
// the worked example 169 + 1920 = 2089.
module tb_tof_adder;
  localparam int unsigned NP = 15, NS = 8;
  logic [NS-1:0] pnoc_f;
  logic [NP-1:0] delta, tof;
  int checks = 0, failures = 0;

  tof_adder #(.NP(NP), .NS(NS)) dut (.*);

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
    pnoc_f = 169; delta = 1920; #1;
    check(tof == 2089, "worked example");
    for (int n = 0; n < 2000; n++) begin
      pnoc_f = NS'($urandom);
      delta = NP'($urandom_range(0, 32767 - 255));
      #1;
      check(int'(tof) == int'(pnoc_f) + int'(delta), "sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
