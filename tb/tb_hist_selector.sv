// tb_hist_selector: exhaustive check over the control inputs with random
// addresses: ADDR follows HS, REQ needs a new reading, an open acquisition
// window and, in fine mode, a reading that passed the filter.
module tb_hist_selector;
  localparam int unsigned NS = 8;
  logic hs, sa_pass, pix_valid, acq, req;
  logic [NS-1:0] ac, sa, addr;
  int checks = 0, failures = 0;

  hist_selector #(.NS(NS)) dut (.*);

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
    for (int n = 0; n < 400; n++) begin
      {hs, sa_pass, pix_valid, acq} = 4'(n);
      ac = NS'($urandom); sa = NS'($urandom);
      #1;
      check(addr == (hs ? sa : ac), "address select");
      check(req == (pix_valid && acq && (hs ? sa_pass : 1'b1)), "request gating");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
