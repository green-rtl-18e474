// tb_green_arbiter: random request patterns on a 9-requester arbiter. Checks
// that at most two and only requesting indices are granted, that as many as
// possible (min(2, requests)) are granted, that the two grants use different
// ports, and fairness: a requester that keeps requesting is granted within
// ceil(9/2) = 5 cycles.
module tb_green_arbiter;
  localparam int N = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [N-1:0] req, gnt, port_of;
  int wait_cnt [N];
  green_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .gnt(gnt), .port_of(port_of));
  initial begin
    rst_n = 0; req = 0;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // keep requests of waiting requesters (they must hold), add random new ones
      req = (req & ~gnt) | (N'($urandom) & N'($urandom));
      #1;
      checks += 4;
      if ((gnt & ~req) != 0) begin failures++; $display("FAIL grant without request"); end
      if ($countones(gnt) != (($countones(req) < 2) ? $countones(req) : 2)) begin
        failures++; $display("FAIL %0d grants for %0d requests", $countones(gnt), $countones(req));
      end
      if ($countones(gnt) == 2 && $countones(port_of & gnt) != 1) begin
        failures++; $display("FAIL both grants on one port");
      end
      for (int i = 0; i < N; i++) begin
        if (req[i] && !gnt[i]) wait_cnt[i]++; else wait_cnt[i] = 0;
        if (wait_cnt[i] >= 5) begin failures++; $display("FAIL requester %0d starved", i); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
