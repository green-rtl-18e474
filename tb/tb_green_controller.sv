// tb_green_controller: runs the controller for random step counts with the
// column ports' ready signal driven at random. A model of the context memory
// (one-cycle read latency) records which step each ctx_load brings in; the
// testbench checks that the k-th executed step is step k, that exactly
// num_steps steps execute, that done pulses once in the cycle after the
// last, that busy covers the run, and that the cycle and stall counters
// match its own counts. A run of zero steps must finish at once.
module tb_green_controller;
  localparam int D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, start, all_ready;
  logic [4:0] num_steps, pc;
  logic ctx_re, ctx_load, exec, active, busy, done;
  logic [3:0] ctx_raddr;
  logic [31:0] cycles, stalls;

  green_controller #(.DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .num_steps(num_steps), .all_ready(all_ready), .ctx_re(ctx_re), .ctx_raddr(ctx_raddr),
    .ctx_load(ctx_load), .exec(exec), .active(active), .busy(busy), .done(done), .pc(pc),
    .cycles(cycles), .stalls(stalls));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  int fetched, current, execs, n_stall, n_cyc, total_stalls;

  initial begin
    rst_n = 0; start = 0; all_ready = 0; num_steps = 0;
    fetched = -1; current = -1; total_stalls = 0;
    #12 rst_n = 1;
    for (int run = 0; run < 300; run++) begin
      int n, prob, waited;
      bit seen_done;
      n = (run == 0) ? 0 : 1 + int'($urandom % D);
      prob = 1 + int'($urandom % 4);    // ready with probability prob/4
      @(negedge clk);
      chk(!busy, "busy before start");
      num_steps = 5'(n); start = 1; all_ready = 0;
      execs = 0; n_stall = 0; n_cyc = 0; seen_done = 0;
      waited = 0;
      while (!seen_done && waited < 200) begin
        #1;
        if (busy || start) n_cyc++;
        if (active && !all_ready) n_stall++;
        if (exec) begin
          chk(current == execs, $sformatf("exec %0d runs step %0d", execs, current));
          chk(int'(pc) == execs, "pc");
          execs++;
        end
        @(posedge clk);
        // context memory model: the read in this cycle is visible in the next
        if (ctx_load) current = fetched;
        if (ctx_re) fetched = int'(ctx_raddr);
        #1;
        if (done) seen_done = 1;
        start = 0;
        @(negedge clk);
        all_ready = ($urandom % 4) < prob;
        waited++;
      end
      chk(seen_done, "no done");
      chk(execs == n, $sformatf("%0d steps executed, expected %0d", execs, n));
      chk(int'(cycles) == n_cyc, $sformatf("cycles %0d exp %0d", cycles, n_cyc));
      chk(int'(stalls) == n_stall, $sformatf("stalls %0d exp %0d", stalls, n_stall));
      chk(!busy, "busy after done");
      @(posedge clk); #1;
      chk(!done, "done longer than one cycle");
      total_stalls += n_stall;
    end
    chk(total_stalls > 0, "no stall happened");
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
