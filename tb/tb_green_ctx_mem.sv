// tb_green_ctx_mem: writes random words into random steps and slots of a
// 16 x 72 context memory, keeps a shadow copy, and checks that a step read
// returns the whole step one cycle later and holds it while re is low.
module tb_green_ctx_mem;
  localparam int D = 16, S = 72;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, we, re;
  logic [3:0] wstep, raddr;
  logic [6:0] wslot;
  logic [31:0] wdata;
  logic [31:0] rdata [S];
  logic [31:0] shadow [D][S];

  green_ctx_mem #(.DEPTH(D), .SLOTS(S)) dut (.clk(clk), .rst_n(rst_n), .we(we), .wstep(wstep),
    .wslot(wslot), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  task automatic check_step(input int st);
    for (int s = 0; s < S; s++) begin
      checks++;
      if (rdata[s] !== shadow[st][s]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d slot %0d: %h exp %h", st, s, rdata[s], shadow[st][s]);
      end
    end
  endtask

  initial begin
    rst_n = 0; we = 0; re = 0; wstep = 0; wslot = 0; wdata = 0; raddr = 0;
    #12 rst_n = 1;
    for (int s = 0; s < S; s++) begin checks++; if (rdata[s] !== 32'd0) failures++; end
    for (int st = 0; st < D; st++)
      for (int s = 0; s < S; s++) begin
        @(negedge clk);
        we = 1; wstep = 4'(st); wslot = 7'(s); wdata = $urandom;
        shadow[st][s] = wdata;
      end
    for (int t = 0; t < 3000; t++) begin
      int st;
      @(negedge clk);
      we = ($urandom % 2) == 1;
      wstep = 4'($urandom); wslot = 7'($urandom % S); wdata = $urandom;
      re = 1; raddr = 4'($urandom);
      st = int'(raddr);
      // a read and a write of the same word in one cycle: the read sees the
      // old word, so the step is compared before the shadow is updated
      @(posedge clk); #1;
      check_step(st);
      if (we) shadow[wstep][wslot] = wdata;
      we = 0; re = 0;
      @(negedge clk);
      if (!(wstep == 4'(st))) check_step(st);   // held while re is low
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
