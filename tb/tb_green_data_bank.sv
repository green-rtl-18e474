// tb_green_data_bank: random reads and writes on both ports of one bank,
// checked against a shadow array (one-cycle read latency, port 1 wins a
// same-word write conflict), then the power states: retention keeps the
// contents but blocks access, off loses them (reads 0 until rewritten).
module tb_green_data_bank;
  import green_pkg::*;
  localparam int W = 1536;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  bank_pwr_e pwr;
  logic [1:0] en, we;
  logic [10:0] addr [2];
  logic [15:0] wdata [2], rdata [2];
  green_data_bank #(.WORDS(W)) dut (.clk(clk), .rst_n(rst_n), .pwr(pwr), .en(en), .we(we),
    .addr(addr), .wdata(wdata), .rdata(rdata));

  logic [15:0] shadow [W];
  logic [15:0] exp_r [2];
  logic        chk_r [2];

  task automatic idle();
    en = 0; we = 0;
  endtask

  initial begin
    rst_n = 0; pwr = PWR_ON; idle();
    addr[0] = 0; addr[1] = 0; wdata[0] = 0; wdata[1] = 0;
    for (int i = 0; i < W; i++) shadow[i] = 0;
    #12 rst_n = 1;
    // fill
    for (int i = 0; i < W; i += 2) begin
      @(negedge clk);
      en = 2'b11; we = 2'b11; addr[0] = 11'(i); addr[1] = 11'(i + 1);
      wdata[0] = 16'($urandom); wdata[1] = 16'($urandom);
      shadow[i] = wdata[0]; shadow[i + 1] = wdata[1];
    end
    @(negedge clk); idle();
    // random traffic
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        en[p] = $urandom % 4 != 0; we[p] = $urandom % 2;
        addr[p] = 11'($urandom % W); wdata[p] = 16'($urandom);
        if (t % 50 == 0) addr[p] = 11'(t % W);   // same word on both ports
        chk_r[p] = en[p] && !we[p];
        exp_r[p] = shadow[addr[p]];
      end
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) if (en[p] && we[p]) shadow[addr[p]] = wdata[p];
      for (int p = 0; p < 2; p++)
        if (chk_r[p]) begin
          checks++;
          if (rdata[p] !== exp_r[p]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d addr %0d got %h exp %h", p, addr[p], rdata[p], exp_r[p]);
          end
        end
    end
    // retention: write ignored, read returns 0, contents kept
    @(negedge clk); pwr = PWR_RET; en = 2'b11; we = 2'b01; addr[0] = 5; addr[1] = 6; wdata[0] = 16'hdead;
    @(posedge clk); #1;
    checks++; if (rdata[1] !== 16'd0) begin failures++; $display("FAIL retention read %h", rdata[1]); end
    @(negedge clk); pwr = PWR_ON; en = 2'b01; we = 2'b00; addr[0] = 5;
    @(posedge clk); #1;
    checks++; if (rdata[0] !== shadow[5]) begin failures++; $display("FAIL retention lost data %h", rdata[0]); end
    // off: contents lost
    @(negedge clk); idle(); pwr = PWR_OFF;
    @(negedge clk); pwr = PWR_ON; en = 2'b11; we = 2'b10; addr[0] = 5; addr[1] = 7; wdata[1] = 16'h1234;
    @(posedge clk); #1;
    checks++; if (rdata[0] !== 16'd0) begin failures++; $display("FAIL off kept data %h", rdata[0]); end
    @(negedge clk); en = 2'b01; we = 2'b00; addr[0] = 7;
    @(posedge clk); #1;
    checks++; if (rdata[0] !== 16'h1234) begin failures++; $display("FAIL write after off %h", rdata[0]); end
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
