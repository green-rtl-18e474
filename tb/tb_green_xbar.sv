// tb_green_xbar: nine requesters issue random reads and writes, held until
// granted, through the crossbar into four 1536-word banks. Read data returned
// one cycle after the grant is compared with a shadow memory (a read granted
// in the same cycle as a write of the same word sees the old word). Checks
// that no bank serves more than two requests per cycle, that conflicts did
// occur, and the out-of-range error path.
module tb_green_xbar;
  import green_pkg::*;
  localparam int NR = 9, NB = 4, BW = 1536;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, conflicts = 0;

  logic rst_n;
  mem_req_t req [NR];
  logic [NR-1:0] gnt, rvalid;
  logic [15:0] rdata [NR];
  logic err;
  logic [1:0]  b_en [NB], b_we [NB];
  logic [10:0] b_addr [NB][2];
  logic [15:0] b_wdata [NB][2], b_rdata [NB][2];
  bank_pwr_e   pwr [NB];

  green_xbar #(.NREQ(NR), .NBANKS(NB), .BANK_WORDS(BW)) dut (.clk(clk), .rst_n(rst_n), .req(req),
    .gnt(gnt), .rvalid(rvalid), .rdata(rdata), .err(err), .b_en(b_en), .b_we(b_we),
    .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata));
  for (genvar k = 0; k < NB; k++) begin : g_b
    green_data_bank #(.WORDS(BW)) u_b (.clk(clk), .rst_n(rst_n), .pwr(pwr[k]), .en(b_en[k]),
      .we(b_we[k]), .addr(b_addr[k]), .wdata(b_wdata[k]), .rdata(b_rdata[k]));
  end

  logic [15:0] shadow [NB*BW];
  logic [15:0] exp_d [NR];
  logic        exp_v [NR];

  initial begin
    rst_n = 0;
    for (int k = 0; k < NB; k++) pwr[k] = PWR_ON;
    for (int i = 0; i < NR; i++) begin req[i] = '0; exp_v[i] = 0; end
    #12 rst_n = 1;
    // initialise memory through requester 0
    for (int a = 0; a < NB*BW; a++) begin
      @(negedge clk);
      req[0] = '{valid: 1'b1, we: 1'b1, addr: 13'(a), wdata: 16'(a * 7)};
      shadow[a] = 16'(a * 7);
      @(posedge clk);
    end
    @(negedge clk); req[0] = '0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NR; i++)
        if (!req[i].valid && ($urandom % 2)) begin
          req[i].valid = 1;
          req[i].we    = $urandom % 3 == 0;
          // writes only to words owned by the requester; reads concentrated
          // on a few hundred words so that banks collide
          req[i].addr  = req[i].we ? 13'((($urandom % 680) * NR + i) % (NB*BW))
                                   : 13'(($urandom % 4) * BW + $urandom % 64);
          req[i].wdata = 16'($urandom);
        end
      #1;
      // check outputs of this cycle: read data of last cycle's grants
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (rvalid[i] != exp_v[i] || (exp_v[i] && rdata[i] !== exp_d[i])) begin
          failures++;
          if (failures < 10) $display("FAIL req %0d rvalid %0d data %h exp %h", i, rvalid[i], rdata[i], exp_d[i]);
        end
      end
      for (int k = 0; k < NB; k++) begin
        int n;
        n = 0;
        for (int i = 0; i < NR; i++)
          if (gnt[i] && int'(req[i].addr) / BW == k) n++;
        checks++;
        if (n > 2) begin failures++; $display("FAIL bank %0d served %0d", k, n); end
      end
      for (int i = 0; i < NR; i++) if (req[i].valid && !gnt[i]) conflicts++;
      for (int i = 0; i < NR; i++) begin
        exp_v[i] = gnt[i] && !req[i].we;
        exp_d[i] = shadow[req[i].addr];
      end
      for (int i = 0; i < NR; i++) if (gnt[i] && req[i].we) shadow[req[i].addr] = req[i].wdata;
      @(posedge clk); #1;
      for (int i = 0; i < NR; i++) if (gnt[i]) req[i].valid = 0;
    end
    // out-of-range request
    @(negedge clk);
    for (int i = 0; i < NR; i++) req[i] = '0;
    req[3] = '{valid: 1'b1, we: 1'b0, addr: 13'(NB*BW + 5), wdata: 16'd0};
    #1;
    checks++;
    if (!gnt[3] || !err) begin failures++; $display("FAIL out-of-range not flagged"); end
    @(posedge clk); #1; req[3] = '0;
    checks++;
    if (!rvalid[3] || rdata[3] !== 16'd0) begin failures++; $display("FAIL out-of-range read"); end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no bank conflict happened"); end
    $display("conflict cycles: %0d", conflicts);
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
