// green_xbar: crossbar between the memory requesters and the banks of the
// shared data memory.
//
// NREQ requesters (the array's column ports and the host port) each present
// one green_pkg::mem_req_t. The bank of a request is its word address divided
// by BANK_WORDS, so each bank holds one contiguous quarter of the address
// space and can be powered down on its own. Per bank a green_arbiter grants
// up to two requests per cycle, one to each bank port. A granted request
// sees gnt high in that cycle; for a read, rvalid and rdata follow in the
// next cycle. Requests beyond the last bank are granted at once, do not
// access memory, read 0 and raise err for one cycle.
//
// The crossbar between array and banks, the arbiter and the dual-ported
// banks follow the architecture; the contiguous bank mapping and the
// request/grant protocol are this design's choices.
module green_xbar
  import green_pkg::*;
#(
  parameter int unsigned NREQ       = 9,
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BANK_WORDS = 1536
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  mem_req_t                      req   [NREQ],
  output logic [NREQ-1:0]               gnt,
  output logic [NREQ-1:0]               rvalid,
  output logic [15:0]                   rdata [NREQ],
  output logic                          err,
  // bank side
  output logic [1:0]                    b_en    [NBANKS],
  output logic [1:0]                    b_we    [NBANKS],
  output logic [$clog2(BANK_WORDS)-1:0] b_addr  [NBANKS][2],
  output logic [15:0]                   b_wdata [NBANKS][2],
  input  logic [15:0]                   b_rdata [NBANKS][2]
);
  localparam int unsigned AW = $clog2(BANK_WORDS);
  localparam int unsigned BW = (NBANKS > 1) ? $clog2(NBANKS) : 1;

  logic [BW-1:0]   bank_of [NREQ];
  logic [AW-1:0]   off_of  [NREQ];
  logic [NREQ-1:0] in_range;
  logic [NREQ-1:0] bgnt    [NBANKS];
  logic [NREQ-1:0] bport   [NBANKS];
  logic [NREQ-1:0] breq    [NBANKS];

  always_comb begin
    for (int i = 0; i < int'(NREQ); i++) begin
      int unsigned a;
      a = int'(req[i].addr);
      in_range[i] = a < NBANKS * BANK_WORDS;
      bank_of[i]  = BW'(a / BANK_WORDS);
      off_of[i]   = AW'(a % BANK_WORDS);
    end
  end

  for (genvar k = 0; k < NBANKS; k++) begin : g_bank
    always_comb
      for (int i = 0; i < int'(NREQ); i++)
        breq[k][i] = req[i].valid && in_range[i] && (int'(bank_of[i]) == k);

    green_arbiter #(.N(NREQ)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(breq[k]), .gnt(bgnt[k]), .port_of(bport[k])
    );

    always_comb begin
      b_en[k] = '0; b_we[k] = '0;
      b_addr[k][0] = '0; b_addr[k][1] = '0;
      b_wdata[k][0] = '0; b_wdata[k][1] = '0;
      for (int i = 0; i < int'(NREQ); i++) begin
        if (bgnt[k][i]) begin
          b_en[k][bport[k][i]]    = 1'b1;
          b_we[k][bport[k][i]]    = req[i].we;
          b_addr[k][bport[k][i]]  = off_of[i];
          b_wdata[k][bport[k][i]] = req[i].wdata;
        end
      end
    end
  end

  // grant collection and read-data return path
  logic [NREQ-1:0] rd_pend;
  logic [BW-1:0]   rd_bank [NREQ];
  logic            rd_port [NREQ];
  logic [NREQ-1:0] oor_pend;

  always_comb begin
    gnt = '0;
    err = 1'b0;
    for (int i = 0; i < int'(NREQ); i++) begin
      if (req[i].valid && !in_range[i]) begin
        gnt[i] = 1'b1;
        err    = 1'b1;
      end
      for (int k = 0; k < int'(NBANKS); k++) if (bgnt[k][i]) gnt[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend  <= '0;
      oor_pend <= '0;
      for (int i = 0; i < int'(NREQ); i++) begin
        rd_bank[i] <= '0;
        rd_port[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < int'(NREQ); i++) begin
        rd_pend[i]  <= gnt[i] && !req[i].we && in_range[i];
        oor_pend[i] <= gnt[i] && !req[i].we && !in_range[i];
        rd_bank[i]  <= bank_of[i];
        rd_port[i]  <= 1'b0;
        for (int k = 0; k < int'(NBANKS); k++)
          if (bgnt[k][i]) rd_port[i] <= bport[k][i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NREQ); i++) begin
      rvalid[i] = rd_pend[i] || oor_pend[i];
      rdata[i]  = rd_pend[i] ? b_rdata[rd_bank[i]][rd_port[i]] : 16'd0;
    end
  end
endmodule
