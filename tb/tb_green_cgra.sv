// tb_green_cgra: end-to-end test of green_cgra. The default-size design runs
// random kernels against a step-level model (tb_green_cgra_body.svh), and
// every mechanism is counted: stalls, bank conflicts, loads, stores, SISD,
// SIMD and MIMD opcodes, diagonal links, register file, host accesses,
// retention and off states, accesses beyond the memory. A second, 2 x 2
// instance built as the SISD variant shows the illegal-opcode path: a SIMD
// opcode raises illegal and writes 0, a SISD opcode does not.
module tb_green_cgra;
  localparam int RUNS = 12;
  localparam bit CHECK_ILLEGAL = 1'b1;
  // reduced SISD-variant instance
  logic        s_ctx_we, s_start, s_hgnt, s_hrvalid, s_busy, s_done, s_err;
  logic [3:0]  s_wstep;
  logic [2:0]  s_wslot;
  logic [31:0] s_wdata, s_cycles, s_stalls;
  green_pkg::mem_req_t  s_hreq;
  logic [15:0] s_hrdata;
  logic [4:0]  s_num, s_step;
  green_pkg::bank_pwr_e s_pwr [4];
  logic [3:0]  s_illegal;

  task automatic s_run(input logic [31:0] ctx0);
    @(negedge clk);
    for (int s = 0; s < 6; s++) begin
      s_ctx_we = 1;
      s_wstep = 0;
      s_wslot = 3'(s);
      s_wdata = s == 0 ? ctx0 : 32'h0800_0000;   // ADD32 to the bus output
      @(negedge clk);
    end
    s_ctx_we = 0;
    s_num = 5'd1;
    s_start = 1;
    @(negedge clk);
    s_start = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic extra_checks();
    s_hreq = '0;
    s_ctx_we = 0;
    s_start = 0;
    for (int k = 0; k < 4; k++) s_pwr[k] = green_pkg::PWR_ON;
    // MUL16 of 5 and 5 is legal in the SISD variant
    s_run({4'd1, 4'd8, 4'd0, 4'd0, 16'd5});
    chk(!s_illegal[0], "SISD opcode flagged illegal");
    chk(u_sisd.pe_bus[0][0] == 32'(green_ref_pkg::ref_alu(4'd1, 16'd5, 16'd5)),
        "SISD variant result");
    // ADD8x4 is a SIMD opcode: illegal, result 0
    s_run({4'd5, 4'd8, 4'd0, 4'd0, 16'h1234});
    chk(s_illegal[0], "SIMD opcode not flagged in the SISD variant");
    chk(u_sisd.pe_bus[0][0] == 32'd0, "illegal opcode wrote a result");
    if (s_illegal[0]) n_illegal++;
  endtask

`include "tb_green_cgra_body.svh"

  green_cgra #(.ROWS(2), .COLS(2), .VARIANT(green_pkg::VAR_SISD)) u_sisd (
    .clk(clk), .rst_n(rst_n), .ctx_we(s_ctx_we), .ctx_wstep(s_wstep), .ctx_wslot(s_wslot),
    .ctx_wdata(s_wdata), .hreq(s_hreq), .hgnt(s_hgnt), .hrvalid(s_hrvalid), .hrdata(s_hrdata),
    .start(s_start), .num_steps(s_num), .busy(s_busy), .done(s_done), .step(s_step),
    .cycles(s_cycles), .stalls(s_stalls), .bank_pwr(s_pwr), .illegal(s_illegal),
    .mem_err(s_err)
  );
endmodule
