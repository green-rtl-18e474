// tb_green_fir_workload: a band-pass-style FIR kernel, one of the
// single-kernel workloads of the architecture, mapped onto the default
// 8 x 8 design and run end to end.
//
// y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3] over a synthetic ECG-like
// trace of 8-bit samples (a periodic QRS-like spike on a slow baseline, plus
// noise), with 4-bit coefficients. Each column computes one output, so eight
// outputs are produced per run of eight steps:
//   steps 0-3  every column loads x[n-k] onto its column bus;
//   steps 1-4  PE (0,c) multiplies the bus by h[k] (approximate MUL16) and
//              sends the product south;
//   step  0    PE (1,c) clears register entry 0;
//   steps 2-5  PE (1,c) accumulates the product from the north into it;
//   step  6    PE (1,c) copies the sum to its bus output;
//   step  7    every column stores row 1's bus output to y[n].
// All eight columns load from the same bank in one step, so every load step
// stalls on bank conflicts. The host loads x, writes the program, patches
// the addresses of each run and reads y back. Every output must equal the
// sum of the reference ALU's approximate products; the approximate filter is
// also compared with the exact one and its mean error reported.
module tb_green_fir_workload;
  import green_pkg::*;
  import green_ref_pkg::*;

  localparam int NOUT = 128, X0 = 16, Y0 = 1536 + 16;
  localparam logic [15:0] H [4] = '{16'd3, 16'd7, 16'd7, 16'd3};

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, ctx_we, start, hgnt, hrvalid, busy, done, mem_err;
  logic [3:0]  ctx_wstep;
  logic [6:0]  ctx_wslot;
  logic [31:0] ctx_wdata, cycles, stalls;
  mem_req_t    hreq;
  logic [15:0] hrdata;
  logic [4:0]  num_steps, step;
  bank_pwr_e   bank_pwr [4];
  logic [63:0] illegal;

  green_cgra dut (
    .clk(clk), .rst_n(rst_n), .ctx_we(ctx_we), .ctx_wstep(ctx_wstep), .ctx_wslot(ctx_wslot),
    .ctx_wdata(ctx_wdata), .hreq(hreq), .hgnt(hgnt), .hrvalid(hrvalid), .hrdata(hrdata),
    .start(start), .num_steps(num_steps), .busy(busy), .done(done), .step(step),
    .cycles(cycles), .stalls(stalls), .bank_pwr(bank_pwr), .illegal(illegal), .mem_err(mem_err)
  );

  logic [15:0] x [-3:NOUT-1];
  int total_stalls;

  function automatic logic [31:0] ctx(logic [3:0] op, logic [3:0] wr, logic [3:0] sa,
                                      logic [3:0] sb, logic [15:0] imm);
    return {op, wr, sa, sb, imm};
  endfunction

  function automatic logic [31:0] mop(mem_op_e kind, int row, int addr);
    col_mop_t m;
    m = '0;
    m.kind = kind;
    m.row  = 3'(row);
    m.addr = DADDR_W'(addr);
    return 32'(m);
  endfunction

  task automatic wr_ctx(input int st, input int slot, input logic [31:0] w);
    @(negedge clk);
    ctx_we = 1;
    ctx_wstep = 4'(st);
    ctx_wslot = 7'(slot);
    ctx_wdata = w;
    @(negedge clk);
    ctx_we = 0;
  endtask

  task automatic host_acc(input bit we, input int addr, input logic [15:0] wd,
                          output logic [15:0] rd);
    @(negedge clk);
    hreq = '{valid: 1'b1, we: we, addr: DADDR_W'(addr), wdata: wd};
    #1;
    while (!hgnt) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    rd = hrdata;
    @(negedge clk);
    hreq = '0;
  endtask

  localparam logic [31:0] NOP = 32'h0900_0000;   // ADD32, result discarded

  initial begin
    logic [15:0] rd;
    real err_sum;
    int  n_exact;
    rst_n = 0; ctx_we = 0; ctx_wstep = 0; ctx_wslot = 0; ctx_wdata = 0;
    hreq = '0; start = 0; num_steps = 0; total_stalls = 0;
    for (int k = 0; k < 4; k++) bank_pwr[k] = PWR_ON;
    #12 rst_n = 1;

    // synthetic ECG-like trace, 8-bit
    for (int i = -3; i < NOUT; i++) begin
      int v;
      v = 40 + (i % 64 < 32 ? i % 32 : 32 - i % 32);       // baseline wander
      if (i % 40 == 20) v += 150;                         // R peak
      else if (i % 40 == 19 || i % 40 == 21) v += 60;
      v += int'($urandom % 8);
      x[i] = (i < 0) ? 16'd0 : 16'(v > 255 ? 255 : v);
    end
    for (int i = -3; i < NOUT; i++) host_acc(1, X0 + i, x[i], rd);

    // program: every slot of every step, then the column-specific parts
    for (int st = 0; st < 8; st++)
      for (int s = 0; s < 72; s++) wr_ctx(st, s, s < 64 ? NOP : mop(MOP_NONE, 0, 0));
    for (int c = 0; c < 8; c++) begin
      for (int k = 0; k < 4; k++)
        wr_ctx(k + 1, c, ctx(OP_MUL16, 4'd4, SRC_BUS, SRC_IMM, H[k]));     // PE(0,c) -> S
      wr_ctx(0, 8 + c, ctx(OP_ADD32, 4'd12, SRC_IMM, SRC_IMM, 16'd0));     // R0 = 0
      for (int st = 2; st <= 5; st++)
        wr_ctx(st, 8 + c, ctx(OP_ADD32, 4'd12, SRC_N, SRC_REG, 16'd0));    // R0 += N
      wr_ctx(6, 8 + c, ctx(OP_ADD32, WR_OUT, SRC_REG, SRC_IMM, 16'd0));    // OUT = R0
    end

    for (int blk = 0; blk < NOUT / 8; blk++) begin
      for (int c = 0; c < 8; c++) begin
        int n;
        n = blk * 8 + c;
        for (int k = 0; k < 4; k++) wr_ctx(k, 64 + c, mop(MOP_LOAD, 0, X0 + n - k));
        wr_ctx(7, 64 + c, mop(MOP_STORE, 1, Y0 + n));
      end
      @(negedge clk);
      num_steps = 5'd8;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      total_stalls += int'(stalls);
      checks++;
      if (int'(cycles) != 8 + 2 + int'(stalls)) begin
        failures++;
        $display("FAIL cycle count %0d with %0d stalls", cycles, stalls);
      end
    end

    err_sum = 0.0;
    n_exact = 0;
    for (int n = 0; n < NOUT; n++) begin
      logic [15:0] model;
      int exact;
      model = 16'd0;
      exact = 0;
      for (int k = 0; k < 4; k++) begin
        logic [31:0] p;
        p = ref_alu(OP_MUL16, x[n - k], H[k]);
        model = model + p[15:0];
        exact += int'(x[n - k]) * int'(H[k]);
      end
      host_acc(0, Y0 + n, 16'd0, rd);
      checks++;
      if (rd !== model) begin
        failures++;
        if (failures < 10) $display("FAIL y[%0d] = %0d, expected %0d", n, rd, model);
      end
      if (exact > 0) begin
        err_sum += (real'(int'(rd)) - real'(exact)) / real'(exact);
        n_exact++;
      end
    end
    $display("FIR: %0d outputs, %0d stall cycles, mean relative error %f", NOUT,
             total_stalls, err_sum / n_exact);
    checks++;
    if (total_stalls < NOUT / 8 * 4) begin failures++; $display("FAIL load steps did not stall"); end
    checks++;
    if (err_sum / n_exact > 0.05 || err_sum / n_exact < -0.05) begin
      failures++;
      $display("FAIL mean error of the approximate filter above 5%%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
