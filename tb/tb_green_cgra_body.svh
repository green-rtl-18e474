// tb_green_cgra_body.svh: shared body of the end-to-end testbenches of
// green_cgra (tb_green_cgra and tb_green_cgra_full). Included inside the
// testbench module; the including module defines the task extra_checks and
// the localparams RUNS (number of random kernels) and CHECK_ILLEGAL.
//
// The design runs at its default size (8 x 8 PEs, 16 context steps, four
// banks of 1536 words). The host fills part of the data memory, then random
// kernels of up to 16 steps are written into the context memory and run:
// every PE gets a random opcode, sources, write target and immediate; every
// column gets a random load, store or nothing, with addresses packed into a
// few dozen words per bank so that columns collide on banks. A step-level
// model (neighbour links, column buses, register files, data memory and the
// reference ALU of green_ref_pkg) executes the same kernel. After each run
// the PE outputs and column buses are compared through the hierarchy and the
// memory is read back through the host port. Cycle and stall counters are
// checked against the rule "one step per cycle plus one cycle per stall",
// and a kernel without memory operations must not stall. Retention and off
// states of a bank, an access beyond the memory and the mechanisms of each
// run are counted; a mechanism that never happened counts as a failure.
  import green_pkg::*;
  import green_ref_pkg::*;

  localparam int R = 8, C = 8, D = 16, NB = 4, BW = 1536, NW = NB * BW, SL = R * C + C;
  localparam int DR [8] = '{-1, -1, 0, 1, 1,  1,  0, -1};
  localparam int DC [8] = '{ 0,  1, 1, 1, 0, -1, -1, -1};
  localparam int AREA = 40;    // words used per bank

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
  bank_pwr_e   bank_pwr [NB];
  logic [R*C-1:0] illegal;

  green_cgra dut (
    .clk(clk), .rst_n(rst_n), .ctx_we(ctx_we), .ctx_wstep(ctx_wstep), .ctx_wslot(ctx_wslot),
    .ctx_wdata(ctx_wdata), .hreq(hreq), .hgnt(hgnt), .hrvalid(hrvalid), .hrdata(hrdata),
    .start(start), .num_steps(num_steps), .busy(busy), .done(done), .step(step),
    .cycles(cycles), .stalls(stalls), .bank_pwr(bank_pwr), .illegal(illegal), .mem_err(mem_err)
  );

  // model state
  logic [31:0] m_nb  [R][C][8];
  logic [31:0] m_out [R][C];
  logic [31:0] m_rf  [R][C][4];
  logic [31:0] m_col [C];
  logic [15:0] m_mem [NW];
  logic [31:0] prog  [D][SL];

  // mechanism counters
  int n_stall, n_conflict, n_load, n_store, n_sisd, n_simd, n_mimd, n_diag;
  int n_rf_rd, n_rf_wr, n_host, n_ret, n_off, n_err, n_illegal, n_steps;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // bank conflicts: a column request that is not granted in its cycle
  always @(negedge clk) begin
    if (rst_n)
      for (int c = 0; c < C; c++)
        if (dut.req[c].valid && !dut.gnt[c]) n_conflict++;
  end

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
    chk(hrvalid == !we, "host rvalid");
    @(negedge clk);
    hreq = '0;
    n_host++;
  endtask

  function automatic int bank_addr(int unsigned rnd);
    return int'(rnd % NB) * BW + int'((rnd >> 4) % AREA);
  endfunction

  // random kernel of n steps; mem_ops = 0 gives a kernel without memory access
  task automatic gen_prog(input int n, input bit mem_ops);
    for (int st = 0; st < n; st++) begin
      int used [$];
      for (int i = 0; i < R * C; i++) begin
        pe_ctx_t x;
        x.op    = opcode_e'($urandom % 16);
        x.wr    = 4'($urandom % 16);
        x.sel_a = 4'($urandom % 14);
        x.sel_b = 4'($urandom % 14);
        x.imm   = 16'($urandom);
        prog[st][i] = 32'(x);
      end
      used = {};
      for (int c = 0; c < C; c++) begin
        col_mop_t m;
        int a, kind;
        m = '0;
        kind = int'($urandom % 10);
        if (!mem_ops) kind = 9;
        // each address is used by one column per step at most, so the
        // order in which a bank serves the columns does not matter
        do a = bank_addr($urandom); while (a inside {used});
        used.push_back(a);
        m.kind = kind < 4 ? MOP_LOAD : kind < 7 ? MOP_STORE : MOP_NONE;
        m.row  = 3'($urandom);
        m.addr = DADDR_W'(a);
        prog[st][R * C + c] = 32'(m);
      end
    end
  endtask

  function automatic logic [31:0] pick(int r, int c, logic [3:0] sel, logic [15:0] imm);
    if (sel == SRC_IMM) return {16'd0, imm};
    if (sel >= SRC_N && sel <= SRC_NW) begin
      int d, nr, nc;
      d = int'(sel) - 1;
      nr = r + DR[d];
      nc = c + DC[d];
      if (nr < 0 || nr >= R || nc < 0 || nc >= C) return '0;
      return m_nb[nr][nc][(d + 4) % 8];
    end
    if (sel == SRC_BUS) return m_col[c];
    if (sel >= SRC_REG && sel <= 4'd13) return m_rf[r][c][sel - SRC_REG];
    return '0;
  endfunction

  task automatic model_step(input int st);
    logic [31:0] y [R][C];
    logic [31:0] col_next [C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        pe_ctx_t x;
        logic [31:0] a, b;
        x = pe_ctx_t'(prog[st][r * C + c]);
        a = pick(r, c, x.sel_a, x.imm);
        b = pick(r, c, x.sel_b, x.imm);
        y[r][c] = ref_alu(x.op, a[15:0], b[15:0]);
        if (x.op <= OP_DIV16) n_sisd++;
        else if (x.op <= OP_DIV4x4) n_simd++;
        else n_mimd++;
        for (int k = 0; k < 2; k++) begin
          logic [3:0] s;
          s = k ? x.sel_b : x.sel_a;
          if (s inside {SRC_NE, SRC_SE, SRC_SW, SRC_NW}) begin
            int d;
            d = int'(s) - 1;
            if (r + DR[d] >= 0 && r + DR[d] < R && c + DC[d] >= 0 && c + DC[d] < C) n_diag++;
          end
          if (s >= SRC_REG && s <= 4'd13) n_rf_rd++;
        end
        if (x.wr >= WR_REG) n_rf_wr++;
      end
    for (int c = 0; c < C; c++) begin
      col_mop_t m;
      m = col_mop_t'(prog[st][R * C + c]);
      col_next[c] = m_col[c];
      if (m.kind == MOP_LOAD) begin
        col_next[c] = {16'd0, m_mem[m.addr]};
        n_load++;
      end
    end
    for (int c = 0; c < C; c++) begin
      col_mop_t m;
      m = col_mop_t'(prog[st][R * C + c]);
      if (m.kind == MOP_STORE) begin
        m_mem[m.addr] = m_out[m.row][c][15:0];
        n_store++;
      end
    end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        pe_ctx_t x;
        x = pe_ctx_t'(prog[st][r * C + c]);
        if (x.wr < WR_OUT) m_nb[r][c][x.wr[2:0]] = y[r][c];
        else if (x.wr == WR_OUT) m_out[r][c] = y[r][c];
        else if (x.wr >= WR_REG) m_rf[r][c][x.wr[1:0]] = y[r][c];
      end
    for (int c = 0; c < C; c++) m_col[c] = col_next[c];
  endtask

  task automatic run_prog(input int n, input bit mem_ops);
    int loads_steps, waited;
    gen_prog(n, mem_ops);
    for (int st = 0; st < n; st++)
      for (int s = 0; s < SL; s++) begin
        @(negedge clk);
        ctx_we = 1;
        ctx_wstep = 4'(st);
        ctx_wslot = 7'(s);
        ctx_wdata = prog[st][s];
      end
    @(negedge clk);
    ctx_we = 0;
    num_steps = 5'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    waited = 0;
    while (!done && waited < 2000) begin
      @(negedge clk);
      waited++;
    end
    chk(done, "run did not finish");
    loads_steps = 0;
    for (int st = 0; st < n; st++) begin
      bit has_load;
      has_load = 0;
      for (int c = 0; c < C; c++) begin
        col_mop_t m;
        m = col_mop_t'(prog[st][R * C + c]);
        if (m.kind == MOP_LOAD) has_load = 1;
      end
      if (has_load) loads_steps++;
      model_step(st);
    end
    n_steps += n;
    n_stall += int'(stalls);
    chk(int'(cycles) == n + 2 + int'(stalls),
        $sformatf("cycles %0d for %0d steps and %0d stalls", cycles, n, stalls));
    chk(int'(stalls) >= loads_steps, "a load step finished without waiting for its data");
    if (!mem_ops) chk(stalls == 0, "kernel without memory operations stalled");
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        chk(dut.pe_bus[r][c] == m_out[r][c],
            $sformatf("PE %0d,%0d bus out %h exp %h", r, c, dut.pe_bus[r][c], m_out[r][c]));
        for (int d = 0; d < 8; d++)
          chk(dut.u_array.nb_out[r][c][d] == m_nb[r][c][d],
              $sformatf("PE %0d,%0d link %0d %h exp %h", r, c, d,
                        dut.u_array.nb_out[r][c][d], m_nb[r][c][d]));
      end
    for (int c = 0; c < C; c++)
      chk(dut.col_bus[c] == m_col[c], $sformatf("column bus %0d", c));
  endtask

  task automatic check_mem();
    logic [15:0] rd;
    for (int k = 0; k < NB; k++)
      for (int a = k * BW; a < k * BW + AREA; a++) begin
        host_acc(0, a, 16'd0, rd);
        chk(rd == m_mem[a], $sformatf("memory word %0d: %h exp %h", a, rd, m_mem[a]));
      end
  endtask

  initial begin
    logic [15:0] rd;
    rst_n = 0; ctx_we = 0; ctx_wstep = 0; ctx_wslot = 0; ctx_wdata = 0;
    hreq = '0; start = 0; num_steps = 0;
    for (int k = 0; k < NB; k++) bank_pwr[k] = PWR_ON;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        m_out[r][c] = '0;
        for (int d = 0; d < 8; d++) m_nb[r][c][d] = '0;
        for (int e = 0; e < 4; e++) m_rf[r][c][e] = '0;
      end
    for (int c = 0; c < C; c++) m_col[c] = '0;
    for (int a = 0; a < NW; a++) m_mem[a] = '0;
    n_stall = 0; n_conflict = 0; n_load = 0; n_store = 0; n_sisd = 0; n_simd = 0;
    n_mimd = 0; n_diag = 0; n_rf_rd = 0; n_rf_wr = 0; n_host = 0; n_ret = 0; n_off = 0;
    n_err = 0; n_illegal = 0; n_steps = 0;
    #12 rst_n = 1;

    // host fills the used words of every bank
    for (int k = 0; k < NB; k++)
      for (int a = k * BW; a < k * BW + AREA; a++) begin
        m_mem[a] = 16'($urandom);
        host_acc(1, a, m_mem[a], rd);
      end
    check_mem();

    // one kernel without memory operations: one step per cycle
    run_prog(D, 0);
    // random kernels
    for (int k = 0; k < RUNS; k++) run_prog(1 + int'($urandom % D), 1);
    run_prog(D, 1);
    check_mem();

    // retention keeps the contents, off loses them
    host_acc(1, 3 * BW + 1, 16'hBEEF, rd);
    m_mem[3 * BW + 1] = 16'hBEEF;
    @(negedge clk);
    bank_pwr[3] = PWR_RET;
    host_acc(0, 3 * BW + 1, 16'd0, rd);
    chk(rd == 16'd0, "bank in retention answered");
    @(negedge clk);
    bank_pwr[3] = PWR_ON;
    n_ret++;
    host_acc(0, 3 * BW + 1, 16'd0, rd);
    chk(rd == 16'hBEEF, "retention lost the contents");
    @(negedge clk);
    bank_pwr[3] = PWR_OFF;
    repeat (3) @(negedge clk);
    bank_pwr[3] = PWR_ON;
    n_off++;
    for (int a = 3 * BW; a < 4 * BW; a++) m_mem[a] = '0;
    check_mem();
    // the other banks kept working: one more kernel after the power cycle
    run_prog(D, 1);
    check_mem();

    // access beyond the memory
    chk(!mem_err, "memory error before any bad access");
    host_acc(0, NW + 7, 16'd0, rd);
    chk(rd == 16'd0 && mem_err, "access beyond the memory not flagged");
    if (mem_err) n_err++;

    extra_checks();

    $display("steps %0d stalls %0d conflicts %0d loads %0d stores %0d", n_steps, n_stall,
             n_conflict, n_load, n_store);
    $display("SISD ops %0d SIMD ops %0d MIMD ops %0d diagonal reads %0d", n_sisd, n_simd,
             n_mimd, n_diag);
    $display("register reads %0d writes %0d host accesses %0d retention %0d off %0d",
             n_rf_rd, n_rf_wr, n_host, n_ret, n_off);
    $display("memory errors %0d illegal opcodes %0d", n_err, n_illegal);
    chk(n_stall > 0, "no stall");
    chk(n_conflict > 0, "no bank conflict");
    chk(n_load > 0 && n_store > 0, "no load or store");
    chk(n_sisd > 0 && n_simd > 0 && n_mimd > 0, "an opcode class never ran");
    chk(n_diag > 0, "no diagonal link used");
    chk(n_rf_rd > 0 && n_rf_wr > 0, "register file unused");
    chk(n_host > 0, "no host access");
    chk(n_ret > 0 && n_off > 0, "a power state never used");
    chk(n_err > 0, "no memory error");
    if (CHECK_ILLEGAL) chk(n_illegal > 0, "no illegal opcode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
