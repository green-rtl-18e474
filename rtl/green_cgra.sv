// green_cgra: top level of the GREEN coarse-grained reconfigurable array.
//
// The array is ROWS x COLS homogeneous processing elements (green_pe) on a
// mesh with diagonal links; each PE holds an approximate SIMD/MIMD ALU whose
// 16-bit operands can be split into 4- and 8-bit lanes that add, multiply or
// divide. A step of a kernel is one context word per PE plus one memory
// operation per column; the controller plays the steps of the context memory
// one per cycle, stalling when the shared data memory cannot serve all
// columns at once. The shared data memory has NBANKS dual-ported banks of
// BANK_WORDS 16-bit words (12 KiB in total by default) reached through a
// crossbar with a round-robin arbiter per bank.
//
// Host interface:
//   * ctx_we/ctx_wstep/ctx_wslot/ctx_wdata write one context word. Slot
//     r*COLS+c is the context of PE (r,c); slot ROWS*COLS+c is the memory
//     operation of column c (green_pkg::col_mop_t).
//   * hreq is a data-memory request of the host, an extra crossbar
//     requester; it must be held until hgnt. Read data returns on hrdata
//     with hrvalid one cycle after hgnt.
//   * start with num_steps runs steps 0..num_steps-1; busy, done (one-cycle
//     pulse), step (the step executing), cycles and stalls report the run.
//   * bank_pwr sets each bank on, in retention or off.
//   * illegal is high for a PE whose context holds an opcode the ALU variant
//     lacks; mem_err is a sticky flag for accesses beyond the memory.
//
// The default size is the 8 x 8 array that the application mappings need;
// the published figure of the array shows 4 x 4. Opcodes, context fields,
// PE structure, the banked 12 KiB memory with power states, the crossbar,
// arbiter, controller and context memory follow the architecture. The
// context-memory depth, memory-operation words, column buses and host ports
// are this design's own.
module green_cgra
  import green_pkg::*;
#(
  parameter int unsigned  ROWS       = 8,
  parameter int unsigned  COLS       = 8,
  parameter int unsigned  CTX_DEPTH  = 16,
  parameter int unsigned  NBANKS     = 4,
  parameter int unsigned  BANK_WORDS = 1536,
  parameter alu_variant_e VARIANT    = VAR_MIMD,
  localparam int unsigned SLOTS      = ROWS * COLS + COLS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // context memory write
  input  logic                         ctx_we,
  input  logic [$clog2(CTX_DEPTH)-1:0] ctx_wstep,
  input  logic [$clog2(SLOTS)-1:0]     ctx_wslot,
  input  logic [31:0]                  ctx_wdata,
  // host data-memory port
  input  mem_req_t                     hreq,
  output logic                         hgnt,
  output logic                         hrvalid,
  output logic [15:0]                  hrdata,
  // run control
  input  logic                         start,
  input  logic [$clog2(CTX_DEPTH):0]   num_steps,
  output logic                         busy,
  output logic                         done,
  output logic [$clog2(CTX_DEPTH):0]   step,
  output logic [31:0]                  cycles,
  output logic [31:0]                  stalls,
  // status
  input  bank_pwr_e                    bank_pwr [NBANKS],
  output logic [ROWS*COLS-1:0]         illegal,
  output logic                         mem_err
);
  localparam int unsigned NREQ = COLS + 1;
  localparam int unsigned BAW  = $clog2(BANK_WORDS);

  initial assert (NBANKS * BANK_WORDS <= (1 << DADDR_W))
    else $error("green_cgra: memory larger than the address space");
  initial assert (ROWS <= 8) else $error("green_cgra: column operations address at most 8 rows");

  // ------------------------------------------------------------ controller
  logic                         ctx_re, ctx_load, exec, active, all_ready;
  logic [$clog2(CTX_DEPTH)-1:0] ctx_raddr;
  logic [31:0]                  ctx_word [SLOTS];

  green_controller #(.DEPTH(CTX_DEPTH)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .num_steps(num_steps),
    .all_ready(all_ready), .ctx_re(ctx_re), .ctx_raddr(ctx_raddr),
    .ctx_load(ctx_load), .exec(exec), .active(active), .busy(busy),
    .done(done), .pc(step), .cycles(cycles), .stalls(stalls)
  );

  green_ctx_mem #(.DEPTH(CTX_DEPTH), .SLOTS(SLOTS)) u_ctx (
    .clk(clk), .rst_n(rst_n), .we(ctx_we), .wstep(ctx_wstep), .wslot(ctx_wslot),
    .wdata(ctx_wdata), .re(ctx_re), .raddr(ctx_raddr), .rdata(ctx_word)
  );

  // ----------------------------------------------------------------- array
  pe_ctx_t     pe_ctx  [ROWS*COLS];
  logic [31:0] col_bus [COLS];
  logic [31:0] pe_bus  [ROWS][COLS];

  always_comb
    for (int i = 0; i < int'(ROWS * COLS); i++) pe_ctx[i] = pe_ctx_t'(ctx_word[i]);

  green_pe_array #(.ROWS(ROWS), .COLS(COLS), .VARIANT(VARIANT)) u_array (
    .clk(clk), .rst_n(rst_n), .ctx_load(ctx_load), .ctx_in(pe_ctx), .exec(exec),
    .bus_in(col_bus), .bus_out(pe_bus), .illegal(illegal)
  );

  // ---------------------------------------------------------- column ports
  mem_req_t        req    [NREQ];
  logic [NREQ-1:0] gnt, rvalid;
  logic [15:0]     rdata  [NREQ];
  logic [COLS-1:0] ready;
  logic            xerr;

  for (genvar c = 0; c < COLS; c++) begin : g_colp
    logic [31:0] column_out [ROWS];
    always_comb for (int r = 0; r < int'(ROWS); r++) column_out[r] = pe_bus[r][c];
    green_col_port #(.ROWS(ROWS)) u_port (
      .clk(clk), .rst_n(rst_n), .ctx_load(ctx_load),
      .mop_in(col_mop_t'(ctx_word[ROWS*COLS + c])), .active(active), .exec(exec),
      .pe_bus_out(column_out), .req(req[c]), .gnt(gnt[c]), .rvalid(rvalid[c]),
      .rdata(rdata[c]), .ready(ready[c]), .bus(col_bus[c])
    );
  end

  assign all_ready = &ready;
  assign req[COLS] = hreq;
  assign hgnt      = gnt[COLS];
  assign hrvalid   = rvalid[COLS];
  assign hrdata    = rdata[COLS];

  // ------------------------------------------------- crossbar and the banks
  logic [1:0]     b_en    [NBANKS];
  logic [1:0]     b_we    [NBANKS];
  logic [BAW-1:0] b_addr  [NBANKS][2];
  logic [15:0]    b_wdata [NBANKS][2];
  logic [15:0]    b_rdata [NBANKS][2];

  green_xbar #(.NREQ(NREQ), .NBANKS(NBANKS), .BANK_WORDS(BANK_WORDS)) u_xbar (
    .clk(clk), .rst_n(rst_n), .req(req), .gnt(gnt), .rvalid(rvalid), .rdata(rdata),
    .err(xerr), .b_en(b_en), .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata),
    .b_rdata(b_rdata)
  );

  for (genvar k = 0; k < NBANKS; k++) begin : g_bank
    green_data_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk(clk), .rst_n(rst_n), .pwr(bank_pwr[k]), .en(b_en[k]), .we(b_we[k]),
      .addr(b_addr[k]), .wdata(b_wdata[k]), .rdata(b_rdata[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mem_err <= 1'b0;
    else if (xerr) mem_err <= 1'b1;
  end

  // the host holds its request until granted
  assert property (@(posedge clk) disable iff (!rst_n)
                   hreq.valid && !hgnt |=> hreq.valid && $stable(hreq));
endmodule
