// green_pe: one GREEN processing element.
//
// A PE holds a 32-bit context register, two operand multiplexers (MUX A and
// MUX B), the SIMD/MIMD ALU, a four-entry register file and a write
// demultiplexer with one registered output per neighbour direction plus one
// towards the column bus.
//
// Context word (green_pkg::pe_ctx_t): [31:28] opcode, [27:24] write target,
// [23:20] MUX A source, [19:16] MUX B source, [15:0] immediate.
// Sources: 0 immediate, 1-8 the neighbour inputs N, NE, E, SE, S, SW, W, NW,
// 9 the column bus, 10-13 register-file entries 0-3 (the two multiplexers are
// the register file's two read ports), 14-15 read as 0. The ALU takes the low
// 16 bits of the selected 32-bit value.
// Write targets: 0-7 the output towards N..NW, 8 the bus output, 12-15 a
// register-file entry, 9-11 nothing.
//
// Timing: ctx_load captures ctx_in at the clock edge. When exec is high the
// PE evaluates its current context in that cycle and, at the clock edge,
// writes the 32-bit ALU result to the selected output register or register
// entry. Output registers hold their value until written again, so a
// neighbour reads it in any later step. illegal is high while the context
// holds an opcode the ALU variant does not support (never, in the default
// MIMD variant).
//
// Multiplexer inputs, the write demultiplexer, the register file and the
// context-word bit fields follow the architecture; the numeric source and
// target codes, the 32-bit links and the registered outputs are this
// design's choices.
module green_pe
  import green_pkg::*;
#(
  parameter alu_variant_e VARIANT = VAR_MIMD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctx_load,
  input  pe_ctx_t     ctx_in,
  input  logic        exec,
  input  logic [31:0] nb_in  [8],   // indexed by green_pkg::dir_e
  input  logic [31:0] bus_in,
  output logic [31:0] nb_out [8],
  output logic [31:0] bus_out,
  output logic        illegal
);
  pe_ctx_t     ctx;
  logic [31:0] src_a, src_b, rf_a, rf_b, y;
  logic [15:0] opa, opb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctx <= '0;
    else if (ctx_load) ctx <= ctx_in;
  end

  // operand multiplexers
  function automatic logic [31:0] pick(logic [3:0] sel, logic [15:0] imm,
                                       logic [31:0] nb [8], logic [31:0] bus,
                                       logic [31:0] rf);
    if (sel == SRC_IMM)                       return {16'd0, imm};
    else if (sel >= SRC_N && sel <= SRC_NW)   return nb[3'(sel - SRC_N)];
    else if (sel == SRC_BUS)                  return bus;
    else if (sel >= SRC_REG && sel <= 4'd13)  return rf;
    else                                      return '0;
  endfunction

  always_comb begin
    src_a = pick(ctx.sel_a, ctx.imm, nb_in, bus_in, rf_a);
    src_b = pick(ctx.sel_b, ctx.imm, nb_in, bus_in, rf_b);
    opa   = src_a[15:0];
    opb   = src_b[15:0];
  end

  green_alu #(.VARIANT(VARIANT)) u_alu (
    .a(opa), .b(opb), .op(ctx.op), .y(y), .illegal(illegal)
  );

  green_regfile #(.DEPTH(4), .DW(32)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .we(exec && ctx.wr >= WR_REG), .waddr(ctx.wr[1:0]), .wdata(y),
    .raddr_a(2'(ctx.sel_a - SRC_REG)), .rdata_a(rf_a),
    .raddr_b(2'(ctx.sel_b - SRC_REG)), .rdata_b(rf_b)
  );

  // write demultiplexer with registered outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 8; d++) nb_out[d] <= '0;
      bus_out <= '0;
    end else if (exec) begin
      if (ctx.wr < WR_OUT)       nb_out[ctx.wr[2:0]] <= y;
      else if (ctx.wr == WR_OUT) bus_out <= y;
    end
  end
endmodule
