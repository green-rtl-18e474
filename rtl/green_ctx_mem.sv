// green_ctx_mem: the on-chip context memory.
//
// Holds DEPTH configuration steps. One step is SLOTS 32-bit words: one
// context word per PE followed by one memory-operation word per column. The
// host writes one word per cycle (we, wstep, wslot, wdata). The controller
// reads a whole step at once (re, raddr); the words appear on rdata in the
// next cycle and stay until the next read, and the wide read port fans them
// out to every PE and column port (the context crossbar). Contents are not
// reset.
//
// The architecture has an on-chip context memory connected to the PEs by a
// crossbar; its depth and this organisation are this design's choices.
module green_ctx_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned SLOTS = 72
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wstep,
  input  logic [$clog2(SLOTS)-1:0] wslot,
  input  logic [31:0]              wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [31:0]              rdata [SLOTS]
);
  logic [31:0] mem [DEPTH][SLOTS];

  always_ff @(posedge clk) begin
    if (we && int'(wslot) < int'(SLOTS)) mem[wstep][wslot] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SLOTS); s++) rdata[s] <= '0;
    end else if (re) begin
      for (int s = 0; s < int'(SLOTS); s++) rdata[s] <= mem[raddr][s];
    end
  end
endmodule
