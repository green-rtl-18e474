// green_regfile: the local register file of a processing element.
//
// DEPTH words of 32 bits with two combinational read ports (one behind each
// operand multiplexer of the PE) and one synchronous write port, so a PE can
// read two stored results and write one new result per step. Reset clears all
// entries. Two read ports follow the architecture's dual-ported local
// register files; the depth of 4 is this design's choice.
module green_regfile #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned DW    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr_a,
  output logic [DW-1:0]            rdata_a,
  input  logic [$clog2(DEPTH)-1:0] raddr_b,
  output logic [DW-1:0]            rdata_b
);
  logic [DW-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];
endmodule
