// green_coef_rom: shared read-only store of Mitchell error-correction
// coefficients, with one read port per multiplier-divider lane.
//
// Each port presents the three fraction MSBs of both operands (ia, ib) and
// whether the lane divides. Multiplication reads the 32-entry table at
// {max(ia,ib), min(ia,ib)[2:1]} (the correction is symmetric in the operands,
// so half the table is kept); division reads the 64-entry table at {ia, ib}.
// The output is an unsigned Q0.16 fraction. The table sizes (32x16 and 64x16),
// selection by the three fraction MSBs and the multi-port access for sub-word
// lanes follow the architecture; the folding of the symmetric multiply table
// and the coefficient values (cell averages, see green_pkg) are this design's.
// Combinational: the coefficient is valid in the same cycle as the address.
module green_coef_rom
  import green_pkg::*;
#(
  parameter int unsigned PORTS = 8
) (
  input  logic        is_div [PORTS],
  input  logic [2:0]  ia     [PORTS],
  input  logic [2:0]  ib     [PORTS],
  output logic [15:0] coef   [PORTS]
);
  for (genvar p = 0; p < PORTS; p++) begin : g_port
    logic [2:0] hi, lo;
    always_comb begin
      hi = (ia[p] > ib[p]) ? ia[p] : ib[p];
      lo = (ia[p] > ib[p]) ? ib[p] : ia[p];
      if (is_div[p]) coef[p] = DIV_COEF[{ia[p], ib[p]}];
      else           coef[p] = MUL_COEF[{hi, lo[2:1]}];
    end
  end
endmodule
