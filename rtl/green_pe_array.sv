// green_pe_array: ROWS x COLS processing elements on a mesh with diagonal
// links.
//
// Every PE exchanges 32-bit values with its eight neighbours (N, NE, E, SE,
// S, SW, W, NW). The input of PE (r,c) from direction d is the output of the
// neighbour in direction d that points back at it (for example its N input is
// the S output of PE (r-1,c)). Row 0 is the north edge and column 0 the west
// edge; inputs from beyond the array edge read 0. Each column shares one bus:
// bus_in[c] reaches every PE of column c, and each PE's bus output is brought
// out as bus_out[r][c] for the column's memory port.
//
// All PEs load their contexts together (ctx_load) and execute together
// (exec); see green_pe for the timing. PE (r,c) takes ctx_in[r*COLS+c].
// The 2D mesh, the diagonal links and the homogeneous PEs follow the
// architecture; the edge handling and the column buses are this design's
// choices. The two-hop links between the first and third rows that the
// architecture mentions are not modelled, since the PE's operand
// multiplexers have no input for them.
module green_pe_array
  import green_pkg::*;
#(
  parameter int unsigned  ROWS    = 8,
  parameter int unsigned  COLS    = 8,
  parameter alu_variant_e VARIANT = VAR_MIMD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctx_load,
  input  pe_ctx_t     ctx_in  [ROWS*COLS],
  input  logic        exec,
  input  logic [31:0] bus_in  [COLS],
  output logic [31:0] bus_out [ROWS][COLS],
  output logic [ROWS*COLS-1:0] illegal
);
  // per-PE neighbour outputs, indexed [row][col][direction]
  logic [31:0] nb_out [ROWS][COLS][8];

  // row / column offsets of the neighbour in each direction
  localparam int DR [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};
  localparam int DC [8] = '{ 0,  1, 1, 1, 0, -1, -1, -1};

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [31:0] nb_in [8];
      for (genvar d = 0; d < 8; d++) begin : g_dir
        localparam int NR = r + DR[d];
        localparam int NC = c + DC[d];
        if (NR >= 0 && NR < int'(ROWS) && NC >= 0 && NC < int'(COLS)) begin : g_link
          assign nb_in[d] = nb_out[NR][NC][(d + 4) % 8];
        end else begin : g_edge
          assign nb_in[d] = '0;
        end
      end
      green_pe #(.VARIANT(VARIANT)) u_pe (
        .clk(clk), .rst_n(rst_n),
        .ctx_load(ctx_load), .ctx_in(ctx_in[r*COLS + c]), .exec(exec),
        .nb_in(nb_in), .bus_in(bus_in[c]),
        .nb_out(nb_out[r][c]), .bus_out(bus_out[r][c]),
        .illegal(illegal[r*COLS + c])
      );
    end
  end
endmodule
