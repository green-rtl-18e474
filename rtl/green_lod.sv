// green_lod: W-bit leading-one detector built from 4-bit detectors.
//
// The operand is cut into W/4 nibbles, each with its own green_lod4. The most
// significant nibble that holds a 1 is selected and its 2-bit position is
// prefixed with the nibble number, so pos = floor(log2(d)). found is 0 for a
// zero operand. This is the modular, 4-bit based construction that lets the
// same detectors serve 4-, 8- and 16-bit lanes; the selection logic above the
// nibble detectors is this design's own. Combinational; W must be a multiple
// of 4.
module green_lod #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         d,
  output logic [$clog2(W)-1:0] pos,
  output logic                 found
);
  localparam int unsigned NN = W / 4;

  logic [NN-1:0][1:0] npos;
  logic [NN-1:0]      nfound;

  for (genvar i = 0; i < NN; i++) begin : g_nib
    green_lod4 u_lod4 (.d(d[4*i +: 4]), .pos(npos[i]), .found(nfound[i]));
  end

  always_comb begin
    pos   = '0;
    found = |nfound;
    for (int i = 0; i < NN; i++) begin
      if (nfound[i]) pos = $clog2(W)'(4 * i + int'(npos[i]));
    end
  end

  initial assert (W % 4 == 0 && W >= 4) else $error("green_lod: W must be a multiple of 4");
endmodule
