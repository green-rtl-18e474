// green_lod4: 4-bit leading-one detector, the building block of the wider
// detectors in the hybrid multiplier-divider.
//
// pos is the bit index of the most significant 1 of d; found is 0 when d is
// zero (pos is then 0). Purely combinational.
module green_lod4 (
  input  logic [3:0] d,
  output logic [1:0] pos,
  output logic       found
);
  always_comb begin
    found = |d;
    if (d[3])      pos = 2'd3;
    else if (d[2]) pos = 2'd2;
    else if (d[1]) pos = 2'd1;
    else           pos = 2'd0;
  end
endmodule
