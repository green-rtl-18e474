// green_muldiv: W-bit approximate hybrid multiplier-divider (Mitchell's
// logarithmic method with table-based error correction).
//
// Both unsigned operands are converted to an approximate base-2 logarithm:
// a leading-one detector gives the integer part k, and a barrel shift that
// left-aligns the bits below the leading one gives a (W-1)-bit fraction x,
// so log2(a) ~ k + x. The two logarithms are added (multiply) or subtracted
// (divide), a correction coefficient selected by the three MSBs of both
// fractions is added (multiply) or subtracted (divide), and the anti-logarithm
// is taken with a second barrel shift: 2^(K+f) ~ (1+f) * 2^K.
//
// Result formats (2W bits):
//   multiply  a*b, truncated to an integer (always fits 2W bits);
//   divide    a/b as an unsigned fixed-point number with W integer and W
//             fraction bits (value = result / 2^W), truncated.
// Special cases: a zero operand gives 0 for multiply; a/0 gives all ones and
// 0/b gives 0 for divide.
//
// The coefficient is not stored here: the lane drives ia/ib/div to a shared
// green_coef_rom port and receives coef (Q0.16) back, as in the architecture
// where the ROMs sit beside the lanes. The log/anti-log structure and the
// coefficient selection follow the architecture; the result formats, the
// truncation of the coefficient to the lane's fraction width and the
// zero-operand handling are this design's choices. Combinational.
module green_muldiv #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           div,
  output logic [2:0]     ia,
  output logic [2:0]     ib,
  input  logic [15:0]    coef,
  output logic [2*W-1:0] res
);
  localparam int unsigned F   = W - 1;            // fraction bits
  localparam int unsigned KW  = $clog2(W);        // bits of k
  localparam int unsigned LW  = F + $clog2(2*W) + 2; // signed log-sum width
  localparam int unsigned TW  = 2*W + F + 1;      // anti-log shifter width

  logic [KW-1:0] ka, kb;
  logic          nza, nzb;
  logic [F-1:0]  xa, xb;
  logic [F-1:0]  cf;
  logic signed [LW-1:0] l;
  logic [LW-1:0]  lk;
  logic [F:0]     mant;
  logic [TW-1:0]  sh;

  green_lod #(.W(W)) u_loda (.d(a), .pos(ka), .found(nza));
  green_lod #(.W(W)) u_lodb (.d(b), .pos(kb), .found(nzb));

  always_comb begin
    // input barrel shifters: left-align the bits under the leading one
    xa = F'((a << (KW'(F) - ka)) & {F{1'b1}});
    xb = F'((b << (KW'(F) - kb)) & {F{1'b1}});
    ia = xa[F-1 -: 3];
    ib = xb[F-1 -: 3];
  end

  always_comb begin
    cf = F'(coef >> (16 - F));

    if (!div)
      l = signed'((LW'(ka) + LW'(kb)) << F);
    else
      l = signed'((LW'(ka) + LW'(W) - LW'(kb)) << F);
    if (!div) l = l + LW'(xa) + LW'(xb) + LW'(cf);
    else      l = l + LW'(xa) - LW'(xb) - LW'(cf);

    // output barrel shifter: (1.f) * 2^K, then drop the F fraction bits
    lk   = LW'(l) >> F;
    mant = {1'b1, l[F-1:0]};
    sh   = TW'(mant) << lk;
    res  = (2*W)'(sh >> F);

    if (!div) begin
      if (!nza || !nzb)            res = '0;
      else if (lk > LW'(2*W - 1))  res = '1;
    end else begin
      if (!nzb)                    res = '1;
      else if (!nza || l < 0)      res = '0;
      else if (lk > LW'(2*W - 1))  res = '1;
    end
  end
endmodule
