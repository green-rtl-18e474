// green_ref_pkg: behavioural reference of the GREEN ALU for the testbenches.
//
// Written independently of the RTL as plain integer arithmetic: the leading
// one is found with a loop, the fraction by subtracting the leading power of
// two, and the anti-logarithm with a 64-bit shift. Only the coefficient
// tables are shared with the design (green_pkg); tb_green_coef_rom checks
// those tables against numerically integrated corrections.
package green_ref_pkg;
  import green_pkg::*;

  function automatic int unsigned flog2(longint unsigned v);
    int unsigned k = 0;
    while ((v >> (k + 1)) != 0) k++;
    return k;
  endfunction

  // Approximate W-bit multiply (2W-bit product) or divide (W.W fixed point).
  function automatic longint unsigned ref_md(int unsigned w, longint unsigned a,
                                             longint unsigned b, bit div);
    int unsigned f = w - 1;
    int unsigned ka, kb, ia, ib, hi, lo, kk;
    longint unsigned xa, xb, cf, fr, res;
    longint signed l;
    longint unsigned full = (64'd1 << (2 * w)) - 1;
    if (div) begin
      if (b == 0) return full;
      if (a == 0) return 0;
    end else if (a == 0 || b == 0) return 0;
    ka = flog2(a); kb = flog2(b);
    xa = (a - (64'd1 << ka)) << (f - ka);
    xb = (b - (64'd1 << kb)) << (f - kb);
    ia = int'(xa >> (f - 3)); ib = int'(xb >> (f - 3));
    hi = (ia > ib) ? ia : ib; lo = (ia > ib) ? ib : ia;
    if (div) cf = 64'(DIV_COEF[ia * 8 + ib]) >> (16 - f);
    else     cf = 64'(MUL_COEF[hi * 4 + lo / 2]) >> (16 - f);
    if (div) l = longint'((ka + w - kb) * (64'd1 << f)) + longint'(xa) - longint'(xb) - longint'(cf);
    else     l = longint'((ka + kb) * (64'd1 << f)) + longint'(xa) + longint'(xb) + longint'(cf);
    if (l < 0) return 0;
    kk = int'(l / (64'sd1 <<< f));
    fr = 64'(l) % (64'd1 << f);
    if (kk > 2 * w - 1) return full;
    res = (((64'd1 << f) + fr) << kk) >> f;
    return res & full;
  endfunction

  // Reference ALU: sub-operations listed from slice 3 downward.
  // code per group: 0 add, 1 mul, 2 div; span in slices.
  function automatic logic [31:0] ref_alu(logic [3:0] op, logic [15:0] a, logic [15:0] b);
    int unsigned fn [4];
    int unsigned sp [4];
    int unsigned n, top, w, lsl;
    logic [31:0] y = 0;
    longint signed sa, sb;
    longint unsigned r;
    case (op)
      4'd0:  begin n = 1; fn = '{0,0,0,0}; sp = '{4,0,0,0}; end
      4'd1:  begin n = 1; fn = '{1,0,0,0}; sp = '{4,0,0,0}; end
      4'd2:  begin n = 1; fn = '{2,0,0,0}; sp = '{4,0,0,0}; end
      4'd3:  begin n = 2; fn = '{0,0,0,0}; sp = '{2,2,0,0}; end
      4'd4:  begin n = 3; fn = '{0,0,0,0}; sp = '{2,1,1,0}; end
      4'd5:  begin n = 4; fn = '{0,0,0,0}; sp = '{1,1,1,1}; end
      4'd6:  begin n = 2; fn = '{1,1,0,0}; sp = '{2,2,0,0}; end
      4'd7:  begin n = 4; fn = '{1,1,1,1}; sp = '{1,1,1,1}; end
      4'd8:  begin n = 2; fn = '{2,2,0,0}; sp = '{2,2,0,0}; end
      4'd9:  begin n = 4; fn = '{2,2,2,2}; sp = '{1,1,1,1}; end
      4'd10: begin n = 4; fn = '{0,1,1,1}; sp = '{1,1,1,1}; end
      4'd11: begin n = 3; fn = '{0,0,2,0}; sp = '{1,1,2,0}; end
      4'd12: begin n = 3; fn = '{0,1,2,0}; sp = '{1,2,1,0}; end
      4'd13: begin n = 3; fn = '{0,1,2,0}; sp = '{1,1,2,0}; end
      4'd14: begin n = 3; fn = '{1,2,2,0}; sp = '{2,1,1,0}; end
      default: begin n = 2; fn = '{0,1,0,0}; sp = '{2,2,0,0}; end
    endcase
    top = 4;
    for (int g = 0; g < int'(n); g++) begin
      lsl = top - sp[g];          // lowest slice of the group
      w   = 4 * sp[g];            // operand width
      if (fn[g] == 0) begin
        sa = longint'(a >> (4 * lsl)) & ((64'sd1 <<< w) - 1);
        sb = longint'(b >> (4 * lsl)) & ((64'sd1 <<< w) - 1);
        if (sa >= (64'sd1 <<< (w - 1))) sa -= (64'sd1 <<< w);
        if (sb >= (64'sd1 <<< (w - 1))) sb -= (64'sd1 <<< w);
        r = 64'(sa + sb);
      end else begin
        r = ref_md(w, (64'(a) >> (4 * lsl)) & ((64'd1 << w) - 1),
                      (64'(b) >> (4 * lsl)) & ((64'd1 << w) - 1), fn[g] == 2);
      end
      for (int i = 0; i < int'(2 * w); i++) y[8 * lsl + i] = r[i];
      top = lsl;
    end
    return y;
  endfunction
endpackage
