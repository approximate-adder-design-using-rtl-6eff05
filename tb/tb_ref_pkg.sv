// tb_ref_pkg: reference models shared by the testbenches.
//
// Everything here is written from the published truth tables and the DCT
// definition, independently of the RTL: the cell tables are 8-bit constants
// indexed by {A, B, Cin}, the word adder is a bit-serial loop over them and
// the DCT coefficients are computed with real arithmetic.
package tb_ref_pkg;
  import cpl_pkg::*;

  // bit {a,b,cin} of each constant is the cell output for that input row
  function automatic logic [7:0] sum_table(cpl_kind_e kind);
    case (kind)
      CPL_APPROX2: return 8'h9F;
      CPL_APPROX3: return 8'h9E;
      CPL_APPROX4: return 8'h9D;
      default:     return 8'h96;   // exact full adder
    endcase
  endfunction

  function automatic logic [7:0] cout_table(cpl_kind_e kind);
    case (kind)
      CPL_APPROX3, CPL_APPROX4: return 8'hA8;
      default:                  return 8'hE8;
    endcase
  endfunction

  // WIDTH-bit ripple add, cells of `kind` in the `lsbs` low bits
  function automatic longint unsigned ref_add(longint unsigned a, longint unsigned b,
                                              int width, cpl_kind_e kind, int lsbs);
    longint unsigned s;
    logic c;
    cpl_kind_e k;
    logic [2:0] row;
    logic [7:0] st, ct;
    s = 0;
    c = 1'b0;
    for (int i = 0; i < width; i++) begin
      k   = (i < lsbs) ? kind : CPL_CONV;
      row = {a[i], b[i], c};
      st  = sum_table(k);
      ct  = cout_table(k);
      s[i] = st[row];
      c    = ct[row];
    end
    return s;
  endfunction

  // C(k,n) = round(256 * a(k) * cos((2n+1) k pi / 16))
  function automatic int ref_coef(int k, int n);
    real pi, ak, v;
    pi = 3.14159265358979323846;
    ak = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    v  = 256.0 * ak * $cos((2.0 * n + 1.0) * k * pi / 16.0);
    return int'($floor(v + 0.5));
  endfunction

  // Y(k) as the hardware forms it: eight products accumulated through the
  // ACC_W-bit adder; result returned sign-extended
  function automatic int ref_dct(logic [7:0] x [8], int k, cpl_kind_e kind, int lsbs, int accw);
    longint unsigned acc, mask, a;
    longint signed p;
    acc  = 0;
    mask = (64'd1 << accw) - 1;
    for (int n = 0; n < 8; n++) begin
      p = longint'(x[n]) * longint'(ref_coef(k, n));
      a = (n == 0) ? 0 : acc;
      acc = ref_add(a, longint'(p) & mask, accw, kind, lsbs) & mask;
    end
    if (acc[accw-1]) return int'(longint'(acc) - (longint'(1) << accw));
    return int'(acc);
  endfunction

  // exact real-valued DCT-II, scaled by 256
  function automatic real real_dct(logic [7:0] x [8], int k);
    real pi, ak, s;
    pi = 3.14159265358979323846;
    ak = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    s  = 0.0;
    for (int n = 0; n < 8; n++) s += real'(x[n]) * $cos((2.0 * n + 1.0) * k * pi / 16.0);
    return 256.0 * ak * s;
  endfunction

endpackage
