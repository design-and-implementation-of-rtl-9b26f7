// fpm_ref_pkg: reference model of the multiplier's arithmetic for the
// testbenches, written with plain integer arithmetic (a 64-bit multiply in
// place of the Booth tree). Semantics: denormal operands flush to a signed
// zero with the underflow flag, results are truncated, exponent >= 255 after
// normalization gives a signed infinity with the overflow flag, exponent
// <= 0 a signed zero with the underflow flag, NaN operands and 0 x inf give
// the quiet NaN {sign, 8'hFF, 23'h400000} with the nan flag, an infinite
// operand gives a signed infinity with the inf flag.
package fpm_ref_pkg;

  typedef struct packed {
    logic und;
    logic ovf;
    logic nan;
    logic inf;
  } ref_flags_t;

  function automatic void fp_mul_ref(input logic [31:0] a, input logic [31:0] b,
                                     output logic [31:0] r, output ref_flags_t fl);
    logic        s;
    int          ea, eb, e;
    longint      ma, mb, p;
    bit          za, zb, da, db, ia, ib, na, nb;
    s  = a[31] ^ b[31];
    ea = int'(a[30:23]);
    eb = int'(b[30:23]);
    za = (ea == 0);            zb = (eb == 0);
    da = za && (a[22:0] != 0); db = zb && (b[22:0] != 0);
    ia = (ea == 255) && (a[22:0] == 0);
    ib = (eb == 255) && (b[22:0] == 0);
    na = (ea == 255) && (a[22:0] != 0);
    nb = (eb == 255) && (b[22:0] != 0);
    fl = '0;
    if (na || nb || (ia && zb) || (ib && za)) begin
      r = {s, 8'hFF, 23'h40_0000}; fl.nan = 1;
    end else if (ia || ib) begin
      r = {s, 8'hFF, 23'h0}; fl.inf = 1;
    end else if (za || zb) begin
      r = {s, 31'h0}; fl.und = da || db;
    end else begin
      ma = longint'({1'b1, a[22:0]});
      mb = longint'({1'b1, b[22:0]});
      p  = ma * mb;
      e  = ea + eb - 127;
      if (p >= (64'sd1 <<< 47)) begin
        e = e + 1;
        r = {s, 8'(e), 23'((p >>> 24) & 64'h7F_FFFF)};
      end else begin
        r = {s, 8'(e), 23'((p >>> 23) & 64'h7F_FFFF)};
      end
      if (e >= 255) begin
        r = {s, 8'hFF, 23'h0}; fl.ovf = 1;
      end else if (e <= 0) begin
        r = {s, 31'h0}; fl.und = 1;
      end
    end
  endfunction

endpackage
