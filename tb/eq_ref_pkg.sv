// eq_ref_pkg: reference arithmetic for the equalizer-core testbenches,
// written with plain integers and independently of the RTL:
//   fir()       y = sum coeff[i] * x[n-i] for 8 taps (coeff[0] on the newest)
//   err_term()  | (y >>> 7) - (+/-8192) | for one PRS bit
//   sat16()     clamps an error total to 16 bits
package eq_ref_pkg;

  localparam logic [7:0] REF_PRS   = 8'b1011_0010;
  localparam int         REF_LEVEL = 8192;
  localparam int         REF_DELAY = 4;

  function automatic longint fir(input logic [63:0] coeffs, input int x [8]);
    longint acc = 0;
    for (int i = 0; i < 8; i++) begin
      int c = int'($signed(coeffs[8*i +: 8]));
      acc += longint'(c) * longint'(x[i]);
    end
    return acc;
  endfunction

  // floor division by 128 (arithmetic shift of a signed value)
  function automatic longint scale(input longint y);
    longint q = y / 128;
    if (y < 0 && (q * 128) != y) q -= 1;
    return q;
  endfunction

  function automatic longint err_term(input longint y, input bit prs_bit);
    longint d = scale(y) - (prs_bit ? longint'(REF_LEVEL) : -longint'(REF_LEVEL));
    return d < 0 ? -d : d;
  endfunction

  function automatic int sat16(input longint v);
    return v > 65535 ? 65535 : int'(v);
  endfunction

endpackage
