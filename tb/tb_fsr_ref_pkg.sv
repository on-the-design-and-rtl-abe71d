// tb_fsr_ref_pkg: reference values for the encoder testbenches.
//
// poly_mod() and parity_of() compute remainders and parity bits by plain
// long division on a bit vector, independently of the shift-register
// structure under test. TABLE1 holds the stage patterns B3 B2 B1 B0 seen
// when the four-stage register, preset to B3..B0 = 0100, free-runs with
// g(x) = x^4 + x + 1: the first row is the pattern after the first pulse,
// and the 15th row equals the starting pattern again.
package tb_fsr_ref_pkg;

  localparam int unsigned MAXW = 32;

  // Remainder of the nbits-bit polynomial v divided by g of degree r.
  // Bit i of the result is the coefficient of x^i.
  function automatic logic [MAXW-1:0] poly_mod(input logic [2*MAXW-1:0] v,
                                               input int unsigned nbits,
                                               input int unsigned r,
                                               input logic [MAXW-1:0] g);
    logic [2*MAXW-1:0] w;
    w = v;
    for (int i = int'(nbits) - 1; i >= int'(r); i--) begin
      if (w[i]) w = w ^ ({{MAXW{1'b0}}, g} << (i - int'(r)));
    end
    return w[MAXW-1:0] & ((MAXW'(1) << r) - 1);
  endfunction

  // Parity bits of the k-bit information word d: (d * x^r) mod g.
  function automatic logic [MAXW-1:0] parity_of(input logic [MAXW-1:0] d,
                                                input int unsigned k,
                                                input int unsigned r,
                                                input logic [MAXW-1:0] g);
    return poly_mod({{MAXW{1'b0}}, d} << r, k + r, r, g);
  endfunction

  // True when the n-bit word c is a multiple of g (degree r).
  function automatic bit divisible(input logic [MAXW-1:0] c,
                                   input int unsigned n,
                                   input int unsigned r,
                                   input logic [MAXW-1:0] g);
    return poly_mod({{MAXW{1'b0}}, c}, n, r, g) == '0;
  endfunction

  // Stage patterns {B3, B2, B1, B0} after pulses 1..15 from B3..B0 = 0100.
  localparam logic [3:0] TABLE1 [15] = '{
    4'b0010, 4'b0001, 4'b1100, 4'b0110, 4'b0011,
    4'b1101, 4'b1010, 4'b0101, 4'b1110, 4'b0111,
    4'b1111, 4'b1011, 4'b1001, 4'b1000, 4'b0100
  };
  localparam logic [3:0] TABLE1_START = 4'b0100;

endpackage
