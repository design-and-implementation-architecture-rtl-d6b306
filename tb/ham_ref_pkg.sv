// ham_ref_pkg: reference model of the 13-bit Hamming code for the
// testbenches, written position by position (positions 1..12 of the classic
// code, check bits at the powers of two) rather than with the equations used
// in the design, so the two can be compared.
package ham_ref_pkg;

  // Encode: place data in the non-power-of-two positions in increasing
  // order, compute each check bit as the parity of the positions whose index
  // has that bit set, then lay out {p8, p4, p2, p1, overall, data}.
  function automatic logic [12:0] ref_encode(logic [7:0] d);
    logic [12:1] w;
    int          k;
    logic [3:0]  p;
    logic        all;
    w = '0;
    k = 0;
    for (int pos = 1; pos <= 12; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        w[pos] = d[k];
        k++;
      end
    end
    for (int b = 0; b < 4; b++) begin
      p[b] = 1'b0;
      for (int pos = 1; pos <= 12; pos++)
        if (((pos >> b) & 1) == 1 && (pos & (pos - 1)) != 0) p[b] ^= w[pos];
    end
    all = (^d) ^ (^p);
    return {p[3], p[2], p[1], p[0], all, d};
  endfunction

  function automatic int popcount13(logic [12:0] v);
    int n = 0;
    for (int i = 0; i < 13; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
