// mc_ref_pkg: reference model of the matrix code for the testbenches,
// written independently of the RTL. A row of up to 32 data bits is laid into
// an extended Hamming codeword position by position (1-based positions,
// powers of two hold check bits), the check bits are the parities of the
// positions they cover, and the last bit is the overall parity.
package mc_ref_pkg;

  function automatic int unsigned ref_r(input int unsigned k);
    int unsigned r;
    r = 0;
    while ((2 ** r) < k + r + 1) r++;
    return r;
  endfunction

  // Returns {overall, hamming[r-1:0]} in the low r+1 bits.
  function automatic logic [7:0] ref_row_check(input logic [31:0] d, input int unsigned k);
    int unsigned r;
    int unsigned pos;
    int unsigned idx;
    logic [63:0] cw;
    logic [7:0]  res;
    r   = ref_r(k);
    cw  = '0;
    idx = 0;
    pos = 1;
    while (idx < k) begin
      if ((pos & (pos - 1)) != 0) begin
        cw[pos] = d[idx];
        idx++;
      end
      pos++;
    end
    res = '0;
    for (int unsigned j = 0; j < r; j++)
      for (int unsigned p = 1; p < 64; p++)
        if (p[j]) res[j] ^= cw[p];
    res[r] = ^d[31:0] ^ ^res[6:0];
    return res;
  endfunction

endpackage
