// rkm_tb_pkg: reference model shared by the testbenches.
//
// clmul() is a schoolbook carry-less (GF(2)[x]) multiplication of the low n
// bits of a and b, written independently of the Karatsuba structure under
// test: the product is the XOR of a shifted left by every set bit of b.
package rkm_tb_pkg;

  function automatic logic [254:0] clmul(logic [127:0] a, logic [127:0] b, int unsigned n);
    logic [254:0] r;
    r = '0;
    for (int unsigned i = 0; i < n; i++)
      if (b[i])
        for (int unsigned k = 0; k < n; k++)
          if (a[k]) r[i + k] = ~r[i + k];
    return r;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // Operand patterns: random, all ones, single bits and zero.
  function automatic logic [127:0] pattern(int unsigned k);
    case (k % 8)
      0:       return '1;
      1:       return 128'd1;
      2:       return 128'd1 << 127;
      3:       return '0;
      default: return rand128();
    endcase
  endfunction

endpackage
