// kom_xor_net: the XOR network of one Karatsuba-Ofman level over GF(2)[x].
//
// Operands of N bits are split into halves, A = A1*x^(N/2) + A0 and likewise
// B. The network forms the pre-additions SA = A1+A0 and SB = B1+B0 that feed
// the middle product, and recombines the three half-width products
//   T1 = A1*B1,  T2 = (A1+A0)*(B1+B0),  T3 = A0*B0
// into   P = T1*x^N + (T1+T2+T3)*x^(N/2) + T3,
// the 2N-1 bit polynomial product. Over GF(2) addition and subtraction are
// both XOR, so the Karatsuba middle term needs no subtractor. Purely
// combinational; N must be even.
module kom_xor_net #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N/2-1:0] sa,
  output logic [N/2-1:0] sb,
  input  logic [N-2:0]   t1,
  input  logic [N-2:0]   t2,
  input  logic [N-2:0]   t3,
  output logic [2*N-2:0] p
);
  localparam int unsigned H = N / 2;

  always_comb begin
    sa = a[N-1:H] ^ a[H-1:0];
    sb = b[N-1:H] ^ b[H-1:0];
  end

  logic [2*N-2:0] mid;
  always_comb begin
    mid = '0;
    mid[H +: N-1] = t1 ^ t2 ^ t3;
    p = mid;
    p[N +: N-1] = p[N +: N-1] ^ t1;
    p[0 +: N-1] = p[0 +: N-1] ^ t3;
  end

endmodule
