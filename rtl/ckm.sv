// ckm: combinational recursive Karatsuba-Ofman multiplier (CKM) over GF(2)[x].
//
// CKM1 is a single AND gate. CKM of width N (a power of two) splits both
// operands into halves, computes A1*B1, (A1+A0)*(B1+B0) and A0*B0 with three
// CKMs of width N/2, and recombines them with the XOR network. The recursion
// is built with a self-instantiating generate, so CKM16 contains 3^4 = 81 AND
// gates. Inputs a, b of N bits; output p of 2N-1 bits; no clock, no state.
// Lint note: Verilator's -Wall lint of a self-instantiating module reports
// the half-product nets t1..t3 as undriven and the half sums as unused,
// because it checks the recursive module body apart from its instances. The
// nets are driven by the three sub-instances, as simulation and synthesis
// (81 AND gates for N=16) confirm.
module ckm #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);
  if (N == 1) begin : g_leaf
    always_comb p = a & b;
  end else begin : g_split
    localparam int unsigned H = N / 2;
    logic [H-1:0]   sa, sb;
    logic [2*H-2:0] t1, t2, t3;

    kom_xor_net #(.N(N)) u_xor (
      .a(a), .b(b), .sa(sa), .sb(sb), .t1(t1), .t2(t2), .t3(t3), .p(p)
    );
    ckm #(.N(H)) u_hi  (.a(a[N-1:H]), .b(b[N-1:H]), .p(t1));
    ckm #(.N(H)) u_mid (.a(sa),       .b(sb),       .p(t2));
    ckm #(.N(H)) u_lo  (.a(a[H-1:0]), .b(b[H-1:0]), .p(t3));
  end

  initial begin
    assert ((N & (N - 1)) == 0 && N >= 1)
      else $error("ckm: N=%0d must be a power of two", N);
  end

endmodule
