// quad_lsb_decoder: the two least significant position bits from the
// quadrature signals of the synchronisation track.
//
// One code-track bit spans one full quadrature cycle, so the four quadrature
// states split every code position into four. Code bits are read on the
// transition of A while B = 0, so that edge is where a code position begins.
// Turning clockwise, the states within a code position are (A,B) = 10, 11, 01,
// 00, numbered 0..3. That is a Gray sequence; it is turned into binary with one
// inversion and one exclusive-OR:
//     lsb[1] = ~A,   lsb[0] = A ^ ~B   (~B is the complement of B that the read
//     pulse logic already uses).
// Interface: a, b synchronised quadrature levels; lsb the two LSBs. Purely
// combinational.
// The one-EXOR-one-inverter structure is the classic one; which state is
// numbered 0 is this design's choice, tied to where the read edge lies.
module quad_lsb_decoder (
  input  logic       a,
  input  logic       b,
  output logic [1:0] lsb
);

  always_comb begin
    lsb[1] = ~a;
    lsb[0] = a ^ ~b;
  end

endmodule
