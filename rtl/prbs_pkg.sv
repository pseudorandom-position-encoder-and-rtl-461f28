// prbs_pkg: feedback taps of the maximal-length shift-register (pseudorandom)
// codes used on the encoder's code track, for register lengths n = 3..14.
//
// The register is X(n) .. X(1), X(n) being the most significant bit. The
// "direct" generator shifts left and feeds
//     X(1) <= X(n) ^ c(n-1)X(n-1) ^ ... ^ c(1)X(1)
// and the "inverse" generator, which undoes one direct step, shifts right and
// feeds
//     X(n) <= X(1) ^ b(2)X(2) ^ ... ^ b(n)X(n),   with b(k+1) = c(k).
// direct_taps(n) returns the c(k) set (bit k of the mask = c(k), k < n);
// inverse_taps(n) returns the b(k) set (bit k of the mask = b(k), k > 1).
// X(n) in the direct law and X(1) in the inverse law are always present and are
// not part of the masks. All tap sets were checked to give period 2^n - 1;
// for n = 9 the taps X(9) ^ X(5) are used.
package prbs_pkg;

  localparam int unsigned MIN_N = 3;
  localparam int unsigned MAX_N = 14;

  typedef logic [MAX_N:1] tapmask_t;

  function automatic tapmask_t direct_taps(int unsigned n);
    tapmask_t m = '0;
    case (n)
      3:  m[1] = 1'b1;
      4:  m[1] = 1'b1;
      5:  m[2] = 1'b1;
      6:  m[1] = 1'b1;
      7:  m[3] = 1'b1;
      8:  begin m[4] = 1'b1; m[3] = 1'b1; m[2] = 1'b1; end
      9:  m[5] = 1'b1;
      10: m[3] = 1'b1;
      11: m[2] = 1'b1;
      12: begin m[6] = 1'b1; m[4] = 1'b1; m[1] = 1'b1; end
      13: begin m[10] = 1'b1; m[6] = 1'b1; m[4] = 1'b1; end
      14: begin m[13] = 1'b1; m[8] = 1'b1; m[4] = 1'b1; end
      default: m = '0;
    endcase
    return m;
  endfunction

  function automatic tapmask_t inverse_taps(int unsigned n);
    return direct_taps(n) << 1;
  endfunction

endpackage
