// serial_code_converter: pseudorandom-to-natural code conversion by counting
// generator steps, walking in whichever direction is shorter.
//
// Every n-bit window of a maximal-length shift-register sequence is reached
// from a fixed initial window INIT_WORD in a unique number of generator steps,
// and that number is the position p (0 .. 2^n - 2). The converter loads the
// word that was read into a bidirectional working register and clocks it until
// it equals INIT_WORD, counting the shifts:
//   * inverse mode (shift right, inverse feedback): the count is p itself;
//   * direct mode  (shift left, direct feedback): the walk goes forward round
//     the cycle and the count m equals 2^n - 1 - p, so the position is the
//     bitwise complement of the count (one exclusive-OR per bit with the mode
//     bit). A count of 0 in direct mode means p = 0, not the all-ones value.
// The mode comes from the MSB of the preceding converted position: positions
// in the upper half of the range are nearer to INIT_WORD going forward, so an
// MSB of 1 selects direct mode. With a nearby preceding position a conversion
// takes at most about 2^(n-1) shifts instead of up to 2^n - 2 when only the
// inverse law is used. A wrong mode bit (e.g. at power-up) only lengthens the
// conversion; the result is still exact.
//
// Counting steps to a reference window and choosing the walk direction from
// the previous MSB, with EXOR complementing of the count, is the method this
// converter implements. The m = 0 correction, the error guard, the restart on a
// new start and the choice of all ones as reference window are additions of
// this design.
//
// A word that is not on the sequence (all zeros, or a misread word) would never
// reach INIT_WORD; after 2^n - 1 shifts the conversion stops with error set.
//
// Interface: start (one clock) with word and use_direct; busy while
// converting; done pulses for one clock with position, error and used_direct
// valid (they hold until the next done). A start while busy abandons the
// running conversion and begins the new one.
// Timing: done comes k + 1 clocks after start, where k is the number of shifts.
module serial_code_converter #(
  parameter int unsigned      N         = 3,
  parameter logic [N:1]       INIT_WORD = '1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N:1]     word,
  input  logic           use_direct,
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   position,
  output logic           error,
  output logic           used_direct
);

  import prbs_pkg::*;

  localparam tapmask_t    DTAPS = direct_taps(N);
  localparam tapmask_t    ITAPS = inverse_taps(N);
  localparam logic [N:1]  DMASK = DTAPS[N:1];
  localparam logic [N:1]  IMASK = ITAPS[N:1];

  if (N < MIN_N || N > MAX_N) begin : g_bad_n
    $error("serial_code_converter: N must be in 3..14 (feedback table)");
  end

  logic [N:1]   sr;        // working (bidirectional) shift register
  logic [N-1:0] count;     // shift counter
  logic         dir_left;  // 1: direct law, shift left

  logic         at_init;
  logic         exhausted;
  logic         fb_direct;
  logic         fb_inverse;
  logic [N-1:0] result;

  always_comb begin
    at_init    = (sr == INIT_WORD);
    exhausted  = (count == '1);                      // 2^n - 1 shifts made
    fb_direct  = sr[N] ^ (^(sr & DMASK));            // new X(1)
    fb_inverse = sr[1] ^ (^(sr & IMASK));            // new X(n)
    // complement of the count in direct mode; m = 0 there is position 0
    result     = (dir_left && count != '0) ? ~count : count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      count       <= '0;
      dir_left    <= 1'b0;
      busy        <= 1'b0;
      done        <= 1'b0;
      position    <= '0;
      error       <= 1'b0;
      used_direct <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        sr       <= word;
        count    <= '0;
        dir_left <= use_direct;
        busy     <= 1'b1;
      end else if (busy) begin
        if (at_init || exhausted) begin
          busy        <= 1'b0;
          done        <= 1'b1;
          position    <= result;
          error       <= !at_init;
          used_direct <= dir_left;
        end else begin
          sr    <= dir_left ? {sr[N-1:1], fb_direct} : {fb_inverse, sr[N:2]};
          count <= count + 1'b1;
        end
      end
    end
  end

  a_done_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                     done |=> !done);

endmodule
