// code_shift_register: the code-forming shift register of a single-detector
// pseudorandom encoder.
//
// Only one code-track bit is read per code position. Moving clockwise, the
// register shifts left (X(i) <= X(i-1)) and the new bit enters at X(1); moving
// counter-clockwise it shifts right (X(i) <= X(i+1)) and the new bit enters at
// X(n). After n reads in one direction the register holds the n-bit window of
// the track that names the current position.
// The shift directions and input ends follow the usual scheme for
// single-detector pseudorandom encoders; clearing the word at reset is a choice
// of this design.
//
// Interface: shift_left / shift_right one-clock commands (never both), bit_in
// the code bit read during the command, word = {X(n), ..., X(1)}.
// Timing: word changes on the clock edge that ends the command. Reset clears
// the word (it is not valid until n bits have been read anyway).
module code_shift_register #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_left,
  input  logic         shift_right,
  input  logic         bit_in,
  output logic [N:1]   word
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      word <= '0;
    else if (shift_left)
      word <= {word[N-1:1], bit_in};
    else if (shift_right)
      word <= {bit_in, word[N:2]};
  end

  // The direction logic never asks for both shifts at once.
  a_one_direction: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(shift_left && shift_right));

endmodule
