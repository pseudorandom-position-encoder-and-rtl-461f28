// virtual_abs_encoder: digital part of a single-track ("virtual") absolute
// rotary encoder with serial pseudorandom-to-natural code conversion.
//
// The disc carries an incremental track, read by two detectors as quadrature
// signals A and B, and a pseudorandom code track read by one detector. Each
// transition of A while B = 0 produces a read pulse: it fires the code-track
// light source (led_pulse) and shifts the code bit into the code-forming
// register, to the left when turning clockwise and to the right when turning
// counter-clockwise. Once n bits have been read in one direction the register
// holds an n-bit window of the track; every new register content is handed to
// the serial converter, which turns it into the natural-binary code position p.
// The converter's direction of search is chosen from the MSB of the previous
// converted position. The two LSBs come straight from the quadrature signals,
// so the output is {p, lsb}: N + 2 bits, 4 * (2^N - 1) steps per turn.
//
// Interface:
//   a_in, b_in    squared quadrature signals (asynchronous)
//   code_bit      squared code-track detector output, sampled while led_pulse
//                 is high (the track model must present it in that clock)
//   led_pulse     one-clock pulse driving the code-track light source
//   position      {p, lsb}; p is updated when a conversion ends
//   code_valid    low after reset until n bits were read in one direction
//   pos_valid     code_valid, a conversion has finished without error, and no
//                 conversion is running (p matches the last read word)
//   conv_busy, conv_error, conv_direct  converter busy / word not on the
//                 sequence / last conversion searched with the direct law
//   dir_cw        direction of the last read (1 = clockwise)
// Timing: read pulse 3 clocks after an A edge; conversion starts one clock
// after the shift and takes k + 1 clocks for k shifts (k <= 2^N - 1). A new
// read during a conversion restarts the converter with the new word.
//
// The block structure (edge-triggered bit reading, direction from A, serial
// conversion with direction chosen by the previous MSB, quadrature LSBs,
// start-up validity) is the established one for this encoder type. The
// restart policy, the pos_valid / conv_error / conv_direct status outputs and
// the input synchronisers are choices of this design.
module virtual_abs_encoder #(
  parameter int unsigned N = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           a_in,
  input  logic           b_in,
  input  logic           code_bit,
  output logic           led_pulse,
  output logic [N+1:0]   position,
  output logic           code_valid,
  output logic           pos_valid,
  output logic           conv_busy,
  output logic           conv_error,
  output logic           conv_direct,
  output logic           dir_cw
);

  logic         a_s, b_s;
  logic         read_pulse, shift_cw, shift_ccw;
  logic [1:0]   lsb;
  logic [N:1]   word;
  logic         read_d, start;
  logic         conv_done;
  logic [N-1:0] conv_pos;
  logic [N-1:0] code_pos;
  logic         prev_msb;
  logic         have_pos;

  read_pulse_gen u_read (
    .clk, .rst_n, .a_in, .b_in,
    .a_s, .b_s, .read_pulse, .shift_cw, .shift_ccw
  );

  quad_lsb_decoder u_lsb (.a(a_s), .b(b_s), .lsb);

  code_shift_register #(.N(N)) u_code (
    .clk, .rst_n,
    .shift_left (shift_cw),
    .shift_right(shift_ccw),
    .bit_in     (code_bit),
    .word
  );

  startup_validity #(.N(N)) u_valid (
    .clk, .rst_n,
    .read_cw (shift_cw),
    .read_ccw(shift_ccw),
    .valid   (code_valid)
  );

  serial_code_converter #(.N(N)) u_conv (
    .clk, .rst_n,
    .start,
    .word,
    .use_direct (prev_msb),
    .busy       (conv_busy),
    .done       (conv_done),
    .position   (conv_pos),
    .error      (conv_error),
    .used_direct(conv_direct)
  );

  // A conversion starts on the clock after every shift of the code register,
  // once the register holds a genuine code word (validity rises on the same
  // edge as the n-th shift, so that shift starts one as well).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      read_d   <= 1'b0;
      dir_cw   <= 1'b0;
      code_pos <= '0;
      prev_msb <= 1'b0;    // no preceding position yet: inverse search
      have_pos <= 1'b0;
    end else begin
      read_d <= read_pulse;
      if (read_pulse)
        dir_cw <= shift_cw;
      if (conv_done && !conv_error) begin
        code_pos <= conv_pos;
        prev_msb <= conv_pos[N-1];
        have_pos <= 1'b1;
      end
    end
  end

  assign start = read_d && code_valid;

  assign led_pulse = read_pulse;
  assign position  = {code_pos, lsb};
  assign pos_valid = code_valid && have_pos && !conv_busy && !start && !conv_error;

endmodule
