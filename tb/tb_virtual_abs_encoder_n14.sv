// tb_virtual_abs_encoder_n14: end-to-end test of the encoder built with the
// longest register of the feedback table, n = 14 (16-bit output), starting
// next to the zero position so that the walk wraps around the turn.
// Disc model and checker: enc_env.
module tb_virtual_abs_encoder_n14;
  localparam int unsigned N = 14;

  logic clk = 0;
  logic rst_n, a_in, b_in, code_bit;
  logic led_pulse, code_valid, pos_valid, conv_busy, conv_error, conv_direct, dir_cw;
  logic [N+1:0] position;
  int checks, failures;
  logic finished;

  always #5 clk = ~clk;

  virtual_abs_encoder #(.N(N)) dut (
    .clk, .rst_n, .a_in, .b_in, .code_bit, .led_pulse, .position,
    .code_valid, .pos_valid, .conv_busy, .conv_error, .conv_direct, .dir_cw
  );

  enc_env #(.N(N), .TAPS(14'b1000010001000), .MOVES(500), .START(2), .MAXSEG(200)) env (
    .clk, .rst_n, .a_in, .b_in, .code_bit, .led_pulse, .position,
    .code_valid, .pos_valid, .conv_busy, .conv_error, .conv_direct, .dir_cw,
    .start(dut.start), .done(dut.conv_done), .conv_pos(dut.conv_pos),
    .checks, .failures, .finished
  );

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
