// tb_virtual_abs_encoder: end-to-end test of the encoder at its default size
// (5-bit output: 3-bit pseudorandom code plus two quadrature bits), driven by
// the disc model and checker in enc_env.
module tb_virtual_abs_encoder;
  localparam int unsigned N = 3;      // the encoder's default register length

  logic clk = 0;
  logic rst_n, a_in, b_in, code_bit;
  logic led_pulse, code_valid, pos_valid, conv_busy, conv_error, conv_direct, dir_cw;
  logic [N+1:0] position;
  int checks, failures;
  logic finished;

  always #5 clk = ~clk;

  virtual_abs_encoder dut (
    .clk, .rst_n, .a_in, .b_in, .code_bit, .led_pulse, .position,
    .code_valid, .pos_valid, .conv_busy, .conv_error, .conv_direct, .dir_cw
  );

  enc_env #(.N(N), .TAPS(1), .MOVES(1500)) env (
    .clk, .rst_n, .a_in, .b_in, .code_bit, .led_pulse, .position,
    .code_valid, .pos_valid, .conv_busy, .conv_error, .conv_direct, .dir_cw,
    .start(dut.start), .done(dut.conv_done), .conv_pos(dut.conv_pos),
    .checks, .failures, .finished
  );

  initial begin
    repeat (2_000_000) @(posedge clk);
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
