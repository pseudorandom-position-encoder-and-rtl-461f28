// tb_serial_code_converter: runs conv_checker for every register length from
// 3 to 14 (the feedback laws of the whole table), exhaustively up to n = 10
// and on random subsets above.
module tb_serial_code_converter;
  logic clk = 0, rst_n = 0;
  int checks, failures;

  localparam int NCH = 12;
  int          c [NCH];
  int          f [NCH];
  logic [NCH-1:0] fin;

  always #5 clk = ~clk;

  // direct-law taps other than X(n), bit k-1 for X(k), written independently
  // of the design's package
  conv_checker #(.N(3),  .STRIDE(1),  .TAPS(14'b1))                    k3  (.clk, .rst_n, .checks(c[0]),  .failures(f[0]),  .finished(fin[0]));
  conv_checker #(.N(4),  .STRIDE(1),  .TAPS(14'b1))                    k4  (.clk, .rst_n, .checks(c[1]),  .failures(f[1]),  .finished(fin[1]));
  conv_checker #(.N(5),  .STRIDE(1),  .TAPS(14'b10))                   k5  (.clk, .rst_n, .checks(c[2]),  .failures(f[2]),  .finished(fin[2]));
  conv_checker #(.N(6),  .STRIDE(1),  .TAPS(14'b1))                    k6  (.clk, .rst_n, .checks(c[3]),  .failures(f[3]),  .finished(fin[3]));
  conv_checker #(.N(7),  .STRIDE(1),  .TAPS(14'b100))                  k7  (.clk, .rst_n, .checks(c[4]),  .failures(f[4]),  .finished(fin[4]));
  conv_checker #(.N(8),  .STRIDE(1),  .TAPS(14'b1110))                 k8  (.clk, .rst_n, .checks(c[5]),  .failures(f[5]),  .finished(fin[5]));
  conv_checker #(.N(9),  .STRIDE(1),  .TAPS(14'b10000))                k9  (.clk, .rst_n, .checks(c[6]),  .failures(f[6]),  .finished(fin[6]));
  conv_checker #(.N(10), .STRIDE(1),  .TAPS(14'b100))                  k10 (.clk, .rst_n, .checks(c[7]),  .failures(f[7]),  .finished(fin[7]));
  conv_checker #(.N(11), .STRIDE(8),  .TAPS(14'b10))                   k11 (.clk, .rst_n, .checks(c[8]),  .failures(f[8]),  .finished(fin[8]));
  conv_checker #(.N(12), .STRIDE(16), .TAPS(14'b101001))               k12 (.clk, .rst_n, .checks(c[9]),  .failures(f[9]),  .finished(fin[9]));
  conv_checker #(.N(13), .STRIDE(32), .TAPS(14'b1000101000))           k13 (.clk, .rst_n, .checks(c[10]), .failures(f[10]), .finished(fin[10]));
  conv_checker #(.N(14), .STRIDE(64), .TAPS(14'b1000010001000))        k14 (.clk, .rst_n, .checks(c[11]), .failures(f[11]), .finished(fin[11]));

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("watchdog expired, finished=%b", fin);
    checks = 0; failures = 1;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
