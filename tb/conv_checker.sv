// conv_checker: drives one serial_code_converter of register length N and
// checks it against a reference sequence built here.
//
// The reference walks the direct generator from the initial word (all ones)
// and so knows the position p of every word. Selected words are converted in
// inverse mode, in direct mode, and in the mode a preceding position equal to
// p would select (MSB of p). Each result, the error flag, the reported mode and
// the exact latency (shifts + 1 clocks) are checked; the largest latency with
// the MSB-selected mode must not exceed 2^(N-1) clocks. STRIDE = 1 tests every
// position; larger strides test a random subset. Finally an all-zero word,
// which is not on the sequence, must end with error after 2^N clocks, and a
// start during a running conversion must restart it.
module conv_checker #(
  parameter int unsigned N      = 3,
  parameter int unsigned STRIDE = 1,
  parameter int unsigned TAPS   = 1   // bit k-1 set: X(k) is a direct-law tap
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned L = (1 << N) - 1;

  logic         start = 0, use_direct = 0;
  logic [N:1]   word = '0;
  logic         busy, done, error, used_direct;
  logic [N-1:0] position;

  serial_code_converter #(.N(N)) dut (
    .clk, .rst_n, .start, .word, .use_direct,
    .busy, .done, .position, .error, .used_direct
  );

  function automatic logic [N:1] step(logic [N:1] x);
    logic fb = x[N];
    for (int k = 1; k < int'(N); k++)
      if (TAPS[k-1]) fb ^= x[k];
    return {x[N-1:1], fb};
  endfunction

  task automatic convert(logic [N:1] w, logic dir, int exp_pos, int exp_lat,
                         logic exp_err, output int lat);
    @(negedge clk);
    word = w; use_direct = dir; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done && lat < 4 * int'(L) + 8) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (!done || error !== exp_err || (!exp_err && int'(position) != exp_pos) ||
        used_direct !== dir || lat != exp_lat) begin
      failures++;
      $display("FAIL N=%0d word=%h dir=%b: pos=%0d exp %0d err=%b exp %b lat=%0d exp %0d",
               N, w, dir, position, exp_pos, error, exp_err, lat, exp_lat);
    end
  endtask

  initial begin
    logic [N:1] w;
    int lat, max_sel;
    checks = 0; failures = 0; finished = 0; max_sel = 0;
    @(posedge rst_n);
    w = '1;
    for (int p = 0; p < int'(L); p++) begin
      if (STRIDE == 1 || p == 0 || p == int'(L) - 1 || p == (1 << (N-1)) ||
          $urandom_range(STRIDE - 1) == 0) begin
        convert(w, 1'b0, p, p + 1, 1'b0, lat);
        convert(w, 1'b1, p, ((int'(L) - p) % int'(L)) + 1, 1'b0, lat);
        convert(w, p[N-1], p, p[N-1] ? ((int'(L) - p) % int'(L)) + 1 : p + 1, 1'b0, lat);
        if (lat > max_sel) max_sel = lat;
      end
      w = step(w);
    end
    checks++;
    if (w != '1) begin
      failures++;
      $display("FAIL N=%0d reference period is not 2^N-1", N);
    end
    checks++;
    if (max_sel > (1 << (N-1))) begin
      failures++;
      $display("FAIL N=%0d MSB-selected latency %0d above 2^(N-1)", N, max_sel);
    end
    // a word off the sequence
    convert('0, 1'b0, 0, int'(L) + 1, 1'b1, lat);
    // restart: start a long conversion, then a short one two clocks later
    @(negedge clk);
    word = step('1); use_direct = 1'b1; start = 1;       // p = 1 in direct mode: long
    @(negedge clk); start = 0;
    @(negedge clk);
    word = '1; use_direct = 1'b0; start = 1;             // p = 0: one clock
    @(negedge clk); start = 0;
    @(negedge clk);
    checks++;
    if (!done || position != '0 || error) begin
      failures++;
      $display("FAIL N=%0d restart", N);
    end
    $display("N=%0d: largest latency with the MSB-selected law %0d clocks (inverse-only worst case %0d)",
             N, max_sel, L);
    finished = 1;
  end
endmodule
