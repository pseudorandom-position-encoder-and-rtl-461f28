// enc_env: disc model and checker for virtual_abs_encoder with register
// length N.
//
// The disc is modelled as a quarter-step counter P over 4 * (2^N - 1) steps
// per turn: code position p = P / 4, quadrature state P % 4 with (A,B) = 10,
// 11, 01, 00 for states 0..3. The code track S(0 .. 2^N - 2) is generated here
// from the initial word (all ones) with the direct feedback law given by TAPS
// (bit k-1 set: X(k) is a tap). When the disc crosses into code position p
// clockwise, the code-track detector shows S(p + N - 1); crossing into p
// counter-clockwise it shows S(p): the bit that must enter the code register
// at the right or left end respectively.
//
// Phase 1 walks the disc randomly, mostly slowly enough for each conversion to
// end, sometimes faster so that a new read restarts a running conversion. It
// A fast burst lets the disc dither, so that a code boundary is crossed
// back and forth within a few clocks. It checks the validity flag, the result and exact duration of every
// conversion (mode from the MSB of the previously converted position), the
// output position whenever the disc has rested long enough, and that the LSBs
// follow the quadrature state. Phase 2 resets the encoder and shows it a code
// track of zeros: the converter must report an error. Every mechanism must
// have happened at least once.
module enc_env #(
  parameter int unsigned N     = 3,
  parameter int unsigned TAPS  = 1,
  parameter int unsigned MOVES = 600,
  parameter int          START = -1,   // initial quarter step, -1: random
  parameter int unsigned MAXSEG = 0    // longest one-direction segment, 0: 1.5 turns
) (
  input  logic         clk,
  output logic         rst_n,
  output logic         a_in,
  output logic         b_in,
  output logic         code_bit,
  input  logic         led_pulse,
  input  logic [N+1:0] position,
  input  logic         code_valid,
  input  logic         pos_valid,
  input  logic         conv_busy,
  input  logic         conv_error,
  input  logic         conv_direct,
  input  logic         dir_cw,
  input  logic         start,       // internal: conversion start
  input  logic         done,        // internal: conversion done
  input  logic [N-1:0] conv_pos,    // internal: converter result
  output int           checks,
  output int           failures,
  output logic         finished
);
  localparam int L = (1 << N) - 1;
  localparam int Q = 4 * L;

  logic S [L];
  int   P;                 // quarter-step position of the disc
  bit   zero_track;        // phase 2: all code bits read as 0

  // mechanism counters
  int n_cw, n_ccw, n_invalid_reads, n_direct, n_inverse, n_restart, n_wrap, n_error, n_posck;

  // reads in flight: code position entered and direction
  int   rd_p[$];
  int   p_read, cur_p, cur_k, busy_cnt;
  logic cur_mode, active, prev_msb;
  int   run; logic run_cw; logic valid_model;

  function automatic logic [1:0] ab_of(int s);
    case (s)
      0: return 2'b10;
      1: return 2'b11;
      2: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  task automatic build_track();
    logic [N:1] x = '1;
    for (int p = 0; p < L; p++) begin
      logic fb;
      S[p] = x[N];
      fb = x[N];
      for (int k = 1; k < int'(N); k++) if (TAPS[k-1]) fb ^= x[k];
      x = {x[N-1:1], fb};
    end
  endtask

  // one quarter step, cw = 1 for clockwise
  task automatic step(bit cw);
    int oldp = P / 4;
    int newp;
    P = cw ? (P + 1) % Q : (P + Q - 1) % Q;
    newp = P / 4;
    if (newp != oldp) begin
      if ((cw && newp == 0) || (!cw && oldp == 0)) n_wrap++;
      code_bit = zero_track ? 1'b0 : (cw ? S[(newp + int'(N) - 1) % L] : S[newp]);
      rd_p.push_back(newp);
      if (run == 0 || cw == run_cw) run++; else run = 1;
      run_cw = cw;
      if (run >= int'(N)) valid_model = 1'b1;
    end
    {a_in, b_in} = ab_of(P % 4);
  endtask

  // per-clock monitor, sampled in the middle of the cycle
  always @(negedge clk) if (rst_n) begin
    if (led_pulse) begin
      if (rd_p.size() == 0) begin
        failures++; $display("FAIL read pulse without a code crossing");
      end else p_read = rd_p.pop_front();
      if (!code_valid) n_invalid_reads++;
    end
    if (done && active) begin
      checks++;
      if (conv_error || int'(conv_pos) != cur_p || conv_direct != cur_mode ||
          busy_cnt != cur_k + 1) begin
        failures++;
        $display("FAIL conversion p=%0d mode=%b: got p=%0d err=%b mode=%b busy %0d exp %0d",
                 cur_p, cur_mode, conv_pos, conv_error, conv_direct, busy_cnt, cur_k + 1);
      end
      if (cur_mode) n_direct++; else n_inverse++;
      prev_msb = 1'(cur_p >> (N - 1));
      active   = 1'b0;
    end
    if (start) begin
      if (active && conv_busy) n_restart++;
      cur_p    = p_read;
      cur_mode = prev_msb;
      cur_k    = cur_mode ? (L - cur_p) % L : cur_p;
      busy_cnt = 0;
      active   = !zero_track;
    end else if (active && conv_busy) begin
      busy_cnt++;
    end
  end

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rd_p.delete();
    run = 0; valid_model = 0; prev_msb = 0; active = 0;
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  task automatic check_rest();
    checks++;
    if (code_valid !== valid_model) begin
      failures++; $display("FAIL code_valid=%b expected %b", code_valid, valid_model);
    end
    checks++;
    if (position[1:0] !== 2'(P % 4)) begin
      failures++; $display("FAIL lsb=%0d expected %0d", position[1:0], P % 4);
    end
    if (valid_model) begin
      checks++;
      n_posck++;
      if (!pos_valid || int'(position) != P) begin
        failures++;
        $display("FAIL position %0d (valid %b) expected %0d", position, pos_valid, P);
      end
    end
  endtask

  initial begin
    int len, gap, fast;
    bit cw, dcw;
    checks = 0; failures = 0; finished = 0;
    n_cw = 0; n_ccw = 0; n_invalid_reads = 0; n_direct = 0; n_inverse = 0;
    n_restart = 0; n_wrap = 0; n_error = 0; n_posck = 0;
    build_track();
    zero_track = 0;
    fast = 0;
    P = (START < 0) ? $urandom_range(Q - 1) : START;
    {a_in, b_in} = ab_of(P % 4);
    code_bit = 1'b0;
    do_reset();

    // phase 1: random walk
    for (int m = 0; m < int'(MOVES); ) begin
      cw  = 1'($urandom_range(1));
      len = $urandom_range(1, (MAXSEG == 0) ? 3 * Q / 2 : MAXSEG);
      for (int s = 0; s < len && m < int'(MOVES); s++, m++) begin
        // during a fast burst the disc dithers (vibration): random direction
        dcw = (fast > 0) ? 1'($urandom_range(1)) : cw;
        if (dcw) n_cw += (P % 4 == 3); else n_ccw += (P % 4 == 0);
        step(dcw);
        if (fast > 0 || $urandom_range(19) == 0) begin
          fast = (fast > 0) ? fast - 1 : $urandom_range(4, 10);
          repeat ($urandom_range(3, 5)) @(negedge clk);       // fast: may restart
        end else begin
          gap = L + 12 + $urandom_range(8);
          repeat (gap) @(negedge clk);
          check_rest();
        end
      end
    end

    // phase 2: code track reads all zeros -> word not on the sequence
    zero_track = 1;
    do_reset();
    for (int s = 0; s < 4 * int'(N) + 4; s++) begin
      step(1'b1);
      repeat (4) @(negedge clk);
    end
    repeat (L + 8) @(negedge clk);
    checks++;
    if (!conv_error || pos_valid) begin
      failures++; $display("FAIL zero track: error=%b pos_valid=%b", conv_error, pos_valid);
    end else n_error++;

    $display("mechanisms: cw reads %0d, ccw reads %0d, reads before valid %0d, direct %0d, inverse %0d, restarts %0d, wraps %0d, errors %0d, position checks %0d",
             n_cw, n_ccw, n_invalid_reads, n_direct, n_inverse, n_restart, n_wrap, n_error, n_posck);
    if (n_cw == 0)            begin failures++; $display("FAIL no clockwise read"); end
    if (n_ccw == 0)           begin failures++; $display("FAIL no counter-clockwise read"); end
    if (n_invalid_reads == 0) begin failures++; $display("FAIL no read before valid"); end
    if (n_direct == 0)        begin failures++; $display("FAIL no direct-law conversion"); end
    if (n_inverse == 0)       begin failures++; $display("FAIL no inverse-law conversion"); end
    if (n_restart == 0)       begin failures++; $display("FAIL no restarted conversion"); end
    if (n_wrap == 0)          begin failures++; $display("FAIL no wrap-around"); end
    if (n_error == 0)         begin failures++; $display("FAIL no error detection"); end
    checks += 8;
    finished = 1;
  end
endmodule
