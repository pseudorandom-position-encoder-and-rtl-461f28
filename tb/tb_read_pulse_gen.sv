// tb_read_pulse_gen: drives the quadrature inputs through clockwise and
// counter-clockwise sequences and random legal moves, and checks that a read
// pulse appears exactly for transitions of A while B = 0, in the expected
// clock cycle, with the direction given by the new level of A.
module tb_read_pulse_gen;
  logic clk = 0, rst_n = 0;
  logic a_in = 0, b_in = 0;
  logic a_s, b_s, read_pulse, shift_cw, shift_ccw;
  int checks = 0, failures = 0;
  int n_cw = 0, n_ccw = 0;

  read_pulse_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // quadrature state index 0..3 <-> (A,B) = 10, 11, 01, 00 (clockwise order)
  function automatic logic [1:0] ab_of(int s);
    case (s & 3)
      0: return 2'b10;
      1: return 2'b11;
      2: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  task automatic move(int from, int to);
    logic [1:0] o = ab_of(from), n = ab_of(to);
    logic exp_read = (o[1] != n[1]) && (n[0] == 1'b0);
    logic exp_cw = n[1];
    @(negedge clk);
    a_in = n[1];
    b_in = n[0];
    for (int i = 1; i <= 4; i++) begin
      @(posedge clk); #1;
      checks++;
      if (read_pulse !== (exp_read && i == 2) ||
          shift_cw   !== (exp_read && exp_cw && i == 2) ||
          shift_ccw  !== (exp_read && !exp_cw && i == 2)) begin
        failures++;
        $display("FAIL %0d->%0d cycle %0d: read=%b cw=%b ccw=%b", from, to, i,
                 read_pulse, shift_cw, shift_ccw);
      end
      if (i == 2 && shift_cw) n_cw++;
      if (i == 2 && shift_ccw) n_ccw++;
    end
    checks++;
    if (a_s !== n[1] || b_s !== n[0]) begin
      failures++;
      $display("FAIL synchronised levels");
    end
  endtask

  initial begin
    int s = 3, ns;
    int exp_cw_reads = 0, exp_ccw_reads = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 12 clockwise steps, 12 counter-clockwise, then random walk
    for (int k = 0; k < 12; k++) begin
      ns = s + 1; if ((ns & 3) == 0) exp_cw_reads++;
      move(s, ns); s = ns;
    end
    for (int k = 0; k < 12; k++) begin
      ns = s - 1; if ((s & 3) == 0) exp_ccw_reads++;
      move(s, ns); s = ns;
    end
    for (int k = 0; k < 400; k++) begin
      if ($urandom_range(1)) begin
        ns = s + 1; if ((ns & 3) == 0) exp_cw_reads++;
      end else begin
        ns = s - 1; if ((s & 3) == 0) exp_ccw_reads++;
      end
      move(s, ns); s = ns + 4000;  // keep the index positive
    end
    checks++;
    if (n_cw != exp_cw_reads || n_ccw != exp_ccw_reads || n_cw == 0 || n_ccw == 0) begin
      failures++;
      $display("FAIL read counts cw %0d/%0d ccw %0d/%0d", n_cw, exp_cw_reads, n_ccw, exp_ccw_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
