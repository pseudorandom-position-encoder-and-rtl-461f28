// tb_startup_validity: after reset, valid must stay low until n reads in one
// direction; a change of direction before that restarts the count; once valid
// it stays valid whatever the reads. Checked for n = 3 and n = 5.
module tb_startup_validity;
  logic clk = 0, rst_n = 0;
  logic read_cw = 0, read_ccw = 0;
  logic v3, v5;
  int checks = 0, failures = 0;

  startup_validity           u3 (.clk, .rst_n, .read_cw, .read_ccw, .valid(v3));
  startup_validity #(.N(5))  u5 (.clk, .rst_n, .read_cw, .read_ccw, .valid(v5));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: length of the current run of same-direction reads
  int run; logic last; logic r3, r5;

  task automatic do_reset();
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    run = 0; r3 = 0; r5 = 0;
  endtask

  task automatic rd(logic cw, int idle);
    @(negedge clk);
    read_cw = cw; read_ccw = !cw;
    if (run == 0 || cw == last) run++; else run = 1;
    last = cw;
    if (run >= 3) r3 = 1;
    if (run >= 5) r5 = 1;
    @(negedge clk);
    read_cw = 0; read_ccw = 0;
    repeat (idle) @(negedge clk);
    checks++;
    if (v3 !== r3 || v5 !== r5) begin
      failures++;
      $display("FAIL run=%0d v3=%b exp %b v5=%b exp %b", run, v3, r3, v5, r5);
    end
  endtask

  initial begin
    do_reset();
    // fixed pattern: two cw, one ccw (restart), then three ccw
    rd(1, 0); rd(1, 2); rd(0, 0); rd(0, 1); rd(0, 0); rd(0, 0); rd(0, 0); rd(1, 0);
    // random patterns after fresh resets
    for (int t = 0; t < 60; t++) begin
      do_reset();
      for (int k = 0; k < 14; k++) rd(($urandom_range(3) != 0) ? last ^ 1'b0 : ~last, $urandom_range(2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
