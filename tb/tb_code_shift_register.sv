// tb_code_shift_register: random left/right shifts with random input bits,
// compared with a reference model kept as a bit queue, for n = 3 (default)
// and n = 14.
module tb_code_shift_register;
  logic clk = 0, rst_n = 0;
  logic shift_left = 0, shift_right = 0, bit_in = 0;
  logic [3:1]  w3;
  logic [14:1] w14;
  int checks = 0, failures = 0;

  code_shift_register                u3  (.clk, .rst_n, .shift_left, .shift_right, .bit_in, .word(w3));
  code_shift_register #(.N(14))      u14 (.clk, .rst_n, .shift_left, .shift_right, .bit_in, .word(w14));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:1] m3, m14;
    int op;
    m3 = '0; m14 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      op = $urandom_range(2);
      shift_left  = (op == 1);
      shift_right = (op == 2);
      bit_in      = 1'($urandom);
      if (op == 1) begin
        m3  = {m3[13:1], bit_in} & 14'h7;
        m14 = {m14[13:1], bit_in};
      end else if (op == 2) begin
        m3  = {11'b0, bit_in, m3[3:2]};
        m14 = {bit_in, m14[14:2]};
      end
      @(posedge clk); #1;
      checks++;
      if (w3 !== m3[3:1] || w14 !== m14) begin
        failures++;
        $display("FAIL step %0d op %0d: w3=%b exp %b w14=%b exp %b", k, op, w3, m3[3:1], w14, m14);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
