// tb_quad_lsb_decoder: checks all four quadrature states against the
// numbering of the states within one code position (clockwise order
// (A,B) = 10, 11, 01, 00 -> 0, 1, 2, 3).
module tb_quad_lsb_decoder;
  logic a, b;
  logic [1:0] lsb;
  int checks = 0, failures = 0;

  quad_lsb_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int k = 0; k < 8; k++) begin
      {a, b} = 2'(k);
      case ({a, b})
        2'b10: exp = 2'd0;
        2'b11: exp = 2'd1;
        2'b01: exp = 2'd2;
        default: exp = 2'd3;
      endcase
      #1;
      checks++;
      if (lsb !== exp) begin
        failures++;
        $display("FAIL a=%b b=%b lsb=%0d exp=%0d", a, b, lsb, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
