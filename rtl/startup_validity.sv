// startup_validity: marks the read code as wrong after power-up until the
// code-forming register has been filled.
//
// A virtual absolute encoder only knows its position after the moving part has
// travelled n code bits, so that all n bits of the register come from the
// track. This block counts reads in one direction; a read in the other
// direction before the count reaches n starts the count again at 1, because the
// register then no longer holds n consecutive track bits with certainty. Once n
// reads in one direction have been seen, the code stays valid until reset:
// every further read, in either direction, keeps all n bits from the track.
// That n reads in one direction are needed is the standard requirement; the
// run counter with restart on reversal is this design's way of checking it.
//
// Interface: read_cw / read_ccw the one-clock read commands; valid high once
// the register content is a genuine code word.
// Timing: valid rises on the same clock edge as the n-th shift of the register.
module startup_validity #(
  parameter int unsigned N = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic read_cw,
  input  logic read_ccw,
  output logic valid
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] count;
  logic          last_cw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      last_cw <= 1'b0;
      valid   <= 1'b0;
    end else if (!valid && (read_cw || read_ccw)) begin
      last_cw <= read_cw;
      if (count != '0 && read_cw != last_cw) begin
        count <= CW'(1);
      end else begin
        count <= count + 1'b1;
        if (count + 1'b1 == CW'(N))
          valid <= 1'b1;
      end
    end
  end

endmodule
