// read_pulse_gen: code-track read pulse and rotation direction from the
// synchronisation (incremental) track.
//
// The squared quadrature signals A and B arrive asynchronously and are first
// brought into the clock domain by two flip-flops each. A transition of A is
// found by comparing A with a one-clock delayed copy of itself (an exclusive-OR
// edge detector; the clock period plays the part of the short RC delay of a
// discrete edge detector). A transition of A while B is 0 marks the middle of a
// code-track bit, so it becomes the read pulse, which also switches on the
// code-track light source. The level of A right after the transition gives the
// direction: A = 1 is clockwise (the code register shifts left), A = 0 is
// counter-clockwise (it shifts right).
//
// Interface: a_in, b_in asynchronous squared quadrature inputs; a_s, b_s their
// synchronised copies; read_pulse, shift_cw, shift_ccw one-clock pulses.
// Timing: after an edge of a_in the pulses are high for the one clock cycle
// that follows the second rising clock edge (two synchroniser stages), so they
// take effect at the third edge. They come straight from flip-flops through
// one level of gates. A and B must each stay stable for at
// least two clocks between transitions. For the first three clocks after reset
// no edge is reported, since the synchroniser then still holds its reset value
// rather than the level of A.
module read_pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic a_in,
  input  logic b_in,
  output logic a_s,
  output logic b_s,
  output logic read_pulse,
  output logic shift_cw,
  output logic shift_ccw
);

  logic [1:0] a_sync, b_sync;
  logic       a_dly;
  logic       a_edge;
  logic [2:0] armed;   // edge detection waits until the pipeline holds real samples

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sync <= '0;
      b_sync <= '0;
      a_dly  <= 1'b0;
      armed  <= '0;
    end else begin
      armed  <= {armed[1:0], 1'b1};
      a_sync <= {a_sync[0], a_in};
      b_sync <= {b_sync[0], b_in};
      a_dly  <= a_sync[1];
    end
  end

  assign a_s = a_sync[1];
  assign b_s = b_sync[1];

  always_comb begin
    a_edge     = (a_s ^ a_dly) & armed[2];  // edge detector on A
    read_pulse = a_edge & ~b_s;        // transition of A with B at 0
    shift_cw   = read_pulse & a_s;     // A = 1 after the edge: clockwise
    shift_ccw  = read_pulse & ~a_s;    // A = 0 after the edge: counter-clockwise
  end

endmodule
