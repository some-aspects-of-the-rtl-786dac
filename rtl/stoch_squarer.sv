// stoch_squarer: stochastic squaring, E* = E^2 / V.
//
// Multiplying a line by itself gives a constant ON, so the element
// multiplies (exclusive-NOR) the input with a copy of it delayed by DELAY
// master-clock periods in a shift register; a delay of more than twelve
// periods makes the two statistically independent.  The output is
// combinational in the current input and the last stage of the delay line.
//
// From the document: XNOR of the input with a shift-register-delayed copy,
// delay more than twelve clocks.  This design's choice: DELAY = 13 and the
// asynchronous reset of the delay line to zero.
module stoch_squarer #(
  parameter int unsigned DELAY = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  output logic y
);
  logic [DELAY-1:0] dl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dl <= '0;
    else        dl <= {dl[DELAY-2:0], a};
  end

  assign y = ~(a ^ dl[DELAY-1]);
endmodule
