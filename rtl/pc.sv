// pc: the macro program counter. Reset puts it at 00H, where programs start.
// At the rising clock edge C6 loads the operand (a taken jump), otherwise C5
// counts it up by one, wrapping at 2^W. The original uses presettable
// 74LS193 counters; the choice of C5 = count and C6 = load, and load
// winning over count, is this design's.
module pc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         c5,
  input  logic         c6,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)      q <= '0;
    else if (c6)  q <= d;
    else if (c5)  q <= q + W'(1);
  end
endmodule
