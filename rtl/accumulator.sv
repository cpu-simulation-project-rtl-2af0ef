// accumulator: the AC register. It takes the data bus value at the rising
// clock edge when C1 is high and holds it otherwise. Its output feeds the
// comparator's A input and the Inc/Dec unit, so INC, DEC and COMPR first copy
// a register into AC. Reset to zero is a choice of this design.
module accumulator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         c1,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (c1) q <= d;
  end
endmodule
