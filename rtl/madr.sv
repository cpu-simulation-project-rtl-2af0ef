// madr: memory address register. It loads the MADR-MUX output at the rising
// clock edge when C7 is high; its output addresses memory and the OUT
// register. Reset to zero is this design's choice.
module madr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         c7,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (c7) q <= d;
  end
endmodule
