// mdr: memory data register. At the rising clock edge with C3 high it
// captures the 16-bit memory read data. Its full value feeds the
// instruction register; its low byte is driven onto the 8-bit data bus
// while S6 is high (0 otherwise, the bus ORs its sources). Assigning C3 to
// the load and S6 to the bus output, and the reset to zero, are this
// design's choices.
module mdr #(
  parameter int unsigned W  = 16,
  parameter int unsigned BW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          c3,
  input  logic          s6,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q,
  output logic [BW-1:0] bus_q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (c3) q <= d;
  end

  assign bus_q = s6 ? q[BW-1:0] : '0;
endmodule
