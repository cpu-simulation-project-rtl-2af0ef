// out_port: the OUT register, the CPU's only output. A memory write whose
// address has bit 7 set (ADDR = 80H is the documented address; 80H..FFH all
// decode to it here) stores the low byte of the write data at the rising
// clock edge. strobe is high for the cycle after each such write, so a
// consumer can count outputs even when the same value is written twice.
module out_port #(
  parameter int unsigned       AW   = 8,
  parameter int unsigned       W    = 8,
  parameter logic [AW-1:0]     ADDR = 8'h80
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  q,
  output logic          strobe
);
  logic hit;
  assign hit = we && (addr[AW-1] == ADDR[AW-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      q      <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= hit;
      if (hit) q <= wdata;
    end
  end
endmodule
