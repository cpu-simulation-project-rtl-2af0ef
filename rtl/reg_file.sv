// reg_file: the four general registers A, B, C, D (codes 00..11).
//
// One register is selected by the 2-bit code from the R-MUX. At the rising
// clock edge with C10 high it is written from the data bus. Its value is
// driven onto the data bus while C14 is high and onto the address path to
// the MADR-MUX while C11 is high (combinational reads; a disabled output is
// 0 because the bus ORs its sources instead of using tri-states). The
// register codes follow the original design; the split of C10/C11/C14
// between write, bus read and address read is this design's reading of the
// overview drawing, and the reset to zero is its own choice.
module reg_file #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] sel,
  input  logic                 c10,
  input  logic                 c14,
  input  logic                 c11,
  input  logic [W-1:0]         d,
  output logic [W-1:0]         bus_q,
  output logic [W-1:0]         adr_q,
  output logic [N-1:0][W-1:0]  regs   // all registers, for observation
);
  always_ff @(posedge clk) begin
    if (rst)      regs <= '0;
    else if (c10) regs[sel] <= d;
  end

  assign bus_q = c14 ? regs[sel] : '0;
  assign adr_q = c11 ? regs[sel] : '0;
endmodule
