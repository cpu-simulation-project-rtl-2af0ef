// ir: instruction register with the R-MUX.
//
// At the rising clock edge with C4 high the 16-bit MDR value is loaded.
// The fields are OP = bits 15..12, R1 = bits 11..10, R2 = bits 9..8 and
// OPND = bits 7..0. The R-MUX passes R1 (S4 = 0) or R2 (S4 = 1) on as the
// register code for the register file; it is combinational. Field layout
// follows the original design; S4's polarity and the reset to zero are this
// design's choices.
module ir
  import cpu_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          c4,
  input  logic          s4,
  input  logic [IW-1:0] d,
  output logic [3:0]    op,
  output logic [1:0]    rs,
  output logic [DW-1:0] opnd,
  output instr_t        q      // whole instruction, for observation
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (c4) q <= instr_t'(d);
  end

  assign op   = q.op;
  assign opnd = q.opnd;
  assign rs   = s4 ? q.r2 : q.r1;
endmodule
