// madr_mux: memory address source selector. {S1,S0} = 00 passes OPND (A),
// 01 the register address path (B), 10 the PC (C); 11 gives 00H.
// Combinational. The three inputs are those of the original; the select
// code is this design's.
module madr_mux
  import cpu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [1:0]   s,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] q
);
  always_comb begin
    unique case (s)
      MADR_OPND: q = a;
      MADR_REG:  q = b;
      MADR_PC:   q = c;
      default:   q = '0;
    endcase
  end
endmodule
