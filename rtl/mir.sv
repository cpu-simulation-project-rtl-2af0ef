// mir: the micro instruction register. It loads a 32-bit micro word at
// every rising clock edge and splits it into CS, NA, S0..S6 and C0..C14,
// which drive the whole datapath for that cycle. It has no reset of its
// own: while reset is held the MPC forces the fetch address, so the MIR
// holds the first fetch word.
module mir
  import cpu_pkg::*;
(
  input  logic           clk,
  input  uword_t         d,
  output cs_e            cs,
  output logic [UAW-1:0] na,
  output logic [6:0]     s,
  output logic [14:0]    c
);
  uword_t q;
  always_ff @(posedge clk) q <= d;

  assign cs = q.cs;
  assign na = q.na;
  assign s  = q.s;
  assign c  = q.c;
endmodule
