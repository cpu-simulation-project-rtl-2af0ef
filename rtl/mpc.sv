// mpc: the micro program counter with its MPC-MUX and LD-MUX.
//
// The LD-MUX picks LD from the constant 0, the constant 1, FLAG1 or FLAG2
// according to CS. With LD = 1 the MPC loads the MPC-MUX output: the
// dispatch address {0000, OP} when S2 is high, otherwise NA. With LD = 0 it
// counts up by one. Reset forces 10H, the start of the fetch routine.
// mpc_next is the value the register takes at the next rising clock edge;
// the MIR loads the ROM word at that address on the same edge, so the MIR
// always holds ROM[MPC]. The LD-MUX inputs and the 10H reset address follow
// the original; the dispatch mapping and S2 polarity are this design's.
module mpc
  import cpu_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  cs_e            cs,
  input  logic [UAW-1:0] na,
  input  logic           s2,
  input  logic [3:0]     op,
  input  logic           flag1,
  input  logic           flag2,
  output logic [UAW-1:0] mpc_next,
  output logic [UAW-1:0] q
);
  logic ld;

  always_comb begin
    unique case (cs)
      CS_NEXT:  ld = 1'b0;
      CS_JUMP:  ld = 1'b1;
      CS_FLAG1: ld = flag1;
      CS_FLAG2: ld = flag2;
      default:  ld = 1'b0;
    endcase
    if (rst)     mpc_next = UADDR_FETCH;
    else if (ld) mpc_next = s2 ? UAW'(op) : na;
    else         mpc_next = q + UAW'(1);
  end

  always_ff @(posedge clk) q <= mpc_next;
endmodule
