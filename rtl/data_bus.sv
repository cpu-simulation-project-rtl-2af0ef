// data_bus: the CPU's internal 8-bit data bus and its link to the memory
// data bus. Four sources may drive it: OPND (C8), the selected register
// (C14), the Inc/Dec unit (S5) and the MDR low byte (S6). Each source
// arrives already gated to 0 when not enabled (the gating lives in the
// source blocks, except OPND, which is gated here), so the bus is the OR
// of the sources; the original uses tri-state drivers. An assertion checks
// that at most one source is enabled per cycle. With C0 high the bus value
// drives the memory data bus, zero-extended to 16 bits. Combinational.
module data_bus
  import cpu_pkg::*;
(
  input  logic          clk,       // only for the contention check
  input  logic          rst,
  input  logic [DW-1:0] opnd,
  input  logic          en_opnd,
  input  logic [DW-1:0] regv,
  input  logic          en_reg,
  input  logic [DW-1:0] incdec,
  input  logic          en_incdec,
  input  logic [DW-1:0] mdr,
  input  logic          en_mdr,
  input  logic          c0,
  output logic [DW-1:0] bus,
  output logic [IW-1:0] mem_wdata
);
  logic [DW-1:0] opnd_g;
  assign opnd_g    = en_opnd ? opnd : '0;
  assign bus       = opnd_g | regv | incdec | mdr;
  assign mem_wdata = c0 ? IW'(bus) : '0;

  a_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({en_opnd, en_reg, en_incdec, en_mdr}))
    else $error("data bus: more than one driver enabled");
endmodule
