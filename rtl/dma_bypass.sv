// dma_bypass: the manual DMA path used to enter programs and data.
// With BYPASS = 0 the memory sees the CPU: address from MADR, write data
// from the data bus, write strobe C9. With BYPASS = 1 the address comes
// from the address keypad, the data from the data keypads while their
// tri-state is enabled (OE' = 0, else 0), and a write happens while the
// R'/W switch is 0 and OE' is 0. Meant to be used while the CPU is held in
// reset. Combinational. The switch meanings are those of the original; the
// rule that a keypad write needs OE' = 0 is this design's reading.
module dma_bypass
  import cpu_pkg::*;
(
  input  logic          bypass,
  input  logic [AW-1:0] kp_addr,
  input  logic [IW-1:0] kp_data,
  input  logic          kp_rw_n,
  input  logic          kp_oe_n,
  input  logic [AW-1:0] cpu_addr,
  input  logic [IW-1:0] cpu_wdata,
  input  logic          cpu_we,
  output logic [AW-1:0] mem_addr,
  output logic [IW-1:0] mem_wdata,
  output logic          mem_we
);
  always_comb begin
    if (bypass) begin
      mem_addr  = kp_addr;
      mem_wdata = kp_oe_n ? '0 : kp_data;
      mem_we    = !kp_rw_n && !kp_oe_n;
    end else begin
      mem_addr  = cpu_addr;
      mem_wdata = cpu_wdata;
      mem_we    = cpu_we;
    end
  end
endmodule
