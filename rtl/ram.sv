// ram: main memory, 2^AW words of DW bits (128 x 16 by default, address
// pins A6..A0 as in the original). Program and data share it. Writes happen
// at the rising clock edge when CE and WE are high; reads are asynchronous
// and return 0 while CE is low, so that the eighth address bit can select
// the memory-mapped OUT register instead. The contents start at zero.
module ram #(
  parameter int unsigned AW = 7,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (ce && we) mem[addr] <= wdata;
  end

  assign rdata = ce ? mem[addr] : '0;
endmodule
