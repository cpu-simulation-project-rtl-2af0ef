// cpu_top: the complete micro-programmed CPU.
//
// Control: the MPC addresses the micro-program ROM; the MIR holds the word
// for the current cycle and its C and S lines drive the datapath. Each
// macro instruction is a fetch (4 cycles) followed by 1 to 3 execute
// cycles, see microcode_rom.
// Datapath: an 8-bit internal data bus links OPND, the registers A-D, the
// AC, the comparator, the Inc/Dec unit and the MDR. Addresses go through
// the MADR-MUX (OPND, register, PC) into MADR. Memory is a 128 x 16 RAM;
// a store with address bit 7 set (80H) writes the OUT register instead.
// Manual DMA: with rst and bypass high, the keypad inputs write the RAM
// (kp_rw_n = 0 and kp_oe_n = 0 write kp_data at kp_addr on a clock edge).
// With rst low the CPU runs from address 00H. halted goes high when a
// HALT instruction is reached.
// One clock, synchronous active-high reset: a choice of this design, the
// original being stepped by hand.
module cpu_top
  import cpu_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                bypass,
  input  logic [AW-1:0]       kp_addr,
  input  logic [IW-1:0]       kp_data,
  input  logic                kp_rw_n,
  input  logic                kp_oe_n,
  output logic [DW-1:0]       out_q,
  output logic                out_strobe,
  output logic                halted,
  // observation
  output logic [AW-1:0]       pc_q,
  output logic [UAW-1:0]      mpc_q,
  output logic [3:0][DW-1:0]  regs_q,
  output instr_t              ir_q,
  output logic                flag1,
  output logic                flag2
);
  // ---------------- control ----------------
  cs_e            cs;
  logic [UAW-1:0] na, mpc_next;
  logic [6:0]     s;
  logic [14:0]    c;
  uword_t         rom_q;
  logic [3:0]     op;

  mpc u_mpc (
    .clk, .rst, .cs, .na, .s2(s[S_MPC_OP]), .op, .flag1, .flag2,
    .mpc_next, .q(mpc_q)
  );

  microcode_rom u_rom (.addr(mpc_next), .q(rom_q));

  mir u_mir (.clk, .d(rom_q), .cs, .na, .s, .c);

  assign halted = (mpc_q == UAW'(OP_HALT));

  // ---------------- datapath ----------------
  logic [DW-1:0] bus, ac_q, incdec_q, reg_bus_q, reg_adr_q, mdr_bus_q, opnd;
  logic [AW-1:0] madr_d, madr_q;
  logic [IW-1:0] mdr_q, cpu_wdata, mem_rdata, mem_wdata;
  logic [AW-1:0] mem_addr;
  logic          mem_we;
  logic [1:0]    rs;

  data_bus u_bus (
    .clk, .rst,
    .opnd, .en_opnd(c[C_OPND_EN]),
    .regv(reg_bus_q), .en_reg(c[C_REG_EN]),
    .incdec(incdec_q), .en_incdec(s[S_INCDEC]),
    .mdr(mdr_bus_q), .en_mdr(s[S_MDR_EN]),
    .c0(c[C_BUS2MEM]), .bus, .mem_wdata(cpu_wdata)
  );

  accumulator #(.W(DW)) u_ac (.clk, .rst, .c1(c[C_AC_LD]), .d(bus), .q(ac_q));

  inc_dec #(.W(DW)) u_incdec (.a(ac_q), .s3(s[S_DEC]), .s5(s[S_INCDEC]), .r(incdec_q));

  comparator #(.W(DW)) u_cmp (
    .clk, .rst, .c2(c[C_CMP]), .a(ac_q), .b(bus), .flag1, .flag2
  );

  reg_file #(.W(DW), .N(4)) u_regs (
    .clk, .rst, .sel(rs), .c10(c[C_REG_WR]), .c14(c[C_REG_EN]), .c11(c[C_REG_ADR]),
    .d(bus), .bus_q(reg_bus_q), .adr_q(reg_adr_q), .regs(regs_q)
  );

  ir u_ir (
    .clk, .rst, .c4(c[C_IR_LD]), .s4(s[S_RSEL_R2]), .d(mdr_q),
    .op, .rs, .opnd, .q(ir_q)
  );

  pc #(.W(AW)) u_pc (.clk, .rst, .c5(c[C_PC_INC]), .c6(c[C_PC_LD]), .d(opnd), .q(pc_q));

  madr_mux #(.W(AW)) u_madr_mux (
    .s({s[S_MADR1], s[S_MADR0]}), .a(opnd), .b(reg_adr_q), .c(pc_q), .q(madr_d)
  );

  madr #(.W(AW)) u_madr (.clk, .rst, .c7(c[C_MADR_LD]), .d(madr_d), .q(madr_q));

  mdr #(.W(IW), .BW(DW)) u_mdr (
    .clk, .rst, .c3(c[C_MDR_LD]), .s6(s[S_MDR_EN]), .d(mem_rdata), .q(mdr_q), .bus_q(mdr_bus_q)
  );

  // ---------------- memory and I/O ----------------
  dma_bypass u_dma (
    .bypass, .kp_addr, .kp_data, .kp_rw_n, .kp_oe_n,
    .cpu_addr(madr_q), .cpu_wdata, .cpu_we(c[C_MEM_WR]),
    .mem_addr, .mem_wdata, .mem_we
  );

  ram #(.AW(RAM_AW), .DW(IW)) u_ram (
    .clk, .ce(!mem_addr[AW-1]), .we(mem_we), .addr(mem_addr[RAM_AW-1:0]),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  out_port #(.AW(AW), .W(DW), .ADDR(OUT_ADDR)) u_out (
    .clk, .rst, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata[DW-1:0]),
    .q(out_q), .strobe(out_strobe)
  );

  // The keypads should only write memory while the CPU is held in reset.
  a_dma_in_reset: assert property (@(posedge clk) bypass |-> rst)
    else $error("BYPASS raised while the CPU is running");
endmodule
