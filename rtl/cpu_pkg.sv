// cpu_pkg: shared widths, instruction and micro-word formats of the
// micro-programmed 8-bit CPU.
//
// Macro instructions are 16 bits: OP[15:12], R1[11:10], R2[9:8], OPND[7:0].
// Register codes are 00 = A, 01 = B, 10 = C, 11 = D. The nine opcodes are
// the ones used by the bubble-sort program the design was built around;
// the remaining codes execute as no-operation (a choice of this design).
//
// A micro word is 32 bits, laid out as the MIR is drawn: CS (2 bits, picks
// the LD-MUX input 0, 1, FLAG1 or FLAG2), NA (8-bit next address), S0..S6
// (select lines) and C0..C14 (control lines). The names of the lines come
// from the original design; which line does what where it was not stated
// (C0, C8, C9, the pairs C10/C11/C14, S3/S5, C3/S6) is this design's choice
// and is listed at the constants below.
package cpu_pkg;

  localparam int unsigned DW     = 8;    // register / internal bus width
  localparam int unsigned IW     = 16;   // instruction and memory word width
  localparam int unsigned AW     = 8;    // address bus width
  localparam int unsigned RAM_AW = 7;    // RAM address pins A6..A0
  localparam int unsigned UAW    = 8;    // micro address width
  localparam logic [AW-1:0]  OUT_ADDR   = 8'h80;  // memory-mapped OUT register
  localparam logic [UAW-1:0] UADDR_FETCH = 8'h10; // MPC value after reset

  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,
    OP_MOVEI = 4'h1,  // R1 <- OPND
    OP_LOAD  = 4'h2,  // R1 <- M[R2]
    OP_STORE = 4'h3,  // M[R2] <- R1
    OP_INC   = 4'h4,  // R1 <- R1 + 1
    OP_DEC   = 4'h5,  // R1 <- R1 - 1
    OP_COMPR = 4'h6,  // FLAG1 <- R1 > R2, FLAG2 <- R1 < R2
    OP_JGT   = 4'h7,  // if FLAG1: PC <- OPND
    OP_JLT   = 4'h8,  // if FLAG2: PC <- OPND
    OP_HALT  = 4'h9
  } opcode_e;

  typedef enum logic [1:0] {
    REG_A = 2'b00, REG_B = 2'b01, REG_C = 2'b10, REG_D = 2'b11
  } reg_e;

  typedef struct packed {
    logic [3:0]    op;
    reg_e          r1;
    reg_e          r2;
    logic [DW-1:0] opnd;
  } instr_t;

  // LD-MUX select: input 0, input 1, FLAG1, FLAG2.
  typedef enum logic [1:0] {
    CS_NEXT  = 2'd0,  // LD = 0: MPC counts up
    CS_JUMP  = 2'd1,  // LD = 1: load MPC-MUX output
    CS_FLAG1 = 2'd2,  // LD = FLAG1
    CS_FLAG2 = 2'd3   // LD = FLAG2
  } cs_e;

  typedef struct packed {
    cs_e            cs;
    logic [UAW-1:0] na;
    logic [6:0]     s;   // S6..S0
    logic [14:0]    c;   // C14..C0
  } uword_t;

  // Control line numbers.
  localparam int unsigned C_BUS2MEM = 0;   // data bus drives memory data bus
  localparam int unsigned C_AC_LD   = 1;   // AC <- bus
  localparam int unsigned C_CMP     = 2;   // flags <- compare(AC, bus)
  localparam int unsigned C_MDR_LD  = 3;   // MDR <- memory
  localparam int unsigned C_IR_LD   = 4;   // IR <- MDR
  localparam int unsigned C_PC_INC  = 5;   // PC <- PC + 1
  localparam int unsigned C_PC_LD   = 6;   // PC <- OPND
  localparam int unsigned C_MADR_LD = 7;   // MADR <- MADR-MUX
  localparam int unsigned C_OPND_EN = 8;   // OPND drives data bus
  localparam int unsigned C_MEM_WR  = 9;   // memory write
  localparam int unsigned C_REG_WR  = 10;  // selected register <- bus
  localparam int unsigned C_REG_ADR = 11;  // selected register -> MADR-MUX
  localparam int unsigned C_REG_EN  = 14;  // selected register drives bus

  // Select line numbers.
  localparam int unsigned S_MADR0   = 0;   // MADR-MUX select, low bit
  localparam int unsigned S_MADR1   = 1;   // MADR-MUX select, high bit
  localparam int unsigned S_MPC_OP  = 2;   // MPC-MUX: 1 = opcode, 0 = NA
  localparam int unsigned S_DEC     = 3;   // Inc/Dec: 1 = decrement
  localparam int unsigned S_RSEL_R2 = 4;   // R-MUX: 1 = R2, 0 = R1
  localparam int unsigned S_INCDEC  = 5;   // Inc/Dec drives data bus
  localparam int unsigned S_MDR_EN  = 6;   // MDR low byte drives data bus

  // MADR-MUX select codes {S1,S0}.
  localparam logic [1:0] MADR_OPND = 2'b00;
  localparam logic [1:0] MADR_REG  = 2'b01;
  localparam logic [1:0] MADR_PC   = 2'b10;

endpackage
