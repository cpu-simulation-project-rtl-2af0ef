// microcode_rom: the 256 x 32 micro-program store, combinational read.
//
// Layout of the micro-program (addresses in hex):
//   00-0F  dispatch entries, one per opcode; the fetch routine jumps to
//          {0, OP} with S2 = 1. Single-step instructions finish here,
//          longer ones jump on to their routine.
//   10-13  fetch: MADR <- PC; MDR <- M[MADR]; IR <- MDR and PC <- PC+1;
//          dispatch on OP.
//   20-36  the second and third steps of LOAD, STORE, INC, DEC, COMPR,
//          JGT and JLT.
// Every routine ends with an unconditional jump to 10. A conditional jump
// uses CS = FLAG1 or FLAG2 to branch to the step that loads the PC; when
// the flag is clear the MPC counts on to a word that returns to fetch.
// HALT jumps to itself. Cycles per instruction, fetch included: MOVEI 5,
// STORE/INC/DEC/COMPR 6, LOAD, JGT and JLT 7 (taken or not), HALT 4 to
// reach its self-loop.
// The ROM exists in the original design but its contents here are this
// design's own micro-program; the words are built by a function, not read
// from a file.
module microcode_rom
  import cpu_pkg::*;
(
  input  logic [UAW-1:0] addr,
  output uword_t         q
);
  // One micro word from its fields; ctl/sel are bit masks of C and S lines.
  function automatic uword_t uw(cs_e cs, logic [UAW-1:0] na,
                                logic [6:0] sel, logic [14:0] ctl);
    uword_t w;
    w.cs = cs;
    w.na = na;
    w.s  = sel;
    w.c  = ctl;
    return w;
  endfunction

  function automatic logic [14:0] C(int unsigned n);
    return 15'(1) << n;
  endfunction

  function automatic logic [6:0] S(int unsigned n);
    return 7'(1) << n;
  endfunction

  localparam logic [UAW-1:0] F = UADDR_FETCH;

  always_comb begin
    unique case (addr)
      // ---- dispatch entries ----
      8'h00: q = uw(CS_JUMP, F, '0, '0);                                    // NOP
      8'h01: q = uw(CS_JUMP, F, '0, C(C_OPND_EN) | C(C_REG_WR));            // MOVEI: R1 <- OPND
      8'h02: q = uw(CS_JUMP, 8'h20, S(S_RSEL_R2) | 7'(MADR_REG),
                    C(C_REG_ADR) | C(C_MADR_LD));                           // LOAD: MADR <- R2
      8'h03: q = uw(CS_JUMP, 8'h24, S(S_RSEL_R2) | 7'(MADR_REG),
                    C(C_REG_ADR) | C(C_MADR_LD));                           // STORE: MADR <- R2
      8'h04: q = uw(CS_JUMP, 8'h28, '0, C(C_REG_EN) | C(C_AC_LD));          // INC: AC <- R1
      8'h05: q = uw(CS_JUMP, 8'h2A, '0, C(C_REG_EN) | C(C_AC_LD));          // DEC: AC <- R1
      8'h06: q = uw(CS_JUMP, 8'h2C, '0, C(C_REG_EN) | C(C_AC_LD));          // COMPR: AC <- R1
      8'h07: q = uw(CS_JUMP, 8'h30, '0, '0);                                // JGT
      8'h08: q = uw(CS_JUMP, 8'h34, '0, '0);                                // JLT
      8'h09: q = uw(CS_JUMP, 8'h09, '0, '0);                                // HALT: stay
      // ---- fetch ----
      8'h10: q = uw(CS_NEXT, '0, 7'(MADR_PC), C(C_MADR_LD));                  // MADR <- PC
      8'h11: q = uw(CS_NEXT, '0, '0, C(C_MDR_LD));                          // MDR <- M[MADR]
      8'h12: q = uw(CS_NEXT, '0, '0, C(C_IR_LD) | C(C_PC_INC));             // IR <- MDR, PC++
      8'h13: q = uw(CS_JUMP, '0, S(S_MPC_OP), '0);                          // MPC <- OP
      // ---- LOAD ----
      8'h20: q = uw(CS_NEXT, '0, '0, C(C_MDR_LD));                          // MDR <- M[MADR]
      8'h21: q = uw(CS_JUMP, F, S(S_MDR_EN), C(C_REG_WR));                  // R1 <- MDR
      // ---- STORE ----
      8'h24: q = uw(CS_JUMP, F, '0,
                    C(C_REG_EN) | C(C_BUS2MEM) | C(C_MEM_WR));              // M[MADR] <- R1
      // ---- INC / DEC ----
      8'h28: q = uw(CS_JUMP, F, S(S_INCDEC), C(C_REG_WR));                  // R1 <- AC + 1
      8'h2A: q = uw(CS_JUMP, F, S(S_INCDEC) | S(S_DEC), C(C_REG_WR));       // R1 <- AC - 1
      // ---- COMPR ----
      8'h2C: q = uw(CS_JUMP, F, S(S_RSEL_R2), C(C_REG_EN) | C(C_CMP));      // flags <- AC ? R2
      // ---- JGT ----
      8'h30: q = uw(CS_FLAG1, 8'h32, '0, '0);
      8'h31: q = uw(CS_JUMP, F, '0, '0);
      8'h32: q = uw(CS_JUMP, F, '0, C(C_PC_LD));                            // PC <- OPND
      // ---- JLT ----
      8'h34: q = uw(CS_FLAG2, 8'h36, '0, '0);
      8'h35: q = uw(CS_JUMP, F, '0, '0);
      8'h36: q = uw(CS_JUMP, F, '0, C(C_PC_LD));                            // PC <- OPND
      default: q = uw(CS_JUMP, F, '0, '0);                                  // unused: to fetch
    endcase
  end
endmodule
