// tb_microcode_rom: walks the micro-program the way the sequencer would,
// from the fetch address 10H through each opcode's routine and back to
// 10H, with the comparator flags both clear and both set. For each
// instruction it checks the cycle count (MOVEI 5; STORE, INC, DEC, COMPR
// 6; LOAD, JGT, JLT 7) and that the control lines the instruction needs
// were raised on the way (and PC loads only for a taken jump). Every word
// is also checked for bus rules: at most one data-bus driver, and a
// memory write only together with C0.
module tb_microcode_rom;
  import cpu_pkg::*;
  logic [7:0] addr;
  uword_t q;
  int checks = 0, failures = 0;

  microcode_rom u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input logic [7:0] a, output uword_t w);
    addr = a;
    #1;
    w = q;
  endtask

  // Walk one instruction; returns cycles, ORs all C and S lines seen.
  task automatic walk(input logic [3:0] opv, input bit f, output int cyc,
                      output logic [14:0] call, output logic [6:0] sall);
    logic [7:0] m;
    uword_t w;
    bit ld;
    m = 8'h10; cyc = 0; call = '0; sall = '0;
    do begin
      rd(m, w);
      call |= w.c; sall |= w.s;
      cyc++;
      ld = (w.cs == CS_JUMP) || ((w.cs == CS_FLAG1 || w.cs == CS_FLAG2) && f);
      if (ld) m = w.s[S_MPC_OP] ? {4'h0, opv} : w.na; else m = m + 8'd1;
    end while (m != 8'h10 && cyc < 20 && !(opv == OP_HALT && m == 8'h09 && cyc > 4));
  endtask

  initial begin
    automatic int exp_cyc [10] = '{5, 5, 7, 6, 6, 6, 6, 7, 7, 5};
    int cyc;
    logic [14:0] ca;
    logic [6:0]  sa;
    for (int a = 0; a < 256; a++) begin
      uword_t w;
      rd(8'(a), w);
      check($countones({w.c[C_OPND_EN], w.c[C_REG_EN], w.s[S_INCDEC], w.s[S_MDR_EN]}) <= 1,
            $sformatf("one bus driver at %02h", a));
      check(!w.c[C_MEM_WR] || w.c[C_BUS2MEM], $sformatf("write with C0 at %02h", a));
    end
    for (int o = 1; o <= 8; o++) begin
      for (int f = 0; f < 2; f++) begin
        walk(4'(o), f[0], cyc, ca, sa);
        check(cyc == exp_cyc[o], $sformatf("op %0d flags %0d: %0d cycles, expected %0d", o, f, cyc, exp_cyc[o]));
        check(ca[C_MADR_LD] && ca[C_MDR_LD] && ca[C_IR_LD] && ca[C_PC_INC], $sformatf("op %0d fetch lines", o));
        case (o)
          1: check(ca[C_OPND_EN] && ca[C_REG_WR], "MOVEI lines");
          2: check(ca[C_REG_ADR] && sa[S_MDR_EN] && ca[C_REG_WR] && sa[S_RSEL_R2], "LOAD lines");
          3: check(ca[C_REG_ADR] && ca[C_REG_EN] && ca[C_MEM_WR] && ca[C_BUS2MEM], "STORE lines");
          4: check(ca[C_AC_LD] && sa[S_INCDEC] && !sa[S_DEC] && ca[C_REG_WR], "INC lines");
          5: check(ca[C_AC_LD] && sa[S_INCDEC] && sa[S_DEC] && ca[C_REG_WR], "DEC lines");
          6: check(ca[C_AC_LD] && ca[C_CMP] && sa[S_RSEL_R2] && !ca[C_REG_WR], "COMPR lines");
          7, 8: check(ca[C_PC_LD] == f[0], $sformatf("op %0d PC load only when taken", o));
          default: ;
        endcase
      end
    end
    walk(OP_HALT, 1'b0, cyc, ca, sa);
    begin
      uword_t w1, w2;
      rd(8'h09, w1);
      check(w1.cs == CS_JUMP && w1.na == 8'h09, "HALT loops on itself");
      rd(8'h30, w1); rd(8'h34, w2);
      check(w1.cs == CS_FLAG1 && w2.cs == CS_FLAG2, "JGT uses FLAG1, JLT FLAG2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
