// tb_ir: loads instruction words taken from the bubble-sort program and
// random words, and checks the OP and OPND fields, the R-MUX choice of
// R1 (S4 = 0) or R2 (S4 = 1), holding while C4 is low, and reset.
module tb_ir;
  import cpu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, c4, s4;
  logic [15:0] d, held;
  logic [3:0] op;
  logic [1:0] rs;
  logic [7:0] opnd;
  instr_t q;
  int checks = 0, failures = 0;

  ir u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    automatic logic [15:0] words [8] = '{16'h2300, 16'h3700, 16'h6E00, 16'h800C,
                                 16'h1C40, 16'h3100, 16'h9000, 16'h6100};
    rst = 1'b1; c4 = 0; s4 = 0; d = 16'hFFFF;
    @(posedge clk); #1;
    check(q == 16'h0000, "reset");
    rst = 1'b0; held = 16'h0000;
    for (int i = 0; i < 200; i++) begin
      d = (i < 8) ? words[i] : 16'($urandom);
      c4 = (i < 8) ? 1'b1 : 1'($urandom);
      @(posedge clk); #1;
      if (c4) held = d;
      c4 = 0;
      s4 = 0; #1;
      check(op == held[15:12] && opnd == held[7:0] && rs == held[11:10],
            $sformatf("fields of %04h (R1)", held));
      s4 = 1; #1;
      check(rs == held[9:8], $sformatf("R2 field of %04h", held));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
