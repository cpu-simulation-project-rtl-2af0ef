// tb_mir: loads random 32-bit micro words and checks that after each clock
// edge CS, NA, S and C show bits 31..30, 29..22, 21..15 and 14..0 of the
// word loaded at that edge.
module tb_mir;
  import cpu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  uword_t d;
  cs_e cs;
  logic [7:0] na;
  logic [6:0] s;
  logic [14:0] c;
  int checks = 0, failures = 0;

  mir u_dut (.*);

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [31:0] w;
      w = $urandom;
      d = uword_t'(w);
      @(posedge clk); #1;
      d = uword_t'(~w);      // input changes, output must keep w
      #1;
      checks++;
      if (cs != w[31:30] || na != w[29:22] || s != w[21:15] || c != w[14:0]) begin
        failures++;
        $display("FAIL: word %08h", w);
      end
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
