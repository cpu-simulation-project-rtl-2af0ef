// tb_madr: checks that MADR loads its input only with C7 high, holds
// otherwise, and clears on reset.
module tb_madr;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, c7;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  madr #(.W(8)) u_dut (.*);

  initial begin
    rst = 1'b1; c7 = 1'b1; d = 8'hC3;
    @(posedge clk); #1;
    checks++; if (q != 8'h00) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0; model = 8'h00;
    for (int i = 0; i < 200; i++) begin
      c7 = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (c7) model = d;
      checks++;
      if (q != model) begin failures++; $display("FAIL: q=%02h expected %02h", q, model); end
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
