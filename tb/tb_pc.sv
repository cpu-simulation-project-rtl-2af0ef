// tb_pc: checks reset to 00H, counting on C5 with wrap from FFH to 00H,
// loading on C6 (which wins over C5), and holding with both low.
module tb_pc;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, c5, c6;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  pc #(.W(8)) u_dut (.*);

  initial begin
    rst = 1'b1; c5 = 1; c6 = 0; d = 8'h33;
    @(posedge clk); #1;
    checks++; if (q != 8'h00) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0; model = 8'h00;
    // wrap-around
    c6 = 1; d = 8'hFE; c5 = 0; @(posedge clk); #1; model = 8'hFE; c6 = 0;
    for (int i = 0; i < 400; i++) begin
      if (i > 3) begin c5 = 1'($urandom); c6 = ($urandom % 8) == 0; d = 8'($urandom); end
      else begin c5 = 1; c6 = 0; end
      @(posedge clk); #1;
      if (c6) model = d; else if (c5) model = model + 8'd1;
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
