// tb_accumulator: checks that AC loads the bus value only in cycles with C1
// high, holds it otherwise, and clears on reset, against a reference
// register kept by the testbench.
module tb_accumulator;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, c1;
  logic [7:0] d, q, ref_q;
  int checks = 0, failures = 0;

  accumulator #(.W(8)) u_dut (.*);

  initial begin
    rst = 1'b1; c1 = 1'b0; d = 8'h5A;
    @(posedge clk); #1;
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0; ref_q = 8'h00;
    for (int i = 0; i < 200; i++) begin
      c1 = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (c1) ref_q = d;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL: q=%02h expected %02h", q, ref_q); end
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
