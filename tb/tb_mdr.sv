// tb_mdr: checks that the MDR captures the 16-bit memory word only with C3
// high, always presents it to the IR, drives its low byte onto the bus
// only while S6 is high, and clears on reset.
module tb_mdr;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, c3, s6;
  logic [15:0] d, q, model;
  logic [7:0] bus_q;
  int checks = 0, failures = 0;

  mdr #(.W(16), .BW(8)) u_dut (.*);

  initial begin
    rst = 1'b1; c3 = 1'b1; s6 = 1'b1; d = 16'hBEEF;
    @(posedge clk); #1;
    checks++; if (q != 16'h0000) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0; model = 16'h0000;
    for (int i = 0; i < 200; i++) begin
      c3 = 1'($urandom); d = 16'($urandom);
      @(posedge clk); #1;
      if (c3) model = d;
      s6 = 1'($urandom); #1;
      checks++;
      if (q != model || bus_q != (s6 ? model[7:0] : 8'h00)) begin
        failures++;
        $display("FAIL: q=%04h bus=%02h expected %04h", q, bus_q, model);
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
