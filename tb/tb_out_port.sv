// tb_out_port: random memory writes at random addresses; the OUT register
// must take the data only for writes to addresses with bit 7 set (80H),
// and strobe must pulse once for each such write.
module tb_out_port;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, we, strobe;
  logic [7:0] addr, wdata, q, model;
  int checks = 0, failures = 0, hits = 0;

  out_port #(.AW(8), .W(8), .ADDR(8'h80)) u_dut (.*);

  initial begin
    rst = 1'b1; we = 1; addr = 8'h80; wdata = 8'h77;
    @(posedge clk); #1;
    checks++; if (q != 0 || strobe) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0; model = 8'h00;
    for (int i = 0; i < 400; i++) begin
      logic hit;
      we = 1'($urandom); wdata = 8'($urandom);
      addr = (i % 3 == 0) ? 8'h80 : 8'($urandom);
      hit = we && addr[7];
      @(posedge clk); #1;
      if (hit) begin model = wdata; hits++; end
      checks++;
      if (q != model || strobe != hit) begin
        failures++;
        $display("FAIL: addr=%02h we=%b q=%02h strobe=%b expected %02h %b", addr, we, q, strobe, model, hit);
      end
    end
    checks++; if (hits == 0) failures++;
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
