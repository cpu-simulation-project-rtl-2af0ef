// tb_comparator: drives random and corner-case AC/bus pairs into the 8-bit
// comparator and checks that FLAG1 (A > B) and FLAG2 (A < B) are stored
// one clock after a cycle with C2 high, hold while C2 is low, and clear on
// reset. Expected values come from integer comparison.
module tb_comparator;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, c2, flag1, flag2;
  logic [7:0] a, b;
  int checks = 0, failures = 0;

  comparator #(.W(8)) u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmp(input logic [7:0] x, input logic [7:0] y);
    logic e1, e2;
    a = x; b = y; c2 = 1'b1;
    @(posedge clk); #1;
    c2 = 1'b0;
    e1 = (int'(x) > int'(y)); e2 = (int'(x) < int'(y));
    check(flag1 == e1 && flag2 == e2,
          $sformatf("%02h vs %02h: flags %b%b, expected %b%b", x, y, flag1, flag2, e1, e2));
    a = ~x; b = y;           // change inputs, C2 low: flags must hold
    @(posedge clk); #1;
    check(flag1 == e1 && flag2 == e2, "flags hold while C2 low");
  endtask

  initial begin
    rst = 1'b1; c2 = 1'b0; a = '0; b = '0;
    @(posedge clk); #1;
    check(!flag1 && !flag2, "flags cleared by reset");
    rst = 1'b0;
    cmp(8'h00, 8'h00); cmp(8'hFF, 8'h00); cmp(8'h00, 8'hFF);
    cmp(8'h10, 8'h0F); cmp(8'h0F, 8'h10); cmp(8'h80, 8'h7F);
    cmp(8'h35, 8'h36); cmp(8'h36, 8'h35); cmp(8'hA5, 8'hA5);
    for (int i = 0; i < 300; i++) begin
      logic [7:0] x, y;
      x = 8'($urandom); y = (i % 4 == 0) ? {x[7:4], 4'($urandom)} : 8'($urandom);
      cmp(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
