// tb_reg_file: random writes and reads of the four registers against a
// reference array: a write happens only with C10 high and only to the
// selected register; the bus and address outputs show the selected
// register while C14 / C11 are high and 0 otherwise; reset clears all.
module tb_reg_file;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, c10, c14, c11;
  logic [1:0] sel;
  logic [7:0] d, bus_q, adr_q;
  logic [3:0][7:0] regs;
  logic [7:0] model [4];
  int checks = 0, failures = 0;

  reg_file #(.W(8), .N(4)) u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; c10 = 0; c14 = 0; c11 = 0; sel = 0; d = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    model = '{default: 8'h00};
    for (int i = 0; i < 4; i++) begin
      sel = 2'(i); c14 = 1; c11 = 1; #1;
      check(bus_q == 0 && adr_q == 0, "registers clear after reset");
    end
    for (int i = 0; i < 400; i++) begin
      sel = 2'($urandom); c10 = 1'($urandom); d = 8'($urandom);
      c14 = 1'($urandom); c11 = 1'($urandom);
      #1;
      check(bus_q == (c14 ? model[sel] : 8'h00), $sformatf("bus read reg %0d", sel));
      check(adr_q == (c11 ? model[sel] : 8'h00), $sformatf("address read reg %0d", sel));
      @(posedge clk); #1;
      if (c10) model[sel] = d;
      for (int k = 0; k < 4; k++) check(regs[k] == model[k], $sformatf("register %0d content", k));
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
