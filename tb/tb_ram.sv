// tb_ram: fills the 128 x 16 RAM with random words, reads them all back,
// then mixes random reads and writes against a reference array; checks
// that writes with CE or WE low change nothing and that reads with CE low
// return 0.
module tb_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic ce, we;
  logic [6:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [128];
  int checks = 0, failures = 0;

  ram #(.AW(7), .DW(16)) u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ce = 1; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 128; i++) begin
      addr = 7'(i); wdata = 16'($urandom); we = 1; model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 128; i++) begin
      addr = 7'(i); #1;
      check(rdata == model[i], $sformatf("read %02h", i));
    end
    for (int i = 0; i < 500; i++) begin
      addr = 7'($urandom); wdata = 16'($urandom); ce = ($urandom % 4) != 0; we = 1'($urandom);
      #1;
      check(rdata == (ce ? model[addr] : 16'h0000), $sformatf("read %02h ce=%b", addr, ce));
      @(posedge clk); #1;
      if (ce && we) model[addr] = wdata;
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
