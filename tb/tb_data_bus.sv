// tb_data_bus: enables one source at a time (or none) with random values
// on all source inputs, as the source blocks gate their own outputs, and
// checks the bus value and the 16-bit memory write data under C0.
module tb_data_bus;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, en_opnd, en_reg, en_incdec, en_mdr, c0;
  logic [7:0] opnd, regv, incdec, mdr, bus;
  logic [15:0] mem_wdata;
  int checks = 0, failures = 0;

  data_bus u_dut (.*);

  initial begin
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      int src;
      logic [7:0] e, ro, rr, ri, rm;
      src = $urandom_range(0, 4);
      ro = 8'($urandom); rr = 8'($urandom); ri = 8'($urandom); rm = 8'($urandom);
      en_opnd = (src == 0); en_reg = (src == 1); en_incdec = (src == 2); en_mdr = (src == 3);
      opnd   = ro;                       // raw: gated inside the bus
      regv   = en_reg    ? rr : 8'h00;   // gated by the register file
      incdec = en_incdec ? ri : 8'h00;   // gated by Inc/Dec
      mdr    = en_mdr    ? rm : 8'h00;   // gated by the MDR
      c0 = 1'($urandom);
      @(negedge clk);
      e = (src == 0) ? ro : (src == 1) ? rr : (src == 2) ? ri : (src == 3) ? rm : 8'h00;
      checks++;
      if (bus != e || mem_wdata != (c0 ? {8'h00, e} : 16'h0000)) begin
        failures++;
        $display("FAIL: src=%0d bus=%02h expected %02h", src, bus, e);
      end
      @(posedge clk); #1;
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
