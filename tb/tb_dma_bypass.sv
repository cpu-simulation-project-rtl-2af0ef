// tb_dma_bypass: random switch and keypad settings; with BYPASS low the
// memory must see the CPU's address, data and write strobe, with BYPASS
// high the keypads, writing only when R'/W = 0 and OE' = 0.
module tb_dma_bypass;
  logic bypass, kp_rw_n, kp_oe_n, cpu_we, mem_we;
  logic [7:0] kp_addr, cpu_addr, mem_addr;
  logic [15:0] kp_data, cpu_wdata, mem_wdata;
  int checks = 0, failures = 0;

  dma_bypass u_dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [7:0] ea; logic [15:0] ed; logic ew;
      bypass = 1'($urandom); kp_rw_n = 1'($urandom); kp_oe_n = 1'($urandom); cpu_we = 1'($urandom);
      kp_addr = 8'($urandom); cpu_addr = 8'($urandom); kp_data = 16'($urandom); cpu_wdata = 16'($urandom);
      #1;
      ea = bypass ? kp_addr : cpu_addr;
      ed = bypass ? (kp_oe_n ? 16'h0 : kp_data) : cpu_wdata;
      ew = bypass ? (!kp_rw_n && !kp_oe_n) : cpu_we;
      checks++;
      if (mem_addr != ea || mem_wdata != ed || mem_we != ew) begin
        failures++;
        $display("FAIL: bypass=%b rw_n=%b oe_n=%b", bypass, kp_rw_n, kp_oe_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
