// tb_cpu_top: end-to-end test of the CPU at its default sizes.
//
// For each of several data sets the testbench holds the CPU in reset,
// enters the bubble-sort program at 00H-1CH and five data words at 40H-44H
// through the manual DMA keypad path, releases reset and lets the program
// run to HALT. It checks:
//   - the five values written to the OUT register are the data in
//     ascending order and RAM 40H-44H holds them sorted;
//   - the number of clock cycles from reset release to HALT equals the sum
//     of the per-instruction cycle counts of the micro-program, obtained
//     from an instruction-level reference model run on the same program;
//   - the number of instructions executed equals the reference model's;
//   - every opcode of the program, both outcomes of JGT and JLT, both
//     comparator flags, DMA writes and OUT writes occurred at least once.
module tb_cpu_top;
  import cpu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst, bypass, kp_rw_n, kp_oe_n;
  logic [AW-1:0]       kp_addr;
  logic [IW-1:0]       kp_data;
  logic [DW-1:0]       out_q;
  logic                out_strobe, halted, flag1, flag2;
  logic [AW-1:0]       pc_q;
  logic [UAW-1:0]      mpc_q;
  logic [3:0][DW-1:0]  regs_q;
  instr_t              ir_q;

  cpu_top u_dut (.*);

  int checks = 0, failures = 0;

  // Bubble sort of 40H..44H, then print them through the OUT register.
  localparam int PLEN = 29;
  logic [15:0] prog [PLEN] = '{
    16'h1804, 16'h1C40, 16'h2300, 16'h4C00, 16'h2700, 16'h5C00, 16'h6100, 16'h800C,
    16'h4C00, 16'h3300, 16'h5C00, 16'h3700, 16'h4C00, 16'h1044, 16'h6C00, 16'h8002,
    16'h5800, 16'h1000, 16'h6800, 16'h7001, 16'h1C40, 16'h1845, 16'h2300, 16'h1480,
    16'h3100, 16'h4C00, 16'h6E00, 16'h8016, 16'h9000 };

  // ---------------- mechanism counters ----------------
  int n_op [16];
  int n_jgt_taken = 0, n_jgt_not = 0, n_jlt_taken = 0, n_jlt_not = 0;
  int n_dispatch = 0;
  int n_flag1 = 0, n_flag2 = 0, n_dma_wr = 0, n_out = 0;
  logic [DW-1:0] outs [$];

  always @(posedge clk) begin
    if (!rst) begin
      if (mpc_q == 8'h13) begin n_op[ir_q.op]++; n_dispatch++; end
      if (mpc_q == 8'h32) n_jgt_taken++;
      if (mpc_q == 8'h31) n_jgt_not++;
      if (mpc_q == 8'h36) n_jlt_taken++;
      if (mpc_q == 8'h35) n_jlt_not++;
      if (flag1) n_flag1++;
      if (flag2) n_flag2++;
    end
    if (bypass && !kp_rw_n && !kp_oe_n) n_dma_wr++;
    if (out_strobe) begin
      n_out++;
      outs.push_back(out_q);
    end
  end

  // ---------------- instruction-level reference model ----------------
  // Cycle counts per instruction including the 4-cycle fetch.
  function automatic int ref_run(input logic [15:0] m_in [128], output logic [7:0] o [$],
                                output int ni);
    logic [15:0] m [128];
    logic [7:0]  r [4];
    logic [7:0]  pcv;
    logic        f1, f2;
    int          cyc;
    m = m_in;
    r = '{default: 8'h00};
    pcv = 0; f1 = 0; f2 = 0; cyc = 0; ni = 0;
    o = {};
    forever begin
      logic [15:0] w;
      logic [3:0] opv;
      logic [1:0] a, b;
      logic [7:0] k;
      w = m[pcv[6:0]]; pcv++; ni++;
      opv = w[15:12]; a = w[11:10]; b = w[9:8]; k = w[7:0];
      case (opv)
        4'h1: begin r[a] = k; cyc += 5; end
        4'h2: begin r[a] = r[b][7] ? 8'h00 : m[r[b][6:0]][7:0]; cyc += 7; end
        4'h3: begin
                if (r[b][7]) o.push_back(r[a]); else m[r[b][6:0]] = {8'h00, r[a]};
                cyc += 6;
              end
        4'h4: begin r[a]++; cyc += 6; end
        4'h5: begin r[a]--; cyc += 6; end
        4'h6: begin f1 = r[a] > r[b]; f2 = r[a] < r[b]; cyc += 6; end
        4'h7: begin if (f1) pcv = k; cyc += 7; end
        4'h8: begin if (f2) pcv = k; cyc += 7; end
        4'h9: begin cyc += 4; return cyc; end
        default: cyc += 5;
      endcase
      if (cyc > 100000) return -1;
    end
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic dma_write(input logic [7:0] addr, input logic [15:0] data);
    kp_addr = addr;
    kp_data = data;
    kp_oe_n = 1'b0;
    kp_rw_n = 1'b0;
    @(posedge clk); #1;
    kp_rw_n = 1'b1;
    kp_oe_n = 1'b1;
  endtask

  task automatic run_set(input logic [7:0] vals [5]);
    logic [15:0] image [128];
    logic [7:0]  exp_out [$];
    logic [7:0]  sorted [5];
    int          exp_cyc, cyc, exp_ni, ni0;
    image = '{default: 16'h0000};
    for (int i = 0; i < PLEN; i++) image[i] = prog[i];
    for (int i = 0; i < 5; i++) image['h40 + i] = {8'h00, vals[i]};

    rst = 1'b1; bypass = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 128; i++) dma_write(8'(i), image[i]);
    bypass = 1'b0;
    @(posedge clk); #1;
    outs = {};
    ni0 = n_dispatch;
    rst = 1'b0;
    cyc = 0;
    while (!halted && cyc < 20000) begin
      @(posedge clk); #1;
      cyc++;
    end
    exp_cyc = ref_run(image, exp_out, exp_ni);
    // independent expectation: sort the data directly
    sorted = vals;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 4 - i; j++)
        if (sorted[j] > sorted[j+1]) begin
          logic [7:0] t; t = sorted[j]; sorted[j] = sorted[j+1]; sorted[j+1] = t;
        end
    repeat (2) @(posedge clk);
    check(halted, "CPU reached HALT");
    check(cyc == exp_cyc, $sformatf("cycles to HALT %0d, expected %0d", cyc, exp_cyc));
    check(n_dispatch - ni0 == exp_ni, $sformatf("%0d instructions executed, expected %0d", n_dispatch - ni0, exp_ni));
    check(outs.size() == 5, $sformatf("%0d OUT writes, expected 5", outs.size()));
    for (int i = 0; i < 5 && i < outs.size(); i++)
      check(outs[i] == sorted[i], $sformatf("OUT[%0d] = %02h, expected %02h", i, outs[i], sorted[i]));
    for (int i = 0; i < 5; i++)
      check(u_dut.u_ram.mem['h40 + i] == {8'h00, sorted[i]},
            $sformatf("RAM[%02h] = %04h, expected %02h", 'h40 + i, u_dut.u_ram.mem['h40 + i], sorted[i]));
    check(exp_out.size() == 5, "reference model printed 5 values");
    $display("data %p -> out %p, %0d instructions, %0d cycles", vals, outs, exp_ni, cyc);
  endtask

  initial begin
    logic [7:0] v [5];
    foreach (n_op[i]) n_op[i] = 0;
    rst = 1'b1; bypass = 1'b0; kp_rw_n = 1'b1; kp_oe_n = 1'b1; kp_addr = '0; kp_data = '0;
    v = '{8'h05, 8'h04, 8'h03, 8'h02, 8'h01}; run_set(v);   // reversed
    v = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05}; run_set(v);   // already sorted
    v = '{8'h7F, 8'h00, 8'h7F, 8'h10, 8'h00}; run_set(v);   // duplicates
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 5; i++) v[i] = 8'($urandom_range(0, 255));
      run_set(v);
    end
    for (int i = 1; i <= 9; i++) check(n_op[i] > 0, $sformatf("opcode %0d executed (%0d)", i, n_op[i]));
    check(n_jgt_taken > 0, "JGT taken");
    check(n_jgt_not   > 0, "JGT not taken");
    check(n_jlt_taken > 0, "JLT taken");
    check(n_jlt_not   > 0, "JLT not taken");
    check(n_flag1 > 0, "FLAG1 set");
    check(n_flag2 > 0, "FLAG2 set");
    check(n_dma_wr > 0, "DMA writes");
    check(n_out > 0, "OUT writes");
    $display("ops %p jgt %0d/%0d jlt %0d/%0d dma %0d out %0d",
             n_op, n_jgt_taken, n_jgt_not, n_jlt_taken, n_jlt_not, n_dma_wr, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
