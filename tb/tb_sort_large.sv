// tb_sort_large: the bubble-sort program with its three size constants
// changed to sort N = 64 values, the most the 128-word RAM holds above the
// data start address 40H (40H..7FH). Word 00H becomes MOVEI C, N-1 (pass
// count), word 0DH MOVEI A, 40H+N-1 (last data address) and word 15H
// MOVEI C, 40H+N (print end); everything else is the five-value program.
// The testbench enters program and random data through the manual DMA
// path, runs to HALT, and checks the N OUT writes against the data sorted
// by the testbench and the cycle count against an instruction-level model.
module tb_sort_large;
  import cpu_pkg::*;

  localparam int N = 64;

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
  logic [DW-1:0] outs [$];

  always @(posedge clk) if (out_strobe) outs.push_back(out_q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Cycles to HALT of the micro-program, per instruction (fetch included).
  function automatic int ref_cycles(input logic [15:0] m_in [128]);
    logic [15:0] m [128];
    logic [7:0]  r [4];
    logic [7:0]  pcv;
    logic        f1, f2;
    int          cyc;
    m = m_in; r = '{default: 8'h00}; pcv = 0; f1 = 0; f2 = 0; cyc = 0;
    forever begin
      logic [15:0] w;
      w = m[pcv[6:0]]; pcv++;
      case (w[15:12])
        4'h1: begin r[w[11:10]] = w[7:0]; cyc += 5; end
        4'h2: begin r[w[11:10]] = m[r[w[9:8]][6:0]][7:0]; cyc += 7; end
        4'h3: begin if (!r[w[9:8]][7]) m[r[w[9:8]][6:0]] = {8'h00, r[w[11:10]]}; cyc += 6; end
        4'h4: begin r[w[11:10]]++; cyc += 6; end
        4'h5: begin r[w[11:10]]--; cyc += 6; end
        4'h6: begin f1 = r[w[11:10]] > r[w[9:8]]; f2 = r[w[11:10]] < r[w[9:8]]; cyc += 6; end
        4'h7: begin if (f1) pcv = w[7:0]; cyc += 7; end
        4'h8: begin if (f2) pcv = w[7:0]; cyc += 7; end
        4'h9: return cyc + 4;
        default: cyc += 5;
      endcase
      if (cyc > 2000000) return -1;
    end
  endfunction

  initial begin
    logic [15:0] image [128];
    logic [7:0]  vals [N];
    int          cyc, exp_cyc;
    image = '{default: 16'h0000};
    image[8'h00:8'h1C] = '{
      16'h1800 | 16'(N - 1), 16'h1C40, 16'h2300, 16'h4C00, 16'h2700, 16'h5C00, 16'h6100, 16'h800C,
      16'h4C00, 16'h3300, 16'h5C00, 16'h3700, 16'h4C00, 16'h1000 | 16'('h40 + N - 1), 16'h6C00, 16'h8002,
      16'h5800, 16'h1000, 16'h6800, 16'h7001, 16'h1C40, 16'h1800 | 16'('h40 + N), 16'h2300, 16'h1480,
      16'h3100, 16'h4C00, 16'h6E00, 16'h8016, 16'h9000 };
    for (int i = 0; i < N; i++) begin
      vals[i] = 8'($urandom);
      image['h40 + i] = {8'h00, vals[i]};
    end

    rst = 1'b1; bypass = 1'b1; kp_rw_n = 1'b1; kp_oe_n = 1'b1; kp_addr = '0; kp_data = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 128; i++) begin
      kp_addr = 8'(i); kp_data = image[i]; kp_oe_n = 1'b0; kp_rw_n = 1'b0;
      @(posedge clk); #1;
      kp_rw_n = 1'b1; kp_oe_n = 1'b1;
    end
    bypass = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    cyc = 0;
    while (!halted && cyc < 1000000) begin
      @(posedge clk); #1;
      cyc++;
    end
    repeat (2) @(posedge clk);
    exp_cyc = ref_cycles(image);
    vals.sort();
    check(halted, "reached HALT");
    check(cyc == exp_cyc, $sformatf("cycles %0d, expected %0d", cyc, exp_cyc));
    check(outs.size() == N, $sformatf("%0d OUT writes, expected %0d", outs.size(), N));
    for (int i = 0; i < N && i < outs.size(); i++)
      check(outs[i] == vals[i], $sformatf("OUT[%0d] = %02h, expected %02h", i, outs[i], vals[i]));
    $display("sorted %0d values in %0d cycles", N, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
