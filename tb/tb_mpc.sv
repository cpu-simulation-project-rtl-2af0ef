// tb_mpc: checks the micro sequencer against a reference model: reset
// forces 10H; CS = 0 counts up (wrapping at FFH); CS = 1 loads NA (S2 = 0)
// or the dispatch address {0000, OP} (S2 = 1); CS = 2 and 3 load only when
// FLAG1, respectively FLAG2, is set and count up otherwise.
module tb_mpc;
  import cpu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, s2, flag1, flag2;
  cs_e cs;
  logic [7:0] na, mpc_next, q, model;
  logic [3:0] op;
  int checks = 0, failures = 0;
  int n_cs [4];

  mpc u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    n_cs = '{default: 0};
    rst = 1'b1; cs = CS_NEXT; na = 8'h55; s2 = 0; op = 4'h3; flag1 = 0; flag2 = 0;
    @(posedge clk); #1;
    check(q == 8'h10 && mpc_next == 8'h10, "reset to 10H");
    rst = 1'b0; model = 8'h10;
    for (int i = 0; i < 600; i++) begin
      logic ld;
      cs = cs_e'($urandom_range(0, 3)); na = 8'($urandom); s2 = 1'($urandom);
      op = 4'($urandom); flag1 = 1'($urandom); flag2 = 1'($urandom);
      if (i == 5) begin cs = CS_JUMP; na = 8'hFF; s2 = 0; end   // next step wraps
      if (i == 6) cs = CS_NEXT;
      n_cs[cs]++;
      ld = (cs == CS_JUMP) || (cs == CS_FLAG1 && flag1) || (cs == CS_FLAG2 && flag2);
      #1;
      if (ld) model = s2 ? {4'h0, op} : na; else model = model + 8'd1;
      check(mpc_next == model, $sformatf("mpc_next %02h expected %02h (cs=%0d)", mpc_next, model, cs));
      @(posedge clk); #1;
      check(q == model, "mpc register");
    end
    for (int k = 0; k < 4; k++) check(n_cs[k] > 0, "every CS value used");
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
