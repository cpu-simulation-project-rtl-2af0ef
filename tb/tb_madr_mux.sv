// tb_madr_mux: random inputs through every select code: 00 gives OPND (a),
// 01 the register path (b), 10 the PC (c), 11 gives 00H.
module tb_madr_mux;
  logic [1:0] s;
  logic [7:0] a, b, c, q, e;
  int checks = 0, failures = 0;

  madr_mux #(.W(8)) u_dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      s = 2'(i); a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      #1;
      e = (s == 0) ? a : (s == 1) ? b : (s == 2) ? c : 8'h00;
      checks++;
      if (q != e) begin failures++; $display("FAIL: s=%0d q=%02h expected %02h", s, q, e); end
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
