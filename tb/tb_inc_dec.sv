// tb_inc_dec: exhaustively checks increment and decrement of every 8-bit
// value, with wrap-around at FFH/00H, and that the output is 0 while S5
// is low.
module tb_inc_dec;
  logic [7:0] a, r;
  logic s3, s5;
  int checks = 0, failures = 0;

  inc_dec #(.W(8)) u_dut (.*);

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int m = 0; m < 4; m++) begin
        int e;
        a = 8'(v); s3 = m[0]; s5 = m[1];
        #1;
        e = !s5 ? 0 : (s3 ? (v + 255) % 256 : (v + 1) % 256);
        checks++;
        if (int'(r) != e) begin
          failures++;
          $display("FAIL: a=%02h s3=%b s5=%b r=%02h expected %02h", a, s3, s5, r, e);
        end
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
