// inc_dec: adds one to (S3 = 0) or subtracts one from (S3 = 1) the AC value,
// wrapping modulo 2^W, and drives the result onto the data bus when S5 is
// high. Combinational. The original drives the bus through tri-state
// buffers; here the output is 0 when not enabled and the bus ORs its
// sources. Which of S3/S5 is direction and which is enable is this design's
// choice.
module inc_dec #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic         s3,
  input  logic         s5,
  output logic [W-1:0] r
);
  logic [W-1:0] sum;
  always_comb begin
    sum = s3 ? a - W'(1) : a + W'(1);
    r   = s5 ? sum : '0;
  end
endmodule
