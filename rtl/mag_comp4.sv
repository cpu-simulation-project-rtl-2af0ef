// mag_comp4: 4-bit magnitude comparator with cascade inputs, the function of
// a 74LS85. Outputs are combinational. When the 4-bit words are equal the
// result is taken from the cascade inputs, so two of these chained (lower
// nibble's outputs into the upper nibble's cascade inputs) compare 8 bits.
// Cascade inputs of the least significant stage are tied to "equal"
// (gt=0, eq=1, lt=0).
module mag_comp4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       gt_in,
  input  logic       eq_in,
  input  logic       lt_in,
  output logic       gt,
  output logic       eq,
  output logic       lt
);
  always_comb begin
    if (a > b) begin
      gt = 1'b1; eq = 1'b0; lt = 1'b0;
    end else if (a < b) begin
      gt = 1'b0; eq = 1'b0; lt = 1'b1;
    end else begin
      gt = gt_in; eq = eq_in; lt = lt_in;
    end
  end
endmodule
