// comparator: 8-bit magnitude comparator with the two flag flip-flops.
//
// Two 4-bit comparators (74LS85 function) are chained: the lower one compares
// bits 3..0 with its cascade inputs tied to "equal", its results feed the
// cascade inputs of the upper one, which compares bits 7..4. The upper
// stage's A>B and A<B outputs are stored in FLAG1 and FLAG2 at the rising
// clock edge when C2 (compare AC with register) is high; otherwise the flags
// hold. A is the accumulator, B the register value on the data bus.
// This structure follows the original design. The original gates the clock
// with C2; here C2 is a clock enable on the one system clock, and the flags
// are cleared by reset (a choice of this design).
module comparator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         c2,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         flag1,  // AC > Reg
  output logic         flag2   // AC < Reg
);
  localparam int unsigned NIB = (W + 3) / 4;

  logic [4*NIB-1:0] ax, bx;
  logic [NIB:0]     gt_c, eq_c, lt_c;

  assign ax = (4*NIB)'(a);
  assign bx = (4*NIB)'(b);
  assign gt_c[0] = 1'b0;
  assign eq_c[0] = 1'b1;
  assign lt_c[0] = 1'b0;

  for (genvar i = 0; i < NIB; i++) begin : g_stage
    mag_comp4 u_cmp (
      .a    (ax[4*i +: 4]),
      .b    (bx[4*i +: 4]),
      .gt_in(gt_c[i]), .eq_in(eq_c[i]), .lt_in(lt_c[i]),
      .gt   (gt_c[i+1]), .eq(eq_c[i+1]), .lt(lt_c[i+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flag1 <= 1'b0;
      flag2 <= 1'b0;
    end else if (c2) begin
      flag1 <= gt_c[NIB];
      flag2 <= lt_c[NIB];
    end
  end

  // eq_c[NIB] (A=B) is not stored, as in the original.
  logic unused_eq;
  assign unused_eq = eq_c[NIB];
endmodule
