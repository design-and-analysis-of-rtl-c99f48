// accurate_adder: exact adder for the upper (accurate) part of the ETA.
//
// The accurate part may be any conventional adder; this one is a
// ripple-carry chain of gdi_full_adder cells, the full adder the design is
// built around. Bit 0 takes the external carry in, each cell passes its
// carry to the next, and the last cell's carry is the carry out. In the ETA
// the carry in is tied to 0: no carry ever comes up from the inaccurate
// part. Choosing ripple carry (rather than carry look-ahead or bypass) is
// this design's choice.
//
// Interface: WIDTH-bit operands a, b and carry in cin; WIDTH-bit sum and
// carry out cout. Purely combinational; the critical path runs through all
// WIDTH carry stages.
module accurate_adder #(
  parameter int unsigned WIDTH = eta_pkg::ETA_ACC_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // carry[i] is the carry into bit i; carry[WIDTH] is the carry out.
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gdi_full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .sum  (sum[i]),
      .cout (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
