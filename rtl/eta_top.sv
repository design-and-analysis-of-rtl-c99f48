// eta_top: 32-bit error-tolerant adder (ETA).
//
// An ordinary adder is slow and power-hungry mainly because carries have to
// ripple across the whole word. The ETA gives up exactness in the low-order
// bits to remove that chain. The operands are split at one point into an
// accurate upper part (12 bits by default) and an inaccurate lower part (20
// bits by default), and both parts start at the split point and work away
// from it at the same time:
//   - the upper part is added exactly by accurate_adder, a ripple-carry chain
//     of full adders, with its carry in tied to 0 (no carry crosses the split);
//   - the lower part goes to control_block, which finds the first bit pair
//     (scanning down from the split) where both bits are 1, and to
//     carry_free_adder, which XORs each pair and forces to 1 every bit from
//     that pair down.
// Example with 4 + 4 bits: 1011_0111 + 1011_1101 gives 1_0110_1111 (the
// exact sum is 1_0111_0100).
//
// Split widths and the structure follow the ETA as specified; the choice of
// ripple carry for the accurate part, and bringing the accurate part's carry
// out to a port, are this design's.
//
// Interface: WIDTH-bit operands a, b; WIDTH-bit approximate sum and the
// accurate part's carry out cout (bit WIDTH of the result). Purely
// combinational: no clock, no reset; the result is valid one combinational
// delay after the operands.
module eta_top #(
  parameter int unsigned WIDTH       = eta_pkg::ETA_WIDTH,
  parameter int unsigned INACC_WIDTH = eta_pkg::ETA_INACC_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned ACC_WIDTH = WIDTH - INACC_WIDTH;

  // Elaboration-time sanity: both parts must exist.
  if (INACC_WIDTH == 0 || INACC_WIDTH >= WIDTH) begin : g_bad_split
    $error("eta_top: INACC_WIDTH must be between 1 and WIDTH-1");
  end

  logic [INACC_WIDTH-1:0] ctl;

  // Accurate part: bits WIDTH-1 .. INACC_WIDTH, carry in grounded.
  accurate_adder #(.WIDTH(ACC_WIDTH)) u_accurate (
    .a    (a[WIDTH-1:INACC_WIDTH]),
    .b    (b[WIDTH-1:INACC_WIDTH]),
    .cin  (1'b0),
    .sum  (sum[WIDTH-1:INACC_WIDTH]),
    .cout (cout)
  );

  // Inaccurate part: bits INACC_WIDTH-1 .. 0.
  control_block #(.WIDTH(INACC_WIDTH)) u_control (
    .a   (a[INACC_WIDTH-1:0]),
    .b   (b[INACC_WIDTH-1:0]),
    .ctl (ctl)
  );

  carry_free_adder #(.WIDTH(INACC_WIDTH)) u_carry_free (
    .a   (a[INACC_WIDTH-1:0]),
    .b   (b[INACC_WIDTH-1:0]),
    .ctl (ctl),
    .sum (sum[INACC_WIDTH-1:0])
  );

endmodule
