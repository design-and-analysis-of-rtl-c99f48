// carry_free_adder: carry-free addition block of the ETA's inaccurate part.
//
// Each bit is added on its own, without a carry: the sum bit is the XOR of
// the two operand bits. Where the control block has raised its signal
// (from the first 1/1 pair downwards) the sum bit is forced to 1 instead,
// which stands in for the carries that were not propagated. So
// sum[i] = (a[i] ^ b[i]) | ctl[i]. That function is the ETA's; writing it
// as one XOR and one OR per bit is the simplest circuit that does it.
//
// Interface: WIDTH-bit operands a, b and control vector ctl in; WIDTH-bit
// sum out. Purely combinational, one XOR and one OR deep.
module carry_free_adder #(
  parameter int unsigned WIDTH = eta_pkg::ETA_INACC_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] ctl,
  output logic [WIDTH-1:0] sum
);

  assign sum = (a ^ b) | ctl;

endmodule
