// gdi_full_adder: one-bit full adder, the cell of the accurate part.
//
// The cell is the logic view of an 11-transistor full adder drawn in the
// gate-diffusion-input (GDI) style. It first forms the XOR and XNOR of the
// two operand bits. The sum bit is then a 2:1 selection between those two,
// steered by the carry in (sum = XOR when cin = 0, XNOR when cin = 1). The
// carry out is a 2:1 selection between the carry in and operand a, steered
// by the XOR: when a and b differ the carry in propagates, and when they are
// equal a (= b) is the carry. The names XOR, XNOR, A, B, Cin, Cout and SUM
// are the ones the circuit is drawn with; the two selections written as
// multiplexers are this design's reading of it, chosen because GDI cells are
// selection elements. Transistor-level properties (swing, sizing, power)
// have no RTL counterpart.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module gdi_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic ab_xor;
  logic ab_xnor;

  always_comb begin
    ab_xor  = a ^ b;
    ab_xnor = ~ab_xor;
    // Sum: select XOR or XNOR with the carry in.
    sum     = cin ? ab_xnor : ab_xor;
    // Carry: propagate cin when a != b, otherwise generate/kill with a.
    cout    = ab_xor ? cin : a;
  end

endmodule
