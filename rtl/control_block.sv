// control_block: control-signal generator of the ETA's inaccurate part.
//
// The block looks at every bit pair of the inaccurate part, starting from
// its most significant bit (next to the split point) and moving towards bit
// 0. At the first position where both operand bits are 1 it raises the
// control signal, and the signal stays high at every position to the right
// of it. Formally ctl[i] = OR over j >= i of (a[j] & b[j]). The function is
// the one the ETA is defined by; building it as a single chain of OR gates
// running from the top bit down is this design's choice.
//
// Interface: WIDTH-bit operands a, b in; WIDTH-bit control vector ctl out.
// Purely combinational; the path runs through at most WIDTH OR stages.
module control_block #(
  parameter int unsigned WIDTH = eta_pkg::ETA_INACC_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] ctl
);

  logic [WIDTH-1:0] both_high;

  assign both_high = a & b;

  // Top bit: high only if its own pair is 1/1.
  assign ctl[WIDTH-1] = both_high[WIDTH-1];

  // Lower bits: high if their own pair is 1/1 or any pair above was.
  for (genvar i = WIDTH - 1; i > 0; i--) begin : g_chain
    assign ctl[i-1] = ctl[i] | both_high[i-1];
  end

endmodule
