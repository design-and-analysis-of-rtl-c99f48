// eta_pkg: sizes shared by the error-tolerant adder (ETA) blocks.
//
// The adder is 32 bits wide and is split at one point: the upper 12 bits
// form the accurate part, added exactly, and the lower 20 bits form the
// inaccurate part, added without any carry propagation. These three numbers
// are the ones the design is specified with; every module takes its width
// as a parameter whose default comes from here.
package eta_pkg;

  // Total operand width.
  localparam int unsigned ETA_WIDTH        = 32;
  // Width of the accurate (upper, exactly added) part.
  localparam int unsigned ETA_ACC_WIDTH    = 12;
  // Width of the inaccurate (lower, carry-free) part.
  localparam int unsigned ETA_INACC_WIDTH  = ETA_WIDTH - ETA_ACC_WIDTH;

endpackage
