// eta_example_tb: exhaustive test of a small error-tolerant adder.
//
// The adder is instantiated with 8-bit operands split 4 + 4, the size of
// the worked example used to explain the ETA: 1011_0111 + 1011_1101 must
// give 1_0110_1111. After that example all 65536 operand pairs are applied
// and {cout, sum} is compared with a reference computed from the ETA's
// definition. A watchdog ends the run with a failure after 100000 cycles.
module eta_example_tb;

  localparam int unsigned W  = 8;
  localparam int unsigned IW = 4;

  logic         clk;
  logic [W-1:0] a, b, sum;
  logic         cout;
  int           checks   = 0;
  int           failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  eta_top #(.WIDTH(W), .INACC_WIDTH(IW)) dut (.a(a), .b(b), .sum(sum), .cout(cout));

  function automatic logic [W:0] ref_eta(logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0]    r;
    logic [W-IW:0] hi;
    bit            seen = 1'b0;
    hi = {1'b0, x[W-1:IW]} + {1'b0, y[W-1:IW]};
    r  = {hi, {IW{1'b0}}};
    for (int i = IW - 1; i >= 0; i--) begin
      if (x[i] && y[i]) seen = 1'b1;
      r[i] = seen ? 1'b1 : (x[i] ^ y[i]);
    end
    return r;
  endfunction

  initial begin
    a = 8'b1011_0111;
    b = 8'b1011_1101;
    @(posedge clk);
    checks++;
    if ({cout, sum} !== 9'b1_0110_1111) begin
      failures++;
      $display("FAIL worked example: got %b", {cout, sum});
    end
    for (int v = 0; v < 65536; v++) begin
      a = v[15:8];
      b = v[7:0];
      @(posedge clk);
      checks++;
      if ({cout, sum} !== ref_eta(a, b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> %b expected %b", a, b, {cout, sum}, ref_eta(a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
