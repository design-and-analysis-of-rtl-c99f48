// accurate_adder_tb: self-checking test of the ripple-carry accurate part.
//
// The adder is tested at its default width (12 bits). Directed vectors
// cover the full carry ripple (all ones plus one, with and without carry
// in) and the extremes; 2000 random vectors follow. The reference is the
// integer sum a + b + cin, computed 13 bits wide, compared with
// {cout, sum}. A watchdog ends the run with a failure after 10000 cycles.
module accurate_adder_tb;

  localparam int unsigned W = eta_pkg::ETA_ACC_WIDTH;

  logic         clk;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks   = 0;
  int           failures = 0;
  int           full_ripples = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  accurate_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] expected;
    a   = ta;
    b   = tb_;
    cin = tc;
    @(posedge clk);
    expected = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ((ta ^ tb_) == '1 && tc) full_ripples++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> %h expected %h", ta, tb_, tc, {cout, sum}, expected);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);               // carry ripples through every bit
    apply('1, 1, 1'b0);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply(W'(12'hAAA), W'(12'h555), 1'b1);
    for (int i = 0; i < 2000; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL full carry ripple never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
