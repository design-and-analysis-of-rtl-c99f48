// carry_free_adder_tb: self-checking test of the carry-free addition block.
//
// At the default width (20 bits) the control vector is driven directly
// (independently of the control block): all low, all high, each
// thermometer pattern (high from some bit down) and random patterns. For
// each bit the expected sum is 1 where ctl is high and a XOR b elsewhere,
// computed bit by bit in a loop. A watchdog ends the run with a failure
// after 10000 cycles.
module carry_free_adder_tb;

  localparam int unsigned W = eta_pkg::ETA_INACC_WIDTH;

  logic         clk;
  logic [W-1:0] a, b, ctl, sum;
  int           checks   = 0;
  int           failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  carry_free_adder dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic [W-1:0] tc);
    logic [W-1:0] expected;
    a   = ta;
    b   = tb_;
    ctl = tc;
    @(posedge clk);
    for (int i = 0; i < W; i++)
      expected[i] = tc[i] ? 1'b1 : (ta[i] != tb_[i]);
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h ctl=%h -> sum=%h expected %h", ta, tb_, tc, sum, expected);
    end
  endtask

  initial begin
    apply('1, '1, '0);                     // 1+1 with no control: 0
    apply('1, '1, '1);                     // forced to all ones
    apply('0, '0, '0);
    for (int p = 0; p <= W; p++)
      apply(W'($urandom), W'($urandom), W'((W+1)'(1) << p) - W'(1));
    for (int i = 0; i < 2000; i++)
      apply(W'($urandom), W'($urandom), W'($urandom));
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
