// control_block_tb: self-checking test of the ETA control-signal generator.
//
// At the default width (20 bits) every single 1/1 position is tried on its
// own, then the case with no 1/1 pair, then 3000 random vectors biased
// towards sparse 1/1 pairs. The reference scans the operands from the top
// bit down and sets every bit from the first 1/1 pair on; it is written as
// a loop here, independently of the block's chain. A watchdog ends the run
// with a failure after 10000 cycles.
module control_block_tb;

  localparam int unsigned W = eta_pkg::ETA_INACC_WIDTH;

  logic         clk;
  logic [W-1:0] a, b, ctl;
  int           checks   = 0;
  int           failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  control_block dut (.a(a), .b(b), .ctl(ctl));

  function automatic logic [W-1:0] ref_ctl(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] r    = '0;
    bit           seen = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      if (x[i] && y[i]) seen = 1'b1;
      r[i] = seen;
    end
    return r;
  endfunction

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic [W-1:0] expected;
    a = ta;
    b = tb_;
    @(posedge clk);
    expected = ref_ctl(ta, tb_);
    checks++;
    if (ctl !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h -> ctl=%h expected %h", ta, tb_, ctl, expected);
    end
  endtask

  initial begin
    for (int p = 0; p < W; p++) begin
      automatic logic [W-1:0] onehot = W'(1) << p;
      // 1/1 pair at p only, other bits disjoint 0/1 patterns.
      apply(onehot | (~onehot & W'(20'h5_5555)), onehot | (~onehot & W'(20'hA_AAAA)));
    end
    apply(W'(20'h5_5555), W'(20'hA_AAAA));   // no 1/1 pair: all low
    apply('0, '0);
    apply('1, '1);
    for (int i = 0; i < 3000; i++)
      apply(W'($urandom) & W'($urandom), W'($urandom) & W'($urandom));
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
