// eta_top_tb: end-to-end self-checking test of the 32-bit error-tolerant
// adder at its default sizes (12-bit accurate part, 20-bit inaccurate part).
//
// Vectors: the 4+4-bit worked example placed at the split point, directed
// corner cases, and 20000 random operand pairs whose low halves are thinned
// out at random so that both outcomes of the control block occur often.
// Each result {cout, sum} is compared with a reference computed here from
// the ETA's definition (exact upper sum with no carry in; lower bits XOR,
// set to 1 from the first 1/1 pair downwards). Further properties are
// checked against the exact sum a + b: with no 1/1 pair in the low part the
// ETA is exact; otherwise, with the first 1/1 pair at bit k, it falls short
// of the exact sum by at least 1 and less than 2^(k+1). So it never
// overestimates, and it errs by less than 2^20.
//
// Mechanisms counted, each of which must occur at least once: control
// block firing, control block idle, firing at the top bit of the
// inaccurate part, firing only at bit 0, carry out of the accurate part,
// an inexact result, and an exact result. A watchdog ends the run with a
// failure after 100000 cycles.
module eta_top_tb;

  localparam int unsigned W  = eta_pkg::ETA_WIDTH;
  localparam int unsigned IW = eta_pkg::ETA_INACC_WIDTH;

  logic         clk;
  logic [W-1:0] a, b, sum;
  logic         cout;
  int           checks   = 0;
  int           failures = 0;

  int n_fired, n_idle, n_fired_top, n_fired_bit0, n_cout, n_inexact, n_exact;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  eta_top dut (.a(a), .b(b), .sum(sum), .cout(cout));

  // Reference model of the ETA, written from its definition.
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

  // Position of the most significant 1/1 pair in the inaccurate part.
  function automatic int top_pair(logic [IW-1:0] both);
    for (int i = IW - 1; i >= 0; i--)
      if (both[i]) return i;
    return -1;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h -> cout=%0b sum=%h", what, a, b, cout, sum);
    end
  endtask

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic [W:0]   got, expected;
    longint       exact, err;
    logic [IW-1:0] both;
    a = ta;
    b = tb_;
    @(posedge clk);
    got      = {cout, sum};
    expected = ref_eta(ta, tb_);
    exact    = longint'(ta) + longint'(tb_);
    err      = exact - longint'(got);
    both     = ta[IW-1:0] & tb_[IW-1:0];
    check("reference", got === expected);
    check("error bound", err >= 0 && err < (longint'(1) << IW));
    if (both == '0) begin
      n_idle++;
      check("exact when no 1/1 pair", err == 0);
    end else begin
      n_fired++;
      check("error below weight of first 1/1 pair", err > 0 && err < (longint'(1) << (top_pair(both) + 1)));
      if (both[IW-1])    n_fired_top++;
      if (both == IW'(1)) n_fired_bit0++;
    end
    if (cout)      n_cout++;
    if (err != 0)  n_inexact++;
    else           n_exact++;
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    n_fired = 0; n_idle = 0; n_fired_top = 0; n_fired_bit0 = 0;
    n_cout = 0; n_inexact = 0; n_exact = 0;

    // The 4+4-bit worked example, placed on both sides of the split point.
    apply(32'h00B7_0000, 32'h00BD_0000);
    check("worked example upper", sum[W-1:IW] == 12'h16 && !cout);
    check("worked example lower", sum[IW-1:0] == 20'hF_FFFF);
    // Corner cases.
    apply('0, '0);
    apply('1, '1);
    apply('1, 32'h1);                       // exact sum carries through all 32 bits
    apply(32'hFFF0_0000, 32'h0010_0000);    // carry out of the accurate part
    apply(32'h0008_0000, 32'h0008_0000);    // 1/1 at the top inaccurate bit
    apply(32'h0000_0001, 32'h0000_0001);    // 1/1 only at bit 0
    apply(32'h000A_AAAA, 32'h0005_5555);    // no 1/1 pair: exact
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] ra, rb;
      ra = $urandom;
      rb = $urandom;
      case ($urandom_range(3))
        0: rb[IW-1:0] = rb[IW-1:0] & ~ra[IW-1:0];               // no 1/1 pair
        1: begin ra[IW-1:0] &= IW'($urandom); rb[IW-1:0] &= IW'($urandom); end
        default: ;
      endcase
      apply(ra, rb);
    end

    $display("mechanisms: fired=%0d idle=%0d fired_top=%0d fired_bit0_only=%0d cout=%0d inexact=%0d exact=%0d",
             n_fired, n_idle, n_fired_top, n_fired_bit0, n_cout, n_inexact, n_exact);
    require("control block fires", n_fired);
    require("control block idle", n_idle);
    require("firing at top inaccurate bit", n_fired_top);
    require("firing at bit 0 only", n_fired_bit0);
    require("accurate-part carry out", n_cout);
    require("inexact result", n_inexact);
    require("exact result", n_exact);
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
