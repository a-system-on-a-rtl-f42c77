// tb_sqrt_lut4 - self-checking test of the look-up-table / 4-bit-per-step
// square root unit.
//
// The reference root is computed bit by bit (classic restoring digit method)
// in the testbench. Checks: the root of fixed inputs (14.0625 and 5 in a
// format with 48 radicand and 24 root fraction bits, zero, all ones, perfect
// squares) and of random 64-bit radicands; the exact flag; that an exact root
// stops early (14.0625 -> 3.75 after one iteration); and that done arrives
// 1 + iters cycles after start with iters never above 6.
module tb_sqrt_lut4;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [63:0] radicand = '0;
  logic        busy, done, exact;
  logic [31:0] root;
  logic [3:0]  iters;

  int checks = 0;
  int failures = 0;
  int early = 0;

  always #5 clk = ~clk;

  sqrt_lut4 dut (.*);

  function automatic logic [31:0] ref_isqrt(logic [63:0] v);
    logic [63:0] rem;
    logic [31:0] r;
    rem = v;
    r   = '0;
    for (int b = 31; b >= 0; b--) begin
      logic [63:0] t;
      t = ({32'd0, r} | (64'd1 << b));
      if (t * t <= v) r = t[31:0];
    end
    return r;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [63:0] v, output logic [31:0] r, output logic ex, output int it);
    int cyc;
    @(negedge clk);
    radicand = v;
    start    = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc   = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    r  = root;
    ex = exact;
    it = int'(iters);
    check($sformatf("latency %0d for %0d iterations", cyc, it), cyc == it + 1);
    check($sformatf("iterations %0d in range", it), it >= 1 && it <= 6);
  endtask

  task automatic test_value(logic [63:0] v);
    logic [31:0] r, e;
    logic ex;
    int it;
    run(v, r, ex, it);
    e = ref_isqrt(v);
    check($sformatf("sqrt(%h) = %h expected %h", v, r, e), r == e);
    check($sformatf("exact flag for %h", v), ex == (64'(e) * 64'(e) == v));
    if (ex && it < 6) early++;
  endtask

  initial begin
    logic [31:0] r;
    logic ex;
    int it;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 14.0625 with 48 fraction bits -> 3.75 with 24 fraction bits, one iteration
    run(64'd225 << 44, r, ex, it);
    check("sqrt(14.0625) = 3.75", r == (32'd15 << 22));
    check("sqrt(14.0625) exact", ex);
    check("sqrt(14.0625) stops after one iteration", it == 1);

    // 5 -> 2.2360679..., needs all six iterations
    run(64'd5 << 48, r, ex, it);
    check("sqrt(5) value", r == ref_isqrt(64'd5 << 48));
    check("sqrt(5) not exact", !ex);
    check("sqrt(5) takes six iterations", it == 6);

    test_value(64'd0);
    test_value(64'd1);
    test_value(64'd2);
    test_value('1);
    test_value(64'hFFFF_FFFE_0000_0001);   // (2^32-1)^2
    test_value(64'd1 << 62);
    for (int i = 0; i < 200; i++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      v = v >> ($urandom % 64);
      test_value(v);
    end
    for (int i = 0; i < 100; i++) begin
      logic [31:0] q;
      q = $urandom;
      q = q >> ($urandom % 32);
      test_value(64'(q) * 64'(q));
    end
    check("early stop seen", early > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
