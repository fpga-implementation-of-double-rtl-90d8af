// fpu_double_tb: end-to-end test of the double precision arithmetic unit, with every
// parameter at its default.
//
// Operations are issued one at a time through the unit's enable/ready handshake. For
// each one the testbench checks the result against the simulator's double arithmetic
// (nearest even; directed modes from the error-free transformations of fpu_ref_pkg),
// the inexact flag where the reference knows it, and the number of clock edges from
// the edge that takes `enable` to the one that raises `ready`: 20 for add, 20 for
// subtract, 24 for multiply, 74 for divide. It also issues a second `enable` while the
// unit is busy and an `enable` with a reserved op-code, both of which must change
// nothing. Fixed cases cover special operands and each exception flag. Counters
// record how often each mechanism of the design was exercised (each operation and
// rounding mode, routing to the adder or subtractor, overflow, underflow, inexact,
// invalid, divide by zero, subnormal results, ignored enables); one that never
// happened counts as a failure.
module fpu_double_tb;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int LAT [4] = '{20, 20, 24, 74};

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        enable = 1'b0;
  logic [1:0]  rmode = '0;
  logic [2:0]  fpu_op = '0;
  logic [63:0] opa = '0, opb = '0;
  logic [63:0] out;
  logic        ready, underflow, overflow, inexact, exception, invalid, div_by_zero;
  logic [6:0]  count;

  int checks = 0, failures = 0, cycles = 0;
  int n_op [4];
  int n_rm [4];
  int n_to_add = 0, n_to_sub = 0, n_ovf = 0, n_unf = 0, n_inx = 0, n_inv = 0, n_dbz = 0;
  int n_subnormal = 0, n_busy_ignored = 0, n_reserved_ignored = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  fpu_double dut (
    .clk(clk), .rst(rst), .enable(enable), .rmode(rmode), .fpu_op(fpu_op),
    .opa(opa), .opb(opb), .out(out), .ready(ready), .underflow(underflow),
    .overflow(overflow), .inexact(inexact), .exception(exception), .invalid(invalid),
    .div_by_zero(div_by_zero), .count(count)
  );

  task automatic fail(input string msg);
    failures++;
    if (failures <= 12) $display("FAIL top %s", msg);
  endtask

  // Issues one operation and waits for its result. Returns the result and flags.
  task automatic issue(input int o, input int rm, input logic [63:0] a, input logic [63:0] b,
                       input bit poke_busy);
    int t0;
    @(negedge clk);
    fpu_op = 3'(o); rmode = 2'(rm); opa = a; opb = b; enable = 1'b1;
    @(negedge clk);
    t0 = cycles;                     // includes the edge that took enable
    enable = 1'b0;
    if (ready) fail("ready still high after enable");
    if (poke_busy) begin
      // A new operation while busy must be ignored.
      fpu_op = 3'((o + 1) % 4); opa = 64'h4000000000000000; opb = 64'h4010000000000000;
      enable = 1'b1;
      @(negedge clk);
      enable = 1'b0;
      n_busy_ignored++;
    end
    opa = {$urandom, $urandom}; opb = {$urandom, $urandom}; rmode = 2'($urandom);
    while (!ready) begin
      @(negedge clk);
      if (cycles - t0 > 200) break;
    end
    checks++;
    if (cycles - t0 != LAT[o])
      fail($sformatf("op %0d latency %0d, expected %0d", o, cycles - t0, LAT[o]));
    n_op[o]++;
    n_rm[rm]++;
    if (o < 2) begin
      if ((a[63] != b[63]) == (o == 0)) n_to_sub++; else n_to_add++;
    end
    if (overflow) n_ovf++;
    if (underflow) n_unf++;
    if (inexact) n_inx++;
    if (invalid) n_inv++;
    if (div_by_zero) n_dbz++;
    if (out[62:52] == 0 && out[51:0] != 0) n_subnormal++;
    if (exception !== (overflow | underflow | inexact | invalid | div_by_zero))
      fail("exception is not the OR of the flags");
  endtask

  task automatic expect_out(input string what, input logic [63:0] e);
    checks++;
    if (out !== e) fail($sformatf("%s: out=%h expected %h", what, out, e));
  endtask

  task automatic expect_flags(input string what, input logic [4:0] e);
    checks++;
    if ({invalid, div_by_zero, overflow, underflow, inexact} !== e)
      fail($sformatf("%s: flags(inv,dbz,ovf,unf,inx)=%b expected %b", what,
                     {invalid, div_by_zero, overflow, underflow, inexact}, e));
  endtask

  // Random operation on mid-range operands, checked in the given mode.
  task automatic rand_directed(input int o, input int rm);
    logic [63:0] a, b, x;
    int dir, lo, hi;
    lo = (o < 2) ? 823 : 723;
    hi = (o < 2) ? 1223 : 1323;
    a = rand_fp(lo, hi);
    b = rand_fp(lo, hi);
    if (o < 2 && $urandom % 2 == 1) b[62:52] = 11'(int'(a[62:52]) - int'($urandom % 4));
    x = rbits(rne(o, bitsr(a), bitsr(b)));
    dir = err_dir(o, bitsr(a), bitsr(b), bitsr(x));
    issue(o, rm, a, b, ($urandom % 16) == 0);
    expect_out($sformatf("op %0d rm %0d %h %h", o, rm, a, b), directed(rm, x, dir));
    expect_flags($sformatf("op %0d rm %0d %h %h", o, rm, a, b), {4'b0000, dir != 0});
  endtask

  // Random operation over the whole range, nearest even.
  task automatic rand_full(input int o);
    logic [63:0] a, b, x;
    a = rand_fp(0, 2046);
    b = rand_fp(0, 2046);
    if (o >= 2 && $urandom % 2 == 1) begin
      // Keep products and quotients near the ends of the range.
      b[62:52] = (o == 2) ? 11'(1023 + 1023 - int'(a[62:52]) + int'($urandom % 120) - 60)
                          : 11'(int'(a[62:52]) + int'($urandom % 120) - 60);
    end
    if (b[62:0] == 0) b[0] = 1'b1;
    x = rbits(rne(o, bitsr(a), bitsr(b)));
    issue(o, 0, a, b, 1'b0);
    expect_out($sformatf("op %0d %h %h", o, a, b), x);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin n_op[i] = 0; n_rm[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (ready !== 1'b0 || out !== '0) fail("state after reset");

    // Subtraction example: 465 - 65 = 400, nearest even.
    issue(1, 0, 64'h407D100000000000, 64'h4050400000000000, 1'b0);
    expect_out("465 - 65", 64'h4079000000000000);
    expect_flags("465 - 65", 5'b00000);
    // 1.5 + 2.25, 1.5 x 1.5, 1 / 3 toward zero.
    issue(0, 0, 64'h3FF8000000000000, 64'h4002000000000000, 1'b0);
    expect_out("1.5 + 2.25", 64'h400E000000000000);
    issue(2, 0, 64'h3FF8000000000000, 64'h3FF8000000000000, 1'b0);
    expect_out("1.5 x 1.5", 64'h4002000000000000);
    issue(3, 1, 64'h3FF0000000000000, 64'h4008000000000000, 1'b0);
    expect_out("1 / 3", 64'h3FD5555555555555);
    expect_flags("1 / 3", 5'b00001);
    // Reserved op-code: enable is ignored, ready stays low for a while.
    @(negedge clk);
    fpu_op = 3'd5; enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    checks++;
    if (!ready) fail("reserved op-code started an operation");
    else n_reserved_ignored++;
    // Exceptions.
    issue(2, 0, 64'h7FEFFFFFFFFFFFFF, 64'h4000000000000000, 1'b0);
    expect_out("overflow", 64'h7FF0000000000000);
    expect_flags("overflow", 5'b00101);
    issue(2, 1, 64'h7FEFFFFFFFFFFFFF, 64'h4000000000000000, 1'b0);
    expect_out("overflow toward zero", 64'h7FEFFFFFFFFFFFFF);
    issue(3, 0, 64'h0010000000000000, 64'h4330000000000000, 1'b0);
    expect_out("exact subnormal", 64'h0000000000000001);
    expect_flags("exact subnormal", 5'b00000);
    issue(2, 0, 64'h0010000000000001, 64'h3FE0000000000000, 1'b0);
    expect_out("underflow", 64'h0008000000000000);
    expect_flags("underflow", 5'b00011);
    issue(3, 0, 64'hC000000000000000, 64'h0000000000000000, 1'b0);
    expect_out("-2 / 0", 64'hFFF0000000000000);
    expect_flags("-2 / 0", 5'b01000);
    issue(3, 0, 64'h0000000000000000, 64'h8000000000000000, 1'b0);
    expect_out("0 / 0", QNAN);
    expect_flags("0 / 0", 5'b10000);
    issue(1, 0, 64'h7FF0000000000000, 64'h7FF0000000000000, 1'b0);
    expect_out("inf - inf", QNAN);
    expect_flags("inf - inf", 5'b10000);
    issue(0, 0, 64'h7FF0000000000000, 64'hC000000000000000, 1'b0);
    expect_out("inf + -2", 64'h7FF0000000000000);
    expect_flags("inf + -2", 5'b00000);
    issue(2, 0, 64'h7FF0000000000001, 64'h3FF0000000000000, 1'b0);
    expect_out("sNaN x 1", QNAN);
    expect_flags("sNaN x 1", 5'b10000);
    issue(1, 3, 64'h4000000000000000, 64'h4000000000000000, 1'b0);
    expect_out("2 - 2 toward -inf", 64'h8000000000000000);
    issue(1, 0, 64'h4000000000000000, 64'h4000000000000000, 1'b0);
    expect_out("2 - 2", 64'h0000000000000000);

    for (int i = 0; i < 400; i++)
      for (int o = 0; o < 4; o++)
        rand_directed(o, i % 4);
    for (int i = 0; i < 300; i++)
      for (int o = 0; o < 4; o++)
        rand_full(o);

    begin
      automatic string names [12] = '{"add", "sub", "mul", "div", "rm nearest", "rm zero", "rm up",
                            "rm down", "to adder", "to subtractor", "overflow", "underflow"};
      automatic int counts [12];
      counts = '{n_op[0], n_op[1], n_op[2], n_op[3], n_rm[0], n_rm[1], n_rm[2], n_rm[3],
                 n_to_add, n_to_sub, n_ovf, n_unf};
      for (int i = 0; i < 12; i++) begin
        $display("  %-14s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) fail($sformatf("mechanism never exercised: %s", names[i]));
      end
      $display("  inexact %0d invalid %0d div-by-zero %0d subnormal %0d busy-ignored %0d reserved-ignored %0d",
               n_inx, n_inv, n_dbz, n_subnormal, n_busy_ignored, n_reserved_ignored);
      checks++;
      if (n_inx == 0 || n_inv == 0 || n_dbz == 0 || n_subnormal == 0 || n_busy_ignored == 0 ||
          n_reserved_ignored == 0) fail("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
