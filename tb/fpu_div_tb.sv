// fpu_div_tb: self-checking test of fpu_div, followed by fpu_round to read its result.
//
// Each operand pair is started on the divider, the testbench counts the clock cycles
// until `done` (one per quotient bit: 56) and then rounds the quotient in all four
// modes. Expected results come from the simulator's double arithmetic (nearest even)
// and, for the directed modes, from the sign of the exact remainder a - q*b
// (fpu_ref_pkg). Cases: full-range operands (quotients that overflow or underflow,
// subnormal operands; nearest even only), mid-range operands in every mode with an
// inexact-flag check, exact quotients (small integers), and fixed vectors worked out
// by hand. A start while the divider
// is busy must be ignored.
module fpu_div_tb;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int QBITS = 56;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          start = 1'b0;
  fp64_t         opa, opb;
  fp_unrounded_t res;
  rmode_e        rmode;
  logic          busy, done;
  logic [63:0]   out;
  logic          ovf, unf, inx;
  int            checks = 0, failures = 0;
  int            cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  fpu_div   dut     (.clk(clk), .rst(rst), .start(start), .opa(opa), .opb(opb),
                     .busy(busy), .done(done), .res(res));
  fpu_round u_round (.in(res), .rmode(rmode), .out(out), .overflow(ovf), .underflow(unf),
                     .inexact(inx));

  task automatic fail(input string msg);
    failures++;
    if (failures <= 10) $display("FAIL div %s", msg);
  endtask

  // Runs one divide and checks it in the modes 0..nmodes-1.
  task automatic run(input logic [63:0] a, input logic [63:0] b, input int nmodes,
                     input logic [63:0] exp_rne, input int dir);
    int t0;
    logic [63:0] e;
    @(negedge clk);
    opa = a; opb = b; start = 1'b1;
    @(negedge clk);
    t0 = cycles;         // counts the edge that took the start
    start = 1'b0;
    // A second start while busy changes nothing.
    opa = 64'h3FF0000000000000; opb = 64'h4000000000000000; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    opa = a; opb = b;
    while (!done) @(negedge clk);
    checks++;
    if (cycles - t0 != QBITS) fail($sformatf("latency %0d, expected %0d", cycles - t0, QBITS));
    for (int rm = 0; rm < nmodes; rm++) begin
      rmode = rmode_e'(rm);
      #1;
      e = directed(rm, exp_rne, dir);
      checks++;
      if (out !== e || (nmodes > 1 && inx !== (dir != 0)))
        fail($sformatf("a=%h b=%h rm=%0d out=%h exp=%h inx=%b dir=%0d", a, b, rm, out, e, inx, dir));
    end
  endtask

  task automatic rand_case(input int elo, input int ehi, input bit all_modes);
    logic [63:0] a, b, x;
    a = rand_fp(elo, ehi);
    b = rand_fp(elo, ehi);
    if (b[62:0] == '0) b[0] = 1'b1;
    x = rbits(bitsr(a) / bitsr(b));
    if (all_modes) run(a, b, 4, x, err_dir(3, bitsr(a), bitsr(b), bitsr(x)));
    else           run(a, b, 1, x, 0);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rmode = RM_NEAREST_EVEN;
    opa = '0; opb = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // 6 / 2 = 3 exact; 1 / 3 in all modes (0x3FD5555555555555 nearest, below 1/3);
    // 0 / 7 = 0; smallest normal / 2 = subnormal half way value, exact.
    run(64'h4018000000000000, 64'h4000000000000000, 4, 64'h4008000000000000, 0);
    run(64'h3FF0000000000000, 64'h4008000000000000, 4, 64'h3FD5555555555555, 1);
    run(64'h0000000000000000, 64'h401C000000000000, 1, 64'h0000000000000000, 0);
    run(64'h0010000000000000, 64'h4000000000000000, 1, 64'h0008000000000000, 0);
    // Exact quotients: a = b x k with b of at most 45 significant bits and k < 256.
    for (int i = 0; i < 500; i++) begin
      logic [63:0] b, a;
      b = rand_fp(900, 1100);
      b[7:0] = '0;
      a = rbits(bitsr(b) * real'(1 + $urandom % 255));
      run(a, b, 4, rbits(bitsr(a) / bitsr(b)), 0);
    end
    for (int i = 0; i < 1500; i++) rand_case(0, 2046, 1'b0);
    for (int i = 0; i < 1500; i++) rand_case(723, 1323, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
