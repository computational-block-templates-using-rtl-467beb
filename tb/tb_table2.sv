// tb_table2: the four test functions, each built with parallel and with
// sequential clause evaluation, timed on one representative call.
//
// For every block and both PARALLEL settings the testbench makes one call,
// checks the result, checks the cycles from the accepting edge to start_out
// against the latency formula of the block, and prints the time this would
// take at a 50 MHz clock, for comparison with published coprocessor timings.
// Calls: gcd(15,25), fib(41), collatz(27), binom(12,6).
module tb_table2;
  localparam int unsigned W = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // index: 2*algorithm + (sequential ? 1 : 0); algorithms 0 gcd, 1 binom, 2 fib, 3 collatz
  logic           start[8], busy[8], start_out[8];
  logic [2*W-1:0] din[8];
  logic [W-1:0]   dout[8];

  for (genvar v = 0; v < 2; v++) begin : g_ver
    localparam bit PAR = (v == 0);
    gcd_block #(.PARALLEL(PAR)) u_gcd (
      .clk, .rst, .start(start[0+v]), .busy(busy[0+v]), .din(din[0+v]),
      .start_out(start_out[0+v]), .busy_in(1'b0), .dout(dout[0+v]));
    binom_block #(.PARALLEL(PAR)) u_binom (
      .clk, .rst, .start(start[2+v]), .busy(busy[2+v]), .din(din[2+v]),
      .start_out(start_out[2+v]), .busy_in(1'b0), .dout(dout[2+v]));
    fib_block #(.PARALLEL(PAR)) u_fib (
      .clk, .rst, .start(start[4+v]), .busy(busy[4+v]), .din(din[4+v][W-1:0]),
      .start_out(start_out[4+v]), .busy_in(1'b0), .dout(dout[4+v]));
    collatz_block #(.PARALLEL(PAR)) u_collatz (
      .clk, .rst, .start(start[6+v]), .busy(busy[6+v]), .din(din[6+v][W-1:0]),
      .start_out(start_out[6+v]), .busy_in(1'b0), .dout(dout[6+v]));
  end

  task automatic run(int idx, string name, logic [2*W-1:0] x, logic [W-1:0] e, int exp_lat);
    int t0, lat;
    @(negedge clk);
    din[idx] = x;
    start[idx] = 1'b1;
    @(posedge clk);
    t0 = cyc + 1;
    @(negedge clk);
    start[idx] = 1'b0;
    while (!start_out[idx]) @(posedge clk);
    lat = cyc - t0 + 1;
    checks += 2;
    if (dout[idx] != e) begin
      failures++;
      $display("FAIL %s result %0d, expected %0d", name, dout[idx], e);
    end
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", name, lat, exp_lat);
    end
    $display("%-26s %-10s result %10d  %5d cycles  %8.2f us at 50 MHz", name,
             (idx % 2 == 0) ? "parallel" : "sequential", dout[idx], lat, real'(lat) / 50.0);
  endtask

  function automatic int div_seq(logic [63:0] q);
    int c = 1;
    for (int b = 0; b < 64; b++) c += q[b] ? 2 : 3;
    return c;
  endfunction

  initial begin
    int bs;
    longint unsigned c;
    for (int i = 0; i < 8; i++) begin start[i] = 1'b0; din[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // gcd(15,25): 9 clause firings, 18 condition tests
    run(0, "gcd(15,25)", {32'd15, 32'd25}, 5, 9 + 1);
    run(1, "gcd(15,25)", {32'd15, 32'd25}, 5, 18 + 1);
    // binom(12,6): 6 divider calls; quotients C(6+i, i)
    bs = 2;
    c = 1;
    for (int i = 1; i <= 6; i++) begin
      c = c * (6 + i) / i;
      bs += 3 + 1 + div_seq(c) + 1;
    end
    run(2, "binom(12,6)", {32'd12, 32'd6}, 924, 6 * 68 + 1 + 1);
    run(3, "binom(12,6)", {32'd12, 32'd6}, 924, bs + 1);
    // fib(41): N+1 firings, 2N+1 tests
    run(4, "fib(41)", 64'd41, 165580141, 42 + 1);
    run(5, "fib(41)", 64'd41, 165580141, 83 + 1);
    // collatz(27): 111 steps, 41 of them odd
    run(6, "collatz(27)", 64'd27, 111, 112 + 1);
    run(7, "collatz(27)", 64'd27, 111, 70 * 2 + 41 * 3 + 1 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
