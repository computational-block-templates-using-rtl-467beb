// tb_coproc_top_seq: end-to-end testbench of coproc_top with sequential clause evaluation
// (PARALLEL=0).
//
// All four blocks run at once. For each block a producer issues calls with
// random gaps and often raises start while the block is still busy, holding
// start and din until the block takes them (input back-pressure). A consumer
// lowers busy_in at random (output stall) and compares each result, in order,
// with a reference computed here: Euclid's remainder GCD, Pascal's triangle,
// an iterative Fibonacci loop and a Collatz step loop. The first call of each
// block runs alone and its latency is checked against the clause trace.
// The run counts, and requires at least once: back-pressure and a stall on
// every block, each clause of every block, and sub-module calls from the
// binomial block to its divider.
module tb_coproc_top_seq;
  localparam bit          PAR = 1'b0;
  localparam int unsigned W   = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic           gcd_start, gcd_busy, gcd_start_out, gcd_busy_in;
  logic [2*W-1:0] gcd_din;
  logic [W-1:0]   gcd_dout;
  logic           binom_start, binom_busy, binom_start_out, binom_busy_in;
  logic [2*W-1:0] binom_din;
  logic [W-1:0]   binom_dout;
  logic           fib_start, fib_busy, fib_start_out, fib_busy_in;
  logic [W-1:0]   fib_din, fib_dout;
  logic           collatz_start, collatz_busy, collatz_start_out, collatz_busy_in;
  logic [W-1:0]   collatz_din, collatz_dout;

  coproc_top #(.PARALLEL(1'b0)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters: 0 gcd, 1 binom, 2 fib, 3 collatz
  int backpressure[4], stalls[4], results[4];
  int n_swap = 0, n_gcd_sub = 0, n_gcd_end = 0, n_binom_zero = 0, n_binom_end = 0;
  int n_sub_call = 0, n_sub_done = 0, n_fib_step = 0, n_fib_end = 0;
  int n_even = 0, n_odd = 0, n_col_end = 0;
  int n_div_one = 0, n_div_zero = 0;

  always @(posedge clk) if (!rst) begin
    n_swap       += int'(dut.u_gcd.fire[0]);
    n_gcd_end    += int'(dut.u_gcd.fire[1]);
    n_gcd_sub    += int'(dut.u_gcd.fire[2]);
    n_binom_zero += int'(dut.u_binom.fire[0]);
    n_binom_end  += int'(dut.u_binom.fire[1]);
    n_sub_call   += int'(dut.u_binom.sub_start && !dut.u_binom.sub_busy);
    n_sub_done   += int'(dut.u_binom.sub_done);
    n_div_one    += int'(dut.u_binom.u_div.fire[1]);
    n_div_zero   += int'(dut.u_binom.u_div.fire[2]);
    n_fib_end    += int'(dut.u_fib.fire[0]);
    n_fib_step   += int'(dut.u_fib.fire[1]);
    n_col_end    += int'(dut.u_collatz.fire[0]);
    n_even       += int'(dut.u_collatz.fire[1]);
    n_odd        += int'(dut.u_collatz.fire[2]);
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- references ----------------
  longint unsigned pascal[0:66][0:66];

  function automatic logic [W-1:0] ref_gcd(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] t;
    while (b != 0) begin t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic logic [W-1:0] ref_fib(int unsigned n);
    logic [W-1:0] a = 0, b = 1, t;
    repeat (n) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  function automatic logic [W-1:0] ref_collatz(longint unsigned n);
    int s = 0;
    while (n > 1) begin n = n[0] ? 3 * n + 1 : n / 2; s++; end
    return W'(s);
  endfunction

  // ---------------- expected-result queues ----------------
  logic [W-1:0] q_exp[4][$];

  // One call on block b: raise start with din, hold both until taken.
  // Returns the cycle of the accepting edge.
  task automatic issue(int b, logic [2*W-1:0] x, output int t_acc);
    bit was_busy = 0;
    case (b)
      0: begin gcd_din = x; gcd_start = 1; end
      1: begin binom_din = x; binom_start = 1; end
      2: begin fib_din = x[W-1:0]; fib_start = 1; end
      default: begin collatz_din = x[W-1:0]; collatz_start = 1; end
    endcase
    forever begin
      logic bz;
      @(posedge clk);
      bz = (b == 0) ? gcd_busy : (b == 1) ? binom_busy : (b == 2) ? fib_busy : collatz_busy;
      if (!bz) break;
      was_busy = 1;
    end
    t_acc = cyc;
    if (was_busy) backpressure[b]++;
    @(negedge clk);
    case (b)
      0: begin gcd_start = 0; gcd_din = '1; end
      1: begin binom_start = 0; binom_din = '1; end
      2: begin fib_start = 0; fib_din = '1; end
      default: begin collatz_start = 0; collatz_din = '1; end
    endcase
  endtask

  function automatic logic [2*W-1:0] pick_args(int b, output logic [W-1:0] e);
    logic [W-1:0] x, y, g;
    int unsigned n, k;
    case (b)
      0: begin
        g = $urandom_range(1, 500);
        x = g * $urandom_range(0, 200000);
        y = g * $urandom_range(0, 200000);
        if (x != 0 && y != 0 && (x / y > 2000 || y / x > 2000)) y = x + g;
        e = ref_gcd(x, y);
        return {x, y};
      end
      1: begin
        do begin
          n = $urandom_range(0, 40);
          k = $urandom_range(0, 6);
          if ($urandom_range(0, 4) == 0 && k > 0) n = $urandom_range(0, k - 1);   // K > N
        end while (k <= n && pascal[n][k] >= 64'h1_0000_0000);
        e = (k > n) ? '0 : W'(pascal[n][k]);
        return {n, k};
      end
      2: begin
        n = $urandom_range(0, 200);
        e = ref_fib(n);
        return (2*W)'(n);
      end
      default: begin
        n = $urandom_range(0, 100000);
        e = ref_collatz(n);
        return (2*W)'(n);
      end
    endcase
  endfunction

  task automatic producer(int b, int ncalls);
    int t;
    for (int c = 0; c < ncalls; c++) begin
      logic [W-1:0] e;
      logic [2*W-1:0] x;
      x = pick_args(b, e);
      // most calls follow at once, while the block is still busy
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
      q_exp[b].push_back(e);
      issue(b, x, t);
    end
  endtask

  task automatic consumer(int b, int ncalls);
    int got = 0;
    while (got < ncalls) begin
      logic so, bi;
      logic [W-1:0] d;
      @(negedge clk);
      so = (b == 0) ? gcd_start_out : (b == 1) ? binom_start_out : (b == 2) ? fib_start_out : collatz_start_out;
      d  = (b == 0) ? gcd_dout : (b == 1) ? binom_dout : (b == 2) ? fib_dout : collatz_dout;
      bi = ($urandom_range(0, 3) == 0);
      if (so && bi) stalls[b]++;
      case (b)
        0: gcd_busy_in = bi;
        1: binom_busy_in = bi;
        2: fib_busy_in = bi;
        default: collatz_busy_in = bi;
      endcase
      if (so && !bi) begin
        logic [W-1:0] e;
        e = q_exp[b].pop_front();
        check($sformatf("block %0d result %0d: got %0d expected %0d", b, got, d, e), d == e);
        got++;
        results[b]++;
      end
    end
    @(negedge clk);
    case (b)
      0: gcd_busy_in = 1;
      1: binom_busy_in = 1;
      2: fib_busy_in = 1;
      default: collatz_busy_in = 1;
    endcase
  endtask

  // A lone call with busy_in=0: returns cycles from accept to start_out.
  task automatic timed_call(int b, logic [2*W-1:0] x, logic [W-1:0] e, output int lat);
    int t;
    logic so;
    logic [W-1:0] d;
    issue(b, x, t);
    forever begin
      @(posedge clk);
      so = (b == 0) ? gcd_start_out : (b == 1) ? binom_start_out : (b == 2) ? fib_start_out : collatz_start_out;
      if (so) break;
    end
    lat = cyc - t;
    d = (b == 0) ? gcd_dout : (b == 1) ? binom_dout : (b == 2) ? fib_dout : collatz_dout;
    check($sformatf("timed call on block %0d: got %0d expected %0d", b, d, e), d == e);
    @(negedge clk);
    case (b)
      0: gcd_busy_in = 0;
      1: binom_busy_in = 0;
      2: fib_busy_in = 0;
      default: collatz_busy_in = 0;
    endcase
    @(negedge clk);
    case (b)
      0: gcd_busy_in = 1;
      1: binom_busy_in = 1;
      2: fib_busy_in = 1;
      default: collatz_busy_in = 1;
    endcase
  endtask

  localparam int NCALLS = 40;

  initial begin
    int lat;
    gcd_start = 0; binom_start = 0; fib_start = 0; collatz_start = 0;
    gcd_din = '0; binom_din = '0; fib_din = '0; collatz_din = '0;
    gcd_busy_in = 1; binom_busy_in = 1; fib_busy_in = 1; collatz_busy_in = 1;
    backpressure = '{0, 0, 0, 0};
    stalls = '{0, 0, 0, 0};
    results = '{0, 0, 0, 0};
    for (int n = 0; n <= 66; n++)
      for (int k = 0; k <= 66; k++)
        pascal[n][k] = (k == 0) ? 1 : (n == 0) ? 0 : pascal[n - 1][k - 1] + pascal[n - 1][k];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // Latencies from the clause traces: gcd(15,25) has 9 firings / 18 tests;
    // fib(10) 11 / 21; collatz(6) (8 steps: 6 even, 2 odd) 9 / 19;
    // binom(6,2) 2 steps of 1+1+65+1 (parallel), or of 3+1+d+1 where d is the
    // divider's sequential count for quotients 5 and 15, plus the end.
    timed_call(0, {32'd15, 32'd25}, 5, lat);
    check($sformatf("gcd(15,25) latency %0d", lat), lat == (PAR ? 10 : 19));
    timed_call(2, 64'd10, 55, lat);
    check($sformatf("fib(10) latency %0d", lat), lat == (PAR ? 12 : 22));
    timed_call(3, 64'd6, 8, lat);
    check($sformatf("collatz(6) latency %0d", lat), lat == (PAR ? 10 : 20));
    timed_call(1, {32'd6, 32'd2}, 15, lat);
    check($sformatf("binom(6,2) latency %0d", lat),
          lat == (PAR ? 2 * 68 + 2 : (3 + 1 + (1 + 2*2 + 3*62) + 1) + (3 + 1 + (1 + 2*4 + 3*60) + 1) + 2 + 1));

    fork
      producer(0, NCALLS);
      consumer(0, NCALLS);
      producer(1, NCALLS / 2);
      consumer(1, NCALLS / 2);
      producer(2, NCALLS);
      consumer(2, NCALLS);
      producer(3, NCALLS);
      consumer(3, NCALLS);
    join

    for (int b = 0; b < 4; b++) begin
      check($sformatf("block %0d saw back-pressure (%0d)", b, backpressure[b]), backpressure[b] > 0);
      check($sformatf("block %0d saw output stalls (%0d)", b, stalls[b]), stalls[b] > 0);
    end
    check("gcd swap/end/subtract clauses fired", n_swap > 0 && n_gcd_end > 0 && n_gcd_sub > 0);
    check("binom zero/end clauses fired", n_binom_zero > 0 && n_binom_end > 0);
    check("binom sub-module calls and returns", n_sub_call > 0 && n_sub_call == n_sub_done);
    check("divider quotient-bit clauses fired", n_div_one > 0 && n_div_zero > 0);
    check("fib step/end clauses fired", n_fib_step > 0 && n_fib_end > 0);
    check("collatz even/odd/end clauses fired", n_even > 0 && n_odd > 0 && n_col_end > 0);
    $display("results gcd %0d binom %0d fib %0d collatz %0d; back-pressure %p; stalls %p; sub-module calls %0d; gcd swaps %0d; collatz odd steps %0d",
             results[0], results[1], results[2], results[3], backpressure, stalls, n_sub_call, n_swap, n_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
