// tb_gcd_block: self-checking testbench for gcd_block.
//
// Two instances, PARALLEL=1 and PARALLEL=0, receive the same calls. Each
// result is compared with Euclid's remainder algorithm, and the latency from
// the accepting clock edge to the first cycle of start_out with the number of
// clause firings (parallel) or condition tests (sequential) that the clause
// list implies, plus one. The receiver stalls at random (busy_in=1), and the
// result must stay offered and unchanged meanwhile. The first call is
// gcd(15,25), whose trace has 9 clause firings and 18 condition tests.
module tb_gcd_block;
  localparam int unsigned W = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic           start_p, busy_p, start_out_p, busy_in_p;
  logic           start_s, busy_s, start_out_s, busy_in_s;
  logic [2*W-1:0] din;
  logic [W-1:0]   dout_p, dout_s;

  int checks = 0, failures = 0, stalls = 0;

  gcd_block #(.PARALLEL(1'b1), .W(W)) dut_p (
    .clk, .rst, .start(start_p), .busy(busy_p), .din,
    .start_out(start_out_p), .busy_in(busy_in_p), .dout(dout_p));
  gcd_block #(.PARALLEL(1'b0), .W(W)) dut_s (
    .clk, .rst, .start(start_s), .busy(busy_s), .din,
    .start_out(start_out_s), .busy_in(busy_in_s), .dout(dout_s));

  function automatic logic [W-1:0] ref_gcd(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Clause firings (par) and condition tests (seq) of the Erlang trace.
  function automatic void ref_cycles(logic [W-1:0] a, logic [W-1:0] b, output int par, output int seq);
    logic [W-1:0] t;
    par = 0;
    seq = 0;
    forever begin
      par++;
      if (a < b) begin seq += 1; t = a; a = b; b = t; end
      else if (b == 0) begin seq += 2; break; end
      else begin seq += 3; a = a - b; end
    end
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic call(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] exp_v, got_p, got_s;
    int exp_p, exp_s, lat_p, lat_s, n;
    bit done_p, done_s;
    exp_v = ref_gcd(a, b);
    ref_cycles(a, b, exp_p, exp_s);
    @(negedge clk);
    check("idle before call", !busy_p && !busy_s);
    din = {a, b};
    start_p = 1'b1;
    start_s = 1'b1;
    @(negedge clk);
    start_p = 1'b0;
    start_s = 1'b0;
    din = '1;
    check("busy after accept", busy_p && busy_s);
    n = 1; lat_p = -1; lat_s = -1; done_p = 0; done_s = 0;
    while (!(done_p && done_s) && n < 200000) begin
      if (!done_p) begin
        if (lat_p >= 0) check("parallel result held", start_out_p && dout_p == got_p);
        if (start_out_p) begin
          if (lat_p < 0) begin lat_p = n; got_p = dout_p; end
          busy_in_p = ($urandom_range(0, 2) == 0);
          if (busy_in_p) stalls++; else done_p = 1;
        end
      end else busy_in_p = 1'b1;
      if (!done_s) begin
        if (lat_s >= 0) check("sequential result held", start_out_s && dout_s == got_s);
        if (start_out_s) begin
          if (lat_s < 0) begin lat_s = n; got_s = dout_s; end
          busy_in_s = ($urandom_range(0, 2) == 0);
          if (busy_in_s) stalls++; else done_s = 1;
        end
      end else busy_in_s = 1'b1;
      @(negedge clk);
      n++;
    end
    busy_in_p = 1'b1;
    busy_in_s = 1'b1;
    check($sformatf("gcd(%0d,%0d) parallel = %0d, expected %0d", a, b, got_p, exp_v), done_p && got_p == exp_v);
    check($sformatf("gcd(%0d,%0d) sequential = %0d, expected %0d", a, b, got_s, exp_v), done_s && got_s == exp_v);
    check($sformatf("gcd(%0d,%0d) parallel latency %0d, expected %0d", a, b, lat_p, exp_p + 1), lat_p == exp_p + 1);
    check($sformatf("gcd(%0d,%0d) sequential latency %0d, expected %0d", a, b, lat_s, exp_s + 1), lat_s == exp_s + 1);
  endtask

  initial begin
    int p, s;
    start_p = 0; start_s = 0; busy_in_p = 1; busy_in_s = 1; din = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // the worked example: 9 clause firings, 18 condition tests
    ref_cycles(15, 25, p, s);
    check("reference trace of gcd(15,25)", p == 9 && s == 18);
    call(15, 25);
    call(25, 15);
    call(7, 0);
    call(0, 7);
    call(0, 0);
    call(1, 1);
    call(32'hFFFF_0000, 32'hFFF0_0000);
    call(1071, 462);
    for (int t = 0; t < 60; t++) begin
      logic [W-1:0] g, x, y;
      g = $urandom_range(1, 1000);
      x = g * $urandom_range(1000, 4000000);
      y = g * $urandom_range(1000, 4000000);
      call(x, y);
    end
    check("receiver stalls exercised", stalls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
