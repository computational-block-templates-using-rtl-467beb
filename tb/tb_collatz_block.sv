// tb_collatz_block: self-checking testbench for collatz_block.
//
// Two instances, PARALLEL=1 and PARALLEL=0, receive the same calls. Each result is compared with a
// step count worked out in a software loop.
// The latency from the accepting clock edge to the first cycle of start_out
// must equal the number of CALC-state cycles that the clause list implies
// (one per clause firing when parallel, one per condition test when
// sequential: 2 per even step, 3 per odd step, 1 to end) plus one. The receiver stalls at random (busy_in=1) and the
// result must stay offered and unchanged meanwhile.
module tb_collatz_block;
  localparam int unsigned IN_W  = 32;
  localparam int unsigned OUT_W = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic             start_p, busy_p, start_out_p, busy_in_p;
  logic             start_s, busy_s, start_out_s, busy_in_s;
  logic [IN_W-1:0]  din;
  logic [OUT_W-1:0] dout_p, dout_s;

  int checks = 0, failures = 0, stalls = 0;

  collatz_block #(.PARALLEL(1'b1)) dut_p (
    .clk, .rst, .start(start_p), .busy(busy_p), .din,
    .start_out(start_out_p), .busy_in(busy_in_p), .dout(dout_p));
  collatz_block #(.PARALLEL(1'b0)) dut_s (
    .clk, .rst, .start(start_s), .busy(busy_s), .din,
    .start_out(start_out_s), .busy_in(busy_in_s), .dout(dout_s));

  function automatic void ref_collatz(longint unsigned n, output int steps, output int seq);
    steps = 0;
    seq = 1;
    while (n > 1) begin
      steps++;
      if (n[0] == 1'b0) begin n = n / 2; seq += 2; end
      else begin n = 3 * n + 1; seq += 3; end
    end
  endfunction

  task automatic collatz_call(int unsigned n);
    int st, sq;
    ref_collatz(n, st, sq);
    call(n, st, st + 1, sq);
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One call on both instances; exp_v is the result, exp_p/exp_s the CALC
  // cycles of the parallel and sequential instances.
  task automatic call(logic [IN_W-1:0] x, logic [OUT_W-1:0] exp_v, int exp_p, int exp_s);
    logic [OUT_W-1:0] got_p, got_s;
    int lat_p, lat_s, n;
    bit done_p, done_s;
    @(negedge clk);
    check("idle before call", !busy_p && !busy_s);
    din = x;
    start_p = 1'b1;
    start_s = 1'b1;
    @(negedge clk);
    start_p = 1'b0;
    start_s = 1'b0;
    din = '1;
    check("busy after accept", busy_p && busy_s);
    n = 1; lat_p = -1; lat_s = -1; done_p = 0; done_s = 0;
    got_p = '0; got_s = '0;
    while (!(done_p && done_s) && n < 2000000) begin
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
    check($sformatf("collatz(%h) parallel = %h, expected %h", x, got_p, exp_v), done_p && got_p == exp_v);
    check($sformatf("collatz(%h) sequential = %h, expected %h", x, got_s, exp_v), done_s && got_s == exp_v);
    check($sformatf("collatz(%h) parallel latency %0d, expected %0d", x, lat_p, exp_p + 1), lat_p == exp_p + 1);
    check($sformatf("collatz(%h) sequential latency %0d, expected %0d", x, lat_s, exp_s + 1), lat_s == exp_s + 1);
  endtask

  initial begin
    start_p = 0; start_s = 0; busy_in_p = 1; busy_in_s = 1; din = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    begin
      int st, sq;
      ref_collatz(27, st, sq);
      check("27 takes 111 steps", st == 111);
    end
    collatz_call(1);
    collatz_call(0);
    collatz_call(2);
    collatz_call(3);
    collatz_call(27);
    collatz_call(837799);
    collatz_call(32'hFFFF_FFFF);
    for (int t = 0; t < 40; t++) collatz_call($urandom_range(1, 1000000));
    check("receiver stalls exercised", stalls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
