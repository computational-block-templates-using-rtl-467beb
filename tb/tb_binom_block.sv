// tb_binom_block: self-checking testbench for binom_block.
//
// Two instances, PARALLEL=1 and PARALLEL=0, receive the same calls. Each result is compared with
// Pascal's triangle, built in 64-bit arithmetic up to row 66.
// The latency from the accepting clock edge to the first cycle of start_out
// must equal the number of CALC-state cycles that the clause list implies
// (one per clause firing when parallel, one per condition test when
// sequential; each step also waits for the divider sub-module, whose own
// CALC cycles are counted the same way) plus one. The receiver stalls at random (busy_in=1) and the
// result must stay offered and unchanged meanwhile.
module tb_binom_block;
  localparam int unsigned IN_W  = 64;
  localparam int unsigned OUT_W = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic             start_p, busy_p, start_out_p, busy_in_p;
  logic             start_s, busy_s, start_out_s, busy_in_s;
  logic [IN_W-1:0]  din;
  logic [OUT_W-1:0] dout_p, dout_s;

  int checks = 0, failures = 0, stalls = 0;

  binom_block #(.PARALLEL(1'b1)) dut_p (
    .clk, .rst, .start(start_p), .busy(busy_p), .din,
    .start_out(start_out_p), .busy_in(busy_in_p), .dout(dout_p));
  binom_block #(.PARALLEL(1'b0)) dut_s (
    .clk, .rst, .start(start_s), .busy(busy_s), .din,
    .start_out(start_out_s), .busy_in(busy_in_s), .dout(dout_s));

  longint unsigned pascal[0:66][0:66];

  function automatic int div_seq_cycles(logic [63:0] q);
    int c = 1;
    for (int b = 0; b < 64; b++) c += q[b] ? 2 : 3;
    return c;
  endfunction

  // CALC-side cycles: per step one firing (3 tests when sequential), one
  // request cycle, the divider's CALC cycles and the cycle its result is taken.
  task automatic binom_call(int unsigned n, int unsigned k);
    int cp, cs;
    logic [31:0] v;
    if (k > n) begin
      v = 0; cp = 1; cs = 1;
    end else begin
      v = 32'(pascal[n][k]);
      cp = 1; cs = 2;
      for (int unsigned i = 1; i <= k; i++) begin
        cp += 1 + 1 + 65 + 1;
        cs += 3 + 1 + div_seq_cycles(pascal[n - k + i][i]) + 1;
      end
    end
    call({n, k}, v, cp, cs);
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
    check($sformatf("binom(%h) parallel = %h, expected %h", x, got_p, exp_v), done_p && got_p == exp_v);
    check($sformatf("binom(%h) sequential = %h, expected %h", x, got_s, exp_v), done_s && got_s == exp_v);
    check($sformatf("binom(%h) parallel latency %0d, expected %0d", x, lat_p, exp_p + 1), lat_p == exp_p + 1);
    check($sformatf("binom(%h) sequential latency %0d, expected %0d", x, lat_s, exp_s + 1), lat_s == exp_s + 1);
  endtask

  initial begin
    start_p = 0; start_s = 0; busy_in_p = 1; busy_in_s = 1; din = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n <= 66; n++)
      for (int k = 0; k <= 66; k++)
        pascal[n][k] = (k == 0) ? 1 : (n == 0) ? 0 : pascal[n - 1][k - 1] + pascal[n - 1][k];
    check("C(10,3) = 120", pascal[10][3] == 120);
    binom_call(10, 3);
    binom_call(5, 0);
    binom_call(0, 0);
    binom_call(3, 5);
    binom_call(7, 7);
    binom_call(34, 17);   // largest central coefficient below 2^32
    binom_call(33, 1);
    for (int t = 0; t < 25; t++) begin
      int unsigned n, k;
      // keep C(n, k) below 2^32, so every intermediate value fits W=32 bits
      do begin
        n = $urandom_range(0, 66);
        k = $urandom_range(0, 12);
      end while (k <= n && pascal[n][k] >= 64'h1_0000_0000);
      binom_call(n, k);
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
