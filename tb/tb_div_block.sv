// tb_div_block: self-checking testbench for div_block.
//
// Two instances, PARALLEL=1 and PARALLEL=0, receive the same calls. Each {quotient, remainder} is
// compared with the / and % operators on 64-bit values.
// The latency from the accepting clock edge to the first cycle of start_out
// must equal the number of CALC-state cycles that the clause list implies
// (one per clause firing when parallel, one per condition test when
// sequential: 2 per quotient bit 1, 3 per quotient bit 0, 1 to end) plus one. The receiver stalls at random (busy_in=1) and the
// result must stay offered and unchanged meanwhile.
module tb_div_block;
  localparam int unsigned IN_W  = 96;
  localparam int unsigned OUT_W = 96;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic             start_p, busy_p, start_out_p, busy_in_p;
  logic             start_s, busy_s, start_out_s, busy_in_s;
  logic [IN_W-1:0]  din;
  logic [OUT_W-1:0] dout_p, dout_s;

  int checks = 0, failures = 0, stalls = 0;

  div_block #(.PARALLEL(1'b1)) dut_p (
    .clk, .rst, .start(start_p), .busy(busy_p), .din,
    .start_out(start_out_p), .busy_in(busy_in_p), .dout(dout_p));
  div_block #(.PARALLEL(1'b0)) dut_s (
    .clk, .rst, .start(start_s), .busy(busy_s), .din,
    .start_out(start_out_s), .busy_in(busy_in_s), .dout(dout_s));

  function automatic int seq_cycles(logic [63:0] q);
    int c = 1;
    for (int b = 0; b < 64; b++) c += q[b] ? 2 : 3;
    return c;
  endfunction

  task automatic div_call(logic [63:0] num, logic [31:0] den);
    logic [63:0] q;
    logic [31:0] r;
    if (den == 0) begin
      q = '1;
      r = num[31:0];   // the restoring loop keeps the low bits it shifts through
    end else begin
      q = num / den;
      r = 32'(num % den);
    end
    call({num, den}, {q, r}, 65, seq_cycles(q));
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
    check($sformatf("div(%h) parallel = %h, expected %h", x, got_p, exp_v), done_p && got_p == exp_v);
    check($sformatf("div(%h) sequential = %h, expected %h", x, got_s, exp_v), done_s && got_s == exp_v);
    check($sformatf("div(%h) parallel latency %0d, expected %0d", x, lat_p, exp_p + 1), lat_p == exp_p + 1);
    check($sformatf("div(%h) sequential latency %0d, expected %0d", x, lat_s, exp_s + 1), lat_s == exp_s + 1);
  endtask

  initial begin
    start_p = 0; start_s = 0; busy_in_p = 1; busy_in_s = 1; din = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    div_call(64'd100, 32'd7);
    div_call(64'd7, 32'd100);
    div_call(64'd0, 32'd5);
    div_call(64'hFFFF_FFFF_FFFF_FFFF, 32'd1);
    div_call(64'hFFFF_FFFF_FFFF_FFFF, 32'hFFFF_FFFF);
    div_call(64'h1234_5678_9ABC_DEF0, 32'h8000_0001);
    for (int t = 0; t < 40; t++) div_call({$urandom, $urandom}, $urandom_range(1, 32'hFFFF_FFFF) >> $urandom_range(0, 31));
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
