// tb_cascade: two computational blocks cascaded through their handshakes.
//
// fib_block's start_out/dout drive collatz_block's start/din, and
// collatz_block's busy drives fib_block's busy_in, so the chain computes
// collatz(fib(N)) with no glue logic. A producer feeds N values back to back
// and a consumer at the end of the chain stalls at random. Results are
// checked, in order, against software references. The run requires that the
// link between the blocks was blocked at least once (fib_block holding its
// result while collatz_block was busy), and that each input and output stall
// kind occurred. Both blocks use parallel clause evaluation.
module tb_cascade;
  localparam int unsigned W = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         f_start, f_busy, link_valid, c_busy, c_start_out, c_busy_in;
  logic [W-1:0] f_din, link_data, c_dout;

  fib_block u_fib (
    .clk, .rst, .start(f_start), .busy(f_busy), .din(f_din),
    .start_out(link_valid), .busy_in(c_busy), .dout(link_data));
  collatz_block u_collatz (
    .clk, .rst, .start(link_valid), .busy(c_busy), .din(link_data),
    .start_out(c_start_out), .busy_in(c_busy_in), .dout(c_dout));

  int checks = 0, failures = 0;
  int link_blocked = 0, link_moves = 0, in_waits = 0, out_stalls = 0;
  logic [W-1:0] q_exp[$];

  localparam int NCALLS = 60;

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

  always @(posedge clk) if (!rst) begin
    if (link_valid && c_busy) link_blocked++;
    if (link_valid && !c_busy) link_moves++;
  end

  initial begin
    f_start = 0; f_din = '0; c_busy_in = 1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fork
      begin : producer
        for (int c = 0; c < NCALLS; c++) begin
          int unsigned n;
          n = $urandom_range(0, 47);
          q_exp.push_back(ref_collatz(ref_fib(n)));
          @(negedge clk);
          f_din = n;
          f_start = 1'b1;
          @(posedge clk);
          while (f_busy) begin in_waits++; @(posedge clk); end
          @(negedge clk);
          f_start = 1'b0;
        end
      end
      begin : consumer
        int got = 0;
        while (got < NCALLS) begin
          @(negedge clk);
          c_busy_in = ($urandom_range(0, 2) == 0);
          if (c_start_out && c_busy_in) out_stalls++;
          if (c_start_out && !c_busy_in) begin
            logic [W-1:0] e;
            e = q_exp.pop_front();
            checks++;
            if (c_dout != e) begin
              failures++;
              $display("FAIL result %0d: got %0d expected %0d", got, c_dout, e);
            end
            got++;
          end
        end
        @(negedge clk);
        c_busy_in = 1'b1;
      end
    join
    checks++;
    if (link_blocked == 0 || link_moves != NCALLS || in_waits == 0 || out_stalls == 0) begin
      failures++;
      $display("FAIL coverage: link blocked %0d, link transfers %0d, input waits %0d, output stalls %0d",
               link_blocked, link_moves, in_waits, out_stalls);
    end
    $display("link blocked %0d cycles, %0d transfers; input waits %0d; output stalls %0d",
             link_blocked, link_moves, in_waits, out_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
