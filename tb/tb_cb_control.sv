// tb_cb_control: self-checking testbench for the template's control FSM.
//
// Two instances with four clauses (clause 1 ends the calculation, clause 2
// calls a sub-module) run side by side, one evaluating the conditions in
// parallel and one sequentially. Every cycle the inputs (start, busy_in, the
// condition vector and the sub-module's busy/start_out) are drawn at random
// and every output is compared with a cycle model of the template written in
// the testbench: lowest true clause wins when parallel; one condition per
// cycle, restarting at clause 0 after a firing and wrapping after the last
// clause, when sequential. The run also checks that every transition the
// model can take was taken.
module tb_cb_control;
  localparam int unsigned NC = 4;
  localparam logic [NC-1:0] EM = 4'b0010;
  localparam logic [NC-1:0] SM = 4'b0100;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          start, busy_in, sub_busy, sub_start_out;
  logic [NC-1:0] cond;

  typedef struct packed {
    logic          busy, start_out, load, sub_start, sub_busy_in, sub_done;
    logic [NC-1:0] fire;
  } outs_t;

  outs_t o_dut[2], o_ref[2];

  cb_control #(.NCOND(NC), .PARALLEL(1'b1), .END_MASK(EM), .SUB_MASK(SM)) dut_p (
    .clk, .rst, .start, .busy(o_dut[0].busy), .start_out(o_dut[0].start_out), .busy_in,
    .cond, .load(o_dut[0].load), .fire(o_dut[0].fire),
    .sub_start(o_dut[0].sub_start), .sub_busy, .sub_start_out,
    .sub_busy_in(o_dut[0].sub_busy_in), .sub_done(o_dut[0].sub_done));
  cb_control #(.NCOND(NC), .PARALLEL(1'b0), .END_MASK(EM), .SUB_MASK(SM)) dut_s (
    .clk, .rst, .start, .busy(o_dut[1].busy), .start_out(o_dut[1].start_out), .busy_in,
    .cond, .load(o_dut[1].load), .fire(o_dut[1].fire),
    .sub_start(o_dut[1].sub_start), .sub_busy, .sub_start_out,
    .sub_busy_in(o_dut[1].sub_busy_in), .sub_done(o_dut[1].sub_done));

  // model state: 0 wait, 1 calc, 2 sub request, 3 sub wait, 4 result
  int m_state[2];
  int m_pc[2];
  int checks = 0, failures = 0;
  int n_load = 0, n_end = 0, n_sub = 0, n_skip = 0, n_wrap = 0, n_stall = 0, n_subdone = 0, n_plain = 0;

  function automatic outs_t model_out(int st, int pc, bit par);
    outs_t o;
    o = '0;
    o.busy        = (st != 0);
    o.start_out   = (st == 4);
    o.sub_start   = (st == 2);
    o.sub_busy_in = (st != 3);
    o.load        = (st == 0) && start;
    o.sub_done    = (st == 3) && sub_start_out;
    if (st == 1) begin
      if (par) begin
        for (int i = 0; i < NC; i++)
          if (cond[i]) begin o.fire[i] = 1'b1; break; end
      end else if (cond[pc]) o.fire[pc] = 1'b1;
    end
    return o;
  endfunction

  task automatic model_step(int k, outs_t o);
    case (m_state[k])
      0: if (start) begin m_state[k] = 1; m_pc[k] = 0; n_load++; end
      1: begin
        if (o.fire != 0) begin
          m_pc[k] = 0;
          if ((o.fire & EM) != 0) begin m_state[k] = 4; n_end++; end
          else if ((o.fire & SM) != 0) begin m_state[k] = 2; n_sub++; end
          else n_plain++;
        end else if (k == 1) begin
          if (m_pc[k] == NC - 1) begin m_pc[k] = 0; n_wrap++; end
          else begin m_pc[k]++; n_skip++; end
        end
      end
      2: if (!sub_busy) m_state[k] = 3;
      3: if (sub_start_out) begin m_state[k] = 1; n_subdone++; end
      4: if (!busy_in) m_state[k] = 0; else n_stall++;
      default: ;
    endcase
  endtask

  initial begin
    start = 0; busy_in = 1; sub_busy = 0; sub_start_out = 0; cond = '0;
    m_state = '{0, 0};
    m_pc = '{0, 0};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      start         = ($urandom_range(0, 3) == 0);
      busy_in       = ($urandom_range(0, 2) == 0);
      sub_busy      = ($urandom_range(0, 2) == 0);
      sub_start_out = ($urandom_range(0, 3) == 0);
      cond          = NC'($urandom);
      #1;
      for (int k = 0; k < 2; k++) begin
        o_ref[k] = model_out(m_state[k], m_pc[k], k == 0);
        checks++;
        if (o_dut[k] !== o_ref[k]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d instance %0d: got %b expected %b (state %0d pc %0d cond %b)",
                     cyc, k, o_dut[k], o_ref[k], m_state[k], m_pc[k], cond);
        end
      end
      @(posedge clk);
      for (int k = 0; k < 2; k++) model_step(k, o_ref[k]);
    end
    checks++;
    if (n_load == 0 || n_end == 0 || n_sub == 0 || n_subdone == 0 || n_plain == 0 ||
        n_skip == 0 || n_wrap == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL coverage: load %0d end %0d sub %0d subdone %0d plain %0d skip %0d wrap %0d stall %0d",
               n_load, n_end, n_sub, n_subdone, n_plain, n_skip, n_wrap, n_stall);
    end
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
