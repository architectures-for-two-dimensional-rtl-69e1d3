// tb_lgm1_clock_fsm -- runs major cycles with a tick every fourth clk and
// checks the phase order PHI1, gap, PHI2, gap, LATCH, that phi1 and phi2
// never overlap, that step comes once at the start of phi1, that
// latch_out/clr_start come once after phi2, that the cycle takes six
// ticks, and that nothing starts without START. Also runs with
// PHASE_TICKS = 3 to check the phase length.
`timescale 1ns/1ps
module tb_lgm1_clock_fsm;
  logic clk = 0, rst_n = 0, tick = 0, start = 0;
  logic phi1[2], phi2[2], step[2], latch[2], clr[2], run[2];
  int checks = 0, failures = 0;
  int tcnt = 0;

  lgm1_clock_fsm #(.PHASE_TICKS(1)) dut1 (.clk(clk), .rst_n(rst_n), .tick(tick), .start(start),
    .phi1(phi1[0]), .phi2(phi2[0]), .step(step[0]), .latch_out(latch[0]), .clr_start(clr[0]), .running(run[0]));
  lgm1_clock_fsm #(.PHASE_TICKS(3)) dut3 (.clk(clk), .rst_n(rst_n), .tick(tick), .start(start),
    .phi1(phi1[1]), .phi2(phi2[1]), .step(step[1]), .latch_out(latch[1]), .clr_start(clr[1]), .running(run[1]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tcnt <= (tcnt + 1) % 4;
    tick <= (tcnt == 3);
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one START on instance i, record the tick numbers of each event
  task automatic run_cycle(input int i, input int pt);
    int t, t_step, t_p1_first, t_p1_last, t_p2_first, t_p2_last, t_latch, nstep, nlatch;
    t = 0; t_step = -1; t_p1_first = -1; t_p1_last = -1; t_p2_first = -1; t_p2_last = -1;
    t_latch = -1; nstep = 0; nlatch = 0;
    @(negedge clk);
    start = 1'b1;
    for (int c = 0; c < 4 * (4 + 2 * pt) + 40; c++) begin
      logic tk;
      tk = tick;           // the tick the coming edge will see
      @(posedge clk);
      #1;
      if (tk) t++;
      chk("non-overlap", !(phi1[i] && phi2[i]));
      if (step[i]) begin nstep++; t_step = t; end
      if (phi1[i]) begin if (t_p1_first < 0) t_p1_first = t; t_p1_last = t; end
      if (phi2[i]) begin if (t_p2_first < 0) t_p2_first = t; t_p2_last = t; end
      if (latch[i]) begin
        nlatch++; t_latch = t;
        chk("clr with latch", clr[i]);
        start = 1'b0;
      end
      @(negedge clk);
    end
    chk("one step", nstep == 1);
    chk("one latch", nlatch == 1);
    chk("step at phi1 start", t_step == t_p1_first);
    chk("phi1 length", t_p1_last - t_p1_first + 1 == pt);
    chk("phi2 length", t_p2_last - t_p2_first + 1 == pt);
    chk("gap after phi1", t_p2_first == t_p1_last + 2);
    chk("latch after phi2", t_latch == t_p2_last + 2);
    chk("idle after", !run[i]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (40) begin
      @(posedge clk);
      #1;
      chk("idle without start", !run[0] && !phi1[0] && !phi2[0] && !step[0]);
    end
    run_cycle(0, 1);
    run_cycle(0, 1);
    repeat (40) @(posedge clk);
    run_cycle(1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
