// tb_tap_tracker: self-checking test of the TAP state copy and its routing.
//
// Part 1 drives random TMS and compares the tracked state with a reference
// TAP controller written out in the testbench. Part 2 starts from each of the
// four stable states, asks for each of the six targets (four stable states,
// Shift-DR, Shift-IR) and follows tms_next until at_target, checking that the
// walk arrives in the number of TCK periods of the usual SVF routes.
module tb_tap_tracker;
  import jtag_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       step, tms, tms_next, at_target;
  tap_state_t target, state;

  tap_tracker dut (.clk(clk), .rst_n(rst_n), .step(step), .tms(tms), .target(target),
                   .state(state), .tms_next(tms_next), .at_target(at_target));

  function automatic logic [3:0] ref_next(input logic [3:0] s, input logic t);
    case (s)
      4'hF: return t ? 4'hF : 4'hC;
      4'hC: return t ? 4'h7 : 4'hC;
      4'h7: return t ? 4'h4 : 4'h6;
      4'h6: return t ? 4'h1 : 4'h2;
      4'h2: return t ? 4'h1 : 4'h2;
      4'h1: return t ? 4'h5 : 4'h3;
      4'h3: return t ? 4'h0 : 4'h3;
      4'h0: return t ? 4'h5 : 4'h2;
      4'h5: return t ? 4'h7 : 4'hC;
      4'h4: return t ? 4'hF : 4'hE;
      4'hE: return t ? 4'h9 : 4'hA;
      4'hA: return t ? 4'h9 : 4'hA;
      4'h9: return t ? 4'hD : 4'hB;
      4'hB: return t ? 4'h8 : 4'hB;
      4'h8: return t ? 4'hD : 4'hA;
      default: return t ? 4'h7 : 4'hC; // Update-IR
    endcase
  endfunction

  // Reference route lengths [from][to] for from in {RESET, IDLE, DRPAUSE,
  // IRPAUSE} and to in {RESET(n/a), IDLE, DRPAUSE, IRPAUSE, SHIFTDR, SHIFTIR}.
  int route_len [4][6] = '{
    '{0, 1, 5, 6, 4, 5},
    '{0, 0, 4, 5, 3, 4},
    '{0, 3, 0, 7, 2, 6},
    '{0, 3, 6, 0, 5, 2}
  };
  tap_state_t stables [4] = '{TAP_RESET, TAP_IDLE, TAP_PAUSE_DR, TAP_PAUSE_IR};
  tap_state_t targets [6] = '{TAP_RESET, TAP_IDLE, TAP_PAUSE_DR, TAP_PAUSE_IR,
                              TAP_SHIFT_DR, TAP_SHIFT_IR};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic go_reset();
    target = TAP_RESET;
    for (int i = 0; i < 5; i++) begin
      tms = 1'b1; step = 1'b1; @(posedge clk); #1;
    end
    step = 1'b0;
  endtask

  task automatic walk(input tap_state_t to, output int n);
    target = to;
    n = 0;
    #1;
    while (!at_target && n < 20) begin
      tms = tms_next; step = 1'b1; @(posedge clk); #1; n++;
    end
    step = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] refs;
  int n;

  initial begin
    step = 1'b0; tms = 1'b0; target = TAP_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(state == TAP_RESET, "reset state");
    refs = 4'hF;
    for (int i = 0; i < 2000; i++) begin
      tms = 1'($urandom); step = 1'($urandom);
      @(posedge clk); #1;
      if (step) refs = ref_next(refs, tms);
      if (i % 20 == 0 || state != refs) check(state == refs, $sformatf("random walk step %0d", i));
    end
    step = 1'b0;

    for (int f = 0; f < 4; f++)
      for (int t = 1; t < 6; t++) begin
        go_reset();
        if (f != 0) walk(stables[f], n);
        check(state == stables[f], "reach start state");
        walk(targets[t], n);
        check(state == targets[t] && n == route_len[f][t],
              $sformatf("route %0d->%0d took %0d", f, t, n));
      end
    target = TAP_RESET; #1;
    check(tms_next == 1'b1, "TMS=1 toward RESET");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
