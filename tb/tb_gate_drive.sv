// tb_gate_drive - self-checking test of deadtime and overcurrent trip.
//
// With DEADTIME = 10 clocks: after enable the legs wait one deadtime, then
// conduct the commanded state; a change of the state puts only the changed
// legs into exactly DEADTIME clocks of both-off before the new switch turns
// on, while unchanged legs keep conducting. Every clock checks that no leg
// has both switches on. An overcurrent sample turns all gates off in the
// next clock and latches fault until fault_clear; a current just below
// the limit does not trip.
module tb_gate_drive;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int DT = 10;

  int checks = 0, failures = 0;

  logic      rst, enable, state_valid, i_valid, fault_clear, fault;
  sw_state_t state;
  abc_t      i_abc;
  gates_t    gates;

  gate_drive #(.DEADTIME(DT)) dut (.clk, .rst, .enable, .state_valid, .state, .i_valid,
                                  .i_abc, .fault_clear, .gates, .fault);

  // expected gates for a leg: 2'b10 upper on, 2'b01 lower on, 2'b00 off
  function automatic logic [5:0] expect_gates(logic [2:0] st, logic [2:0] off);
    logic [5:0] g;
    for (int l = 0; l < 3; l++) begin
      // leg a = bit 2 -> gates[5:4]
      g[2*l+1] = !off[l] &&  st[l];
      g[2*l]   = !off[l] && !st[l];
    end
    return g;
  endfunction

  function automatic logic [5:0] gvec();
    return {gates.a_p, gates.a_n, gates.b_p, gates.b_n, gates.c_p, gates.c_n};
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if ((gates.a_p && gates.a_n) || (gates.b_p && gates.b_n) || (gates.c_p && gates.c_n)) begin
        failures++;
        $display("shoot-through at %t", $time);
      end
    end
  end

  task automatic expect_now(logic [5:0] e, string what);
    checks++;
    if (gvec() !== e) begin
      failures++;
      $display("%s: gates %b expected %b at %t", what, gvec(), e, $time);
    end
  endtask

  task automatic command(sw_state_t s);
    @(negedge clk);
    state = s; state_valid = 1'b1;
    @(negedge clk);
    state_valid = 1'b0;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; enable = 1'b0; state_valid = 1'b0; state = '0; i_valid = 1'b0;
    fault_clear = 1'b0; i_abc = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    expect_now(6'b000000, "disabled");
    command(3'b100);            // clock 1 of the command
    enable = 1'b1;
    repeat (DT - 1) @(negedge clk);
    expect_now(6'b000000, "first deadtime");
    repeat (2) @(negedge clk);
    expect_now(expect_gates(3'b100, 3'b000), "state 100");
    // change to 001: legs a and c change, b stays (lower on)
    command(3'b001);
    // one clock has passed since the command was taken
    expect_now(expect_gates(3'b001, 3'b101), "dead legs a, c");
    repeat (DT - 1) @(negedge clk);
    expect_now(expect_gates(3'b001, 3'b101), "last clock of deadtime");
    @(negedge clk);
    expect_now(expect_gates(3'b001, 3'b000), "state 001");
    // same state again: nothing moves
    command(3'b001);
    expect_now(expect_gates(3'b001, 3'b000), "repeat state");
    // current at the 9.4 A limit does not trip
    @(negedge clk);
    i_abc.a = PH_W'(616038); i_valid = 1'b1;
    @(negedge clk);
    i_valid = 1'b0;
    checks++;
    if (fault) begin failures++; $display("tripped at 9.4 A"); end
    expect_now(expect_gates(3'b001, 3'b000), "no trip");
    // overcurrent on phase b, negative, one LSB beyond the limit
    i_abc.a = '0; i_abc.b = -PH_W'(616039); i_valid = 1'b1;
    @(negedge clk);
    i_valid = 1'b0;
    checks++;
    if (!fault) begin failures++; $display("no trip at -9.4 A"); end
    expect_now(6'b000000, "tripped");
    command(3'b111);
    repeat (3 * DT) @(negedge clk);
    expect_now(6'b000000, "stays off while faulted");
    fault_clear = 1'b1;
    @(negedge clk);
    fault_clear = 1'b0;
    checks++;
    if (fault) begin failures++; $display("fault not cleared"); end
    repeat (DT + 1) @(negedge clk);
    expect_now(expect_gates(3'b111, 3'b000), "after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
