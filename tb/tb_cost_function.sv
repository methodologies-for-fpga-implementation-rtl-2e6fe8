// tb_cost_function - self-checking test of |Id*-Id'| + |Iq*-Iq'|.
//
// Random targets (Q4.16) and predictions (Q5.16); the expected cost is
// computed with integer absolute values. Cost and out_valid must follow the
// inputs by exactly one clock.
module tb_cost_function;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                   rst, in_valid, out_valid;
  logic signed [I_W-1:0]  idt, iqt;
  logic signed [IP_W-1:0] idp, iqp;
  logic [COST_W-1:0]      cost;
  longint                 e;

  cost_function dut (.clk, .rst, .in_valid, .id_target(idt), .iq_target(iqt),
                     .id_p(idp), .iq_p(iqp), .out_valid, .cost);

  function automatic longint absl(longint x);
    return (x < 0) ? -x : x;
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; idt = '0; iqt = '0; idp = '0; iqp = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      idt = I_W'($urandom);  iqt = I_W'($urandom);
      idp = IP_W'($urandom); iqp = IP_W'($urandom);
      in_valid = n[0];
      e = absl(longint'(idt) - longint'(idp)) + absl(longint'(iqt) - longint'(iqp));
      @(posedge clk); #1;
      checks += 2;
      if (longint'(cost) !== e) begin
        failures++;
        if (failures < 10) $display("cost %0d expected %0d", cost, e);
      end
      if (out_valid !== in_valid) failures++;
    end
    // 0 A / 5 A target, prediction 0.5 A / 4 A -> 1.5 A
    @(negedge clk);
    idt = '0; iqt = I_W'(5 * 65536); idp = IP_W'(32768); iqp = IP_W'(4 * 65536);
    @(posedge clk); #1;
    checks++;
    if (cost !== COST_W'(98304)) begin failures++; $display("1.5 A case gave %0d", cost); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
