// tb_bcc_pa: checks the behavioural PA model: OH -> +VDD differential,
// OL -> -VDD, neither -> both outputs at VDD/2 (reset), over all three
// legal input combinations and a pulse sequence.
//
// The +/-/reset behaviour follows the original PA; VDD = 0.9 V is this
// model's assumption.
module tb_bcc_pa;
  logic oh, ol;
  real op, on;
  logic signed [1:0] op_minus_on;
  int checks = 0, failures = 0;

  bcc_pa dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #10000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 30; i++) begin
      int s;
      s = i % 3;
      oh = (s == 1); ol = (s == 2);
      #10;
      case (s)
        0: check(op == 0.45 && on == 0.45 && op_minus_on == 0, "reset to VDD/2");
        1: check(op == 0.9 && on == 0.0 && op_minus_on == 1, "OH drives positive");
        default: check(op == 0.0 && on == 0.9 && op_minus_on == -1, "OL drives negative");
      endcase
      check(op + on == 0.9, "common mode VDD/2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
