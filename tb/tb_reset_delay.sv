// Testbench for reset_delay: drives pulses of several widths into the delay
// element and checks that each edge reaches the output DELAY_PS later, not
// earlier.
module tb_reset_delay;
  localparam int unsigned DELAY_PS = 300;

  logic a = 1'b0;
  logic y;
  int   checks = 0;
  int   failures = 0;

  reset_delay #(.DELAY_PS(DELAY_PS)) dut (.a, .y);

  task automatic check(input logic exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: y=%0b expected %0b at %0t", what, y, exp, $time);
    end
  endtask

  initial begin
    #1ns;
    check(1'b0, "idle");
    for (int i = 0; i < 5; i++) begin
      a = 1'b1;
      #((DELAY_PS - 20) * 1ps);
      check(1'b0, "before rising edge arrives");
      #40ps;
      check(1'b1, "after rising edge arrives");
      #((DELAY_PS + 200 * i) * 1ps);
      a = 1'b0;
      #((DELAY_PS - 20) * 1ps);
      check(1'b1, "before falling edge arrives");
      #40ps;
      check(1'b0, "after falling edge arrives");
      #1ns;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
