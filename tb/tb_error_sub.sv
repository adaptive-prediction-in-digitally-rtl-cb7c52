// Self-checking testbench for error_sub: drives random reference and feedback
// codes, checks e = vref - vfb as a signed value and its one-clock latency,
// and checks that e holds while in_valid is low.
module tb_error_sub;
  localparam int unsigned AB = 8;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [AB-1:0] vref = '0, vfb = '0;
  logic e_valid;
  logic signed [AB:0] e;
  int checks = 0, failures = 0;

  error_sub #(.ADC_BITS(AB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int exp_e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corner values first, then random
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case (i)
        0: begin vref = 8'd255; vfb = 8'd0;   end
        1: begin vref = 8'd0;   vfb = 8'd255; end
        2: begin vref = 8'd140; vfb = 8'd140; end
        default: begin vref = AB'($urandom); vfb = AB'($urandom); end
      endcase
      exp_e = int'(vref) - int'(vfb);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check(e_valid == 1'b1, "e_valid one clock after in_valid");
      check(int'(e) == exp_e, $sformatf("e=%0d expected %0d", e, exp_e));
      vref = AB'($urandom); vfb = AB'($urandom);
      @(negedge clk);
      check(e_valid == 1'b0, "e_valid is a single pulse");
      check(int'(e) == exp_e, "e holds without in_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
