// tb_phase_detector: checks the Booth-multiplier phase detector against
// integer products. Random and corner operand pairs are applied; one clock
// later pd_out must equal floor(in1 * in2 / 256), the top byte of the 16-bit
// product. Also checks the synchronous reset clears the output.
module tb_phase_detector;
  import fm_pkg::*;

  logic clk = 0, rst = 1;
  sample_t in1, in2, pd_out;
  int checks = 0, failures = 0;

  phase_detector dut (.clk, .rst, .in1, .in2, .pd_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int a, input int b);
    int prod, exp_v;
    in1 = sample_t'(a);
    in2 = sample_t'(b);
    @(posedge clk);
    #1;
    prod  = a * b;
    exp_v = (prod - (((prod % 256) + 256) % 256)) / 256;
    checks++;
    if (int'(pd_out) != exp_v) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", a, b, pd_out, exp_v);
    end
  endtask

  initial begin
    in1 = 0; in2 = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pd_out != 0) failures++;
    rst = 0;
    apply(-128, -128);
    apply(-128, 127);
    apply(127, 127);
    apply(127, -1);
    apply(-1, -1);
    apply(0, -128);
    apply(1, 1);
    apply(100, -3);
    for (int i = 0; i < 5000; i++)
      apply(int'($signed(8'($urandom))), int'($signed(8'($urandom))));
    // exhaustive sweep of one operand against a few fixed ones
    for (int a = -128; a < 128; a++) begin
      apply(a, 85);
      apply(a, -86);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
