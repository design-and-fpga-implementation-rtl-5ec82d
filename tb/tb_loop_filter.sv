// tb_loop_filter: checks the 15/16 first-order loop filter against an integer
// model b[n+1] = a[n] + b[n] - floor(b[n]/16), cycle by cycle, with random
// input, then with a held maximum and minimum input, where the output must
// settle at the DC gain limit (16 x input: 2032, and -2033 .. -2048 where
// the floor rounding of b/16 leaves a band of fixed points) without overflow.
module tb_loop_filter;
  import fm_pkg::*;

  logic clk = 0, rst = 1;
  sample_t a;
  lf_t b;
  int checks = 0, failures = 0;
  int model;

  loop_filter dut (.clk, .rst, .a, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor16(int v);
    return (v - (((v % 16) + 16) % 16)) / 16;
  endfunction

  task automatic step(input int av);
    a = sample_t'(av);
    @(posedge clk);
    #1;
    model = av + model - floor16(model);
    checks++;
    if (int'(b) != model) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d got %0d expected %0d", av, b, model);
    end
  endtask

  initial begin
    a = 0;
    model = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    #1;
    checks++;
    if (b != 0) failures++;
    for (int i = 0; i < 3000; i++) step(int'($signed(8'($urandom))));
    for (int i = 0; i < 400; i++) step(127);
    checks++;
    if (b != 12'sd2032) begin failures++; $display("FAIL +limit %0d", b); end
    for (int i = 0; i < 400; i++) step(-128);
    checks++;
    if (b > -12'sd2033) begin failures++; $display("FAIL -limit %0d", b); end
    // impulse response decays by 15/16 per clock
    for (int i = 0; i < 300; i++) step(0);
    step(64);
    for (int i = 0; i < 20; i++) step(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
