// tb_fir_filter: checks the 16-tap moving average against a model that keeps
// the last 16 inputs: one clock after each sample dout must be
// floor(sum of the last 16 samples / 16). Random, full-scale and step inputs.
module tb_fir_filter;
  import fm_pkg::*;

  logic clk = 0, rst = 1;
  lf_t din, dout;
  int checks = 0, failures = 0;
  int hist [16];

  fir_filter dut (.clk, .rst, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int x);
    int s, exp_v;
    din = lf_t'(x);
    @(posedge clk);
    #1;
    for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    s = 0;
    foreach (hist[k]) s += hist[k];
    exp_v = (s - (((s % 16) + 16) % 16)) / 16;
    checks++;
    if (int'(dout) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d expected %0d", dout, exp_v);
    end
  endtask

  initial begin
    din = 0;
    foreach (hist[k]) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    for (int i = 0; i < 5000; i++) step(int'($urandom_range(0, 4095)) - 2048);
    for (int i = 0; i < 40; i++) step(2047);
    for (int i = 0; i < 40; i++) step(-2048);
    for (int i = 0; i < 20; i++) step(0);
    // step response reaches its final value after exactly 16 samples
    for (int i = 0; i < 16; i++) step(160);
    checks++;
    if (dout != 12'sd160) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
