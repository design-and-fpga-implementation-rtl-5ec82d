// tb_cos_rom: reads all 256 entries of the quarter-wave table and compares
// each, one clock after its address, with round(127 cos(2 pi (j + 0.5)/1024))
// computed in real arithmetic.
module tb_cos_rom;
  import fm_pkg::*;

  logic clk = 0;
  logic [7:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  cos_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 256; j++) begin
      int exp_v;
      addr = 8'(j);
      @(posedge clk);
      #1;
      exp_v = int'($rtoi(127.0 * $cos(2.0 * 3.14159265358979 * (real'(j) + 0.5) / 1024.0) + 0.5));
      checks++;
      if (int'(data) != exp_v) begin
        failures++;
        $display("FAIL rom[%0d] = %0d expected %0d", j, data, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
