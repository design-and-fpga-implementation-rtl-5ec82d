// tb_loop_gain: checks the 1/1024 loop gain: for every 12-bit input the
// 18-bit output must equal floor((ve + 2) / 4), i.e. ve / 1024 of a cosine
// address step in an accumulator with 8 fraction bits, rounded to nearest.
module tb_loop_gain;
  import fm_pkg::*;

  lf_t   ve;
  freq_t vd;
  int checks = 0, failures = 0;

  loop_gain dut (.ve, .vd);

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      int exp_v;
      ve = lf_t'(v);
      #1;
      exp_v = ((v + 2) - ((((v + 2) % 4) + 4) % 4)) / 4;
      checks++;
      if (int'(vd) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL ve=%0d got %0d expected %0d", v, vd, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
