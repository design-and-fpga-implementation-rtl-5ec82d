// tb_dpll: closed-loop test of the digital PLL.
// A sine carrier (amplitude 127, 8-bit samples) is applied at the NCO's
// free-running frequency plus an offset of D accumulator units per clock
// (D / 2^18 of a cycle). For each offset the loop is given time to lock;
// then over a window of W clocks the NCO must advance exactly as far as the
// input (within a few address steps: frequency lock), and the mean loop
// filter output must equal 4 D (Ve / 4 is the NCO correction: within 3 %
// of full deflection). Offsets of both signs and zero are tried. An offset of
// 250 units, beyond the loop's reach (about +-126 units at full-scale
// input), must not lock; a following step back into range must re-lock.
module tb_dpll;
  import fm_pkg::*;

  logic clk = 0, rst = 1;
  sample_t fm_in, nco_out;
  lf_t ve;
  logic [9:0] address;
  int checks = 0, failures = 0;
  int locks = 0, unlocked = 0;

  dpll dut (.clk, .rst, .fm_in, .ve, .nco_out, .address);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real in_phase;   // input phase in cycles
  int  in_inc;     // input phase step in 1/2^18 cycle

  // input generator: a new sample every clock
  always @(posedge clk) begin
    in_phase = in_phase + real'(in_inc) / 262144.0;
    if (in_phase >= 1.0) in_phase = in_phase - 1.0;
    fm_in <= sample_t'($rtoi(127.0 * $sin(2.0 * 3.14159265358979 * in_phase) + 128.5) - 128);
  end

  task automatic measure(input int d, input int settle, input int w, input bit expect_lock);
    real   in_start, nco_cycles, in_cycles;
    longint ve_sum;
    int    nco_unwrapped, prev_addr;
    in_inc = 16384 + d;
    repeat (settle) @(posedge clk);
    #1;
    ve_sum = 0;
    nco_unwrapped = 0;
    prev_addr = int'(address);
    in_cycles = 0.0;
    for (int i = 0; i < w; i++) begin
      @(posedge clk);
      #1;
      ve_sum += longint'(ve);
      nco_unwrapped += (int'(address) - prev_addr) & 1023;
      prev_addr = int'(address);
      in_cycles += real'(in_inc) / 262144.0;
    end
    nco_cycles = real'(nco_unwrapped) / 1024.0;
    checks++;
    if (!expect_lock) begin
      if (nco_cycles - in_cycles > 0.01 || in_cycles - nco_cycles > 0.01) unlocked++;
      else begin
        failures++;
        $display("FAIL D=%0d: locked outside the lock range", d);
      end
      return;
    end
    if (nco_cycles - in_cycles > 0.01 || in_cycles - nco_cycles > 0.01) begin
      failures++;
      $display("FAIL D=%0d: NCO ran %f cycles, input %f", d, nco_cycles, in_cycles);
    end else locks++;
    checks++;
    if ((ve_sum / w) - 4 * d > 64 || 4 * d - (ve_sum / w) > 64) begin
      failures++;
      $display("FAIL D=%0d: mean Ve %0d expected %0d", d, ve_sum / w, 4 * d);
    end
    $display("D=%0d mean Ve=%0d (expected %0d) NCO cycles %f input %f", d, ve_sum / w, 4 * d,
             nco_cycles, in_cycles);
  endtask

  initial begin
    in_phase = 0.0;
    in_inc = 16384;
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    measure(0, 4000, 8192, 1);
    measure(40, 4000, 8192, 1);
    measure(-40, 4000, 8192, 1);
    measure(80, 4000, 8192, 1);
    measure(-80, 4000, 8192, 1);
    measure(250, 4000, 8192, 0);
    measure(20, 6000, 8192, 1);
    checks++;
    if (locks != 6 || unlocked != 1) failures++;
    $display("locks=%0d out-of-range=%0d", locks, unlocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
