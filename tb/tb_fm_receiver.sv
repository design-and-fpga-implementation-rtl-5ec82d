// tb_fm_receiver: end-to-end test of the FM receiver at its default sizes.
//
// The five 64-bit test messages ("welcome@", "India123", "UPES@123",
// "123India", "123UPES@", as hex words) are sent bit by bit as a
// frequency-modulated carrier: the carrier sits at the receiver's
// free-running frequency (1/16 of the clock) and each bit shifts it by +DEV
// (bit 1) or -DEV (bit 0) units of 1/2^18 cycle per clock, for BIT_CLKS
// clocks. Samples are 8-bit, amplitude 127. Checks:
//  * demodulation: at the end of each bit the sign of dmout gives the bit
//    back, and its size is within 40 of 4 * DEV (loop filter units);
//  * dmout equals, one clock later, the 16-sample mean of the loop filter
//    output ve (an independent model of the FIR), and fm_out = dmout[11:4];
//  * mechanisms: initial lock, tracking of positive and of negative
//    deviation, every NCO quadrant in use, and the FIR reducing the ripple
//    of ve. Each is counted and must occur.
module tb_fm_receiver;
  import fm_pkg::*;

  localparam int DEV      = 60;
  localparam int BIT_CLKS = 1024;
  localparam int NWORDS   = 5;

  localparam logic [63:0] MSG [NWORDS] = '{
    64'h57656C636F6D6540,   // welcome@
    64'h496E646961313233,   // India123
    64'h5550455340313233,   // UPES@123
    64'h313233496E646961,   // 123India
    64'h3132335550455340    // 123UPES@
  };

  logic clk = 0, rst = 1;
  sample_t fm_in, fm_out, nco_out;
  lf_t dmout, ve;
  logic [9:0] address;
  int checks = 0, failures = 0;

  fm_receiver dut (.clk, .rst, .fm_in, .dmout, .fm_out, .address, .ve, .nco_out);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- FM source
  real in_phase;
  int  in_inc;

  always @(posedge clk) begin
    in_phase = in_phase + real'(in_inc) / 262144.0;
    if (in_phase >= 1.0) in_phase = in_phase - 1.0;
    fm_in <= sample_t'($rtoi(127.0 * $sin(2.0 * 3.14159265358979 * in_phase) + 128.5) - 128);
  end

  // ---------------- FIR model and mechanism counters
  int  ve_hist [16];
  int  fir_model_q;
  bit  model_valid;
  int  quad_seen [4];
  int  n_lock, n_pos, n_neg, n_smooth, n_fir_checks;
  longint rip_ve, rip_dm;   // sum of |sample - previous| over bit centres

  always @(posedge clk) begin
    int s;
    if (rst) begin
      model_valid <= 0;
    end else begin
      // dmout now must be the mean of the 16 ve values before this edge
      if (model_valid) begin
        n_fir_checks++;
        checks++;
        if (int'(dmout) != fir_model_q) begin
          failures++;
          if (failures < 10) $display("FAIL dmout %0d expected %0d", dmout, fir_model_q);
        end
        checks++;
        if (fm_out != dmout[11:4]) failures++;
      end
      for (int k = 15; k > 0; k--) ve_hist[k] = ve_hist[k-1];
      ve_hist[0] = int'(ve);
      s = 0;
      foreach (ve_hist[k]) s += ve_hist[k];
      fir_model_q <= (s - (((s % 16) + 16) % 16)) / 16;
      model_valid <= 1;
      quad_seen[address[9:8]]++;
    end
  end

  int prev_ve, prev_dm;
  bit ripple_on;
  always @(posedge clk) begin
    if (ripple_on) begin
      rip_ve += (int'(ve) > prev_ve) ? int'(ve) - prev_ve : prev_ve - int'(ve);
      rip_dm += (int'(dmout) > prev_dm) ? int'(dmout) - prev_dm : prev_dm - int'(dmout);
    end
    prev_ve = int'(ve);
    prev_dm = int'(dmout);
  end

  initial begin
    int errors_bits;
    foreach (ve_hist[k]) ve_hist[k] = 0;
    in_phase = 0.0;
    in_inc = 16384;
    ripple_on = 0;
    rip_ve = 0; rip_dm = 0;
    n_lock = 0; n_pos = 0; n_neg = 0; n_smooth = 0; n_fir_checks = 0;
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    // unmodulated carrier slightly off the free-running frequency: lock
    in_inc = 16384 + 10;
    repeat (3000) @(posedge clk);
    #1;
    checks++;
    if (int'(dmout) > 40 - 24 && int'(dmout) < 40 + 24) n_lock++;
    else begin
      failures++;
      $display("FAIL no lock on the carrier: dmout=%0d", dmout);
    end
    errors_bits = 0;
    for (int w = 0; w < NWORDS; w++) begin
      logic [63:0] rx;
      for (int b = 63; b >= 0; b--) begin
        in_inc = MSG[w][b] ? 16384 + DEV : 16384 - DEV;
        repeat (BIT_CLKS / 2) @(posedge clk);
        ripple_on = 1;
        repeat (BIT_CLKS / 2 - 1) @(posedge clk);
        ripple_on = 0;
        @(posedge clk);
        #1;
        rx[b] = (dmout > 0);
        checks++;
        if (rx[b] != MSG[w][b]) errors_bits++;
        checks++;
        if (int'(dmout) > 4 * DEV + 40 || int'(dmout) < -4 * DEV - 40 ||
            (int'(dmout) < 4 * DEV - 40 && int'(dmout) > -4 * DEV + 40)) begin
          failures++;
          if (failures < 10) $display("FAIL bit level dmout=%0d", dmout);
        end else if (dmout > 0) n_pos++;
        else n_neg++;
      end
      $display("word %0d sent %h received %h", w, MSG[w], rx);
      checks++;
      if (rx != MSG[w]) failures++;
    end
    failures += errors_bits;
    checks++;
    if (rip_dm < rip_ve) n_smooth = 1;
    $display("mechanisms: lock=%0d pos_dev=%0d neg_dev=%0d fir_smoothing=%0d (ripple ve %0d dmout %0d) quadrants %0d/%0d/%0d/%0d fir_checks=%0d",
             n_lock, n_pos, n_neg, n_smooth, rip_ve, rip_dm,
             quad_seen[0], quad_seen[1], quad_seen[2], quad_seen[3], n_fir_checks);
    if (n_lock == 0) begin failures++; $display("FAIL lock never seen"); end
    checks++;
    if (n_pos == 0) begin failures++; $display("FAIL positive deviation never seen"); end
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL negative deviation never seen"); end
    checks++;
    if (n_smooth == 0) begin failures++; $display("FAIL FIR did not smooth"); end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin failures++; $display("FAIL quadrant %0d unused", q + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
