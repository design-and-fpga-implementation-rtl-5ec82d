// tb_nco: checks the numerically controlled oscillator against a model of its
// 18-bit phase accumulator and a real-valued cosine.
// Phase 1 holds vd = 0: the address must step by 64 every clock (1/16 of a
// cycle) and the output must repeat every 16 clocks. Phase 2 applies random
// corrections. Throughout, address must equal the model accumulator's top 10
// bits and dout, two clocks later, round(127 cos(2 pi (address + 0.5)/1024)).
// Every quadrant of the cycle must be visited.
module tb_nco;
  import fm_pkg::*;

  logic clk = 0, rst = 1;
  freq_t vd;
  sample_t dout;
  logic [9:0] address;
  int checks = 0, failures = 0;
  int quad_seen [4];

  nco dut (.clk, .rst, .vd, .dout, .address);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cos_ref(int adr);
    real c;
    c = 127.0 * $cos(2.0 * 3.14159265358979 * (real'(adr) + 0.5) / 1024.0);
    return (c >= 0.0) ? $rtoi(c + 0.5) : -$rtoi(-c + 0.5);
  endfunction

  longint acc_model;
  int addr_hist [3];
  sample_t first_cycle [16];

  task automatic tick(input int vdv, input bit chk_out);
    vd = freq_t'(vdv);
    @(posedge clk);
    #1;
    acc_model = (acc_model + 16384 + vdv) & 64'h3FFFF;
    addr_hist[2] = addr_hist[1];
    addr_hist[1] = addr_hist[0];
    addr_hist[0] = int'(address);
    checks++;
    if (longint'(address) != (acc_model >> 8)) begin
      failures++;
      if (failures < 10) $display("FAIL address %0d expected %0d", address, acc_model >> 8);
    end
    if (chk_out) begin
      checks++;
      quad_seen[addr_hist[2] >> 8]++;
      if (int'(dout) != cos_ref(addr_hist[2])) begin
        failures++;
        if (failures < 10)
          $display("FAIL dout %0d expected %0d (address %0d)", dout, cos_ref(addr_hist[2]), addr_hist[2]);
      end
    end
  endtask

  initial begin
    vd = '0;
    acc_model = 0;
    addr_hist = '{0, 0, 0};
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (address != 0 || dout != 0) failures++;
    rst = 0;
    // address 0 must reach dout two clocks later: prime the history
    addr_hist[0] = 0;
    tick(0, 0);
    tick(0, 1);
    // free running: 16 samples per cycle
    for (int i = 0; i < 64; i++) begin
      int prev;
      prev = addr_hist[0];
      tick(0, 1);
      checks++;
      if (((addr_hist[0] - prev) & 1023) != 64) failures++;
      if (i < 16) first_cycle[i] = dout;
      else if (i < 32) begin
        checks++;
        if (dout != first_cycle[i-16]) failures++;
      end
    end
    // random frequency corrections
    for (int i = 0; i < 20000; i++) tick(int'($urandom_range(0, 4000)) - 2000, 1);
    // slow sweep covering every address
    for (int i = 0; i < 5000; i++) tick(-16384 + 300, 1);
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin
        failures++;
        $display("FAIL quadrant %0d never visited", q + 1);
      end
    end
    $display("quadrant visits: %0d %0d %0d %0d", quad_seen[0], quad_seen[1], quad_seen[2], quad_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
