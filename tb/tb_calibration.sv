// tb_calibration: the module's two calibration measurements, run on the whole
// design at full size with ideal models of the delay line and the converter.
//
// Part A: an external pulser sends pairs of pulses, on channels 0 and 1, 307.3
//   ns apart, at random phase to the clock. The vernier histogram of channel 0
//   must be flat (16 bins of 16 codes, each within 30 % of the mean). Its
//   running integral I(v) must rise from 0 to 1. The clock-count separation of
//   a pair must fill at most two adjacent values. The rebuilt time difference
//   must match within two vernier steps.
// Part B: the Time Master sends pairs 15 clocks apart on channels 2 and 3,
//   first with equal delay codes and then with channel 3's code swept over all
//   256 values. With equal codes the clock separation must fill exactly one
//   value. In the sweep the rebuilt difference must follow 15 T + code T/256
//   within two steps and rise with the code.
`timescale 1ns/1ps
module tb_calibration;
  import mtt_pkg::*;
  localparam real T   = 20.0;
  localparam real LSB = T / 256.0;
  localparam int  NA  = 3000;   // pulser pairs

  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0;
  logic [17:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic host_rvalid, ext_start = 0;
  logic tm_vern_trig, tm_vern_pulse, tof_tac_arm;
  logic [7:0] tm_vern_code, tof_adc_data;
  logic [15:0] tm_out, tof_in, extra = 0;
  int checks = 0, failures = 0;

  always #(T/2) clk = ~clk;

  master_timing_tof dut (.*);
  ad9500_model #(.T_CLK_NS(T), .OFFSET_NS(2.0)) u_delay (
    .trig(tm_vern_trig), .code(tm_vern_code), .pulse(tm_vern_pulse));
  assign tof_in = tm_out | extra;
  tof_vernier_model #(.NCH(16), .T_CLK_NS(T)) u_vern (
    .clk, .arm(tof_tac_arm), .pulse_in(tof_in), .adc(tof_adc_data));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic hwrite(region_e r, int unsigned a, logic [31:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = {r, 15'(a)}; host_wdata = d;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  task automatic hread(region_e r, int unsigned a, output logic [31:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = {r, 15'(a)};
    @(negedge clk); host_req = 0;
    d = host_rdata;
  endtask

  function automatic int gray2bin(logic [23:0] g);
    logic [23:0] b;
    b[23] = g[23];
    for (int i = 22; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return int'({8'd0, b});
  endfunction

  // record i: stored count N, vernier v, channel c, rebuilt time in ns
  task automatic rec(int i, output int n, output int v, output int c, output real t);
    logic [31:0] g, ch, vv;
    hread(REG_TOF_TIME, i, g);
    hread(REG_TOF_CHID, i, ch);
    hread(REG_TOF_VER, i, vv);
    n = gray2bin(g[23:0]); v = int'(vv); c = int'(ch);
    t = (real'(n) - 1.0) * T - real'(v) * LSB;
  endtask

  task automatic wait_idle();
    logic [31:0] s;
    do begin
      repeat (100) @(negedge clk);
      hread(REG_CTRL, 2, s);
    end while (s[0]);
  endtask

  initial begin
    #300ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    int hist[16];
    int sep_min, sep_max, n0, n1, v0, v1, c0, c1;
    real t0r, t1r, integral, prev_i, prev_dt;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ------------------------------------------------ part A: external pulser
    hwrite(REG_CTRL, 0, 0);           // no pattern
    hwrite(REG_CTRL, 1, 1);           // start: arms the TOF section
    for (int i = 0; i < NA; i++) begin
      @(posedge clk);
      #(0.2 + real'($urandom_range(0, 19600)) / 1000.0);
      extra[0] = 1; #5 extra[0] = 0;
      #(307.3 - 5.0) extra[1] = 1; #5 extra[1] = 0;
      repeat ($urandom_range(8, 14)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    hread(REG_CTRL, 3, d);
    check(d == 2 * NA, $sformatf("part A: %0d records", d));
    foreach (hist[b]) hist[b] = 0;
    sep_min = 1 << 30; sep_max = 0;
    for (int i = 0; i < NA; i++) begin
      rec(2 * i, n0, v0, c0, t0r);
      rec(2 * i + 1, n1, v1, c1, t1r);
      check(c0 == 0 && c1 == 1, "part A channels");
      hist[v0 / 16]++;
      if (n1 - n0 < sep_min) sep_min = n1 - n0;
      if (n1 - n0 > sep_max) sep_max = n1 - n0;
      check((t1r - t0r) - 307.3 < 2 * LSB && 307.3 - (t1r - t0r) < 2 * LSB,
            $sformatf("part A pair %0d: difference %0.3f", i, t1r - t0r));
    end
    integral = 0.0; prev_i = -1.0;
    for (int b = 0; b < 16; b++) begin
      automatic real mean = real'(NA) / 16.0;
      check(real'(hist[b]) > 0.7 * mean && real'(hist[b]) < 1.3 * mean,
            $sformatf("vernier histogram bin %0d holds %0d", b, hist[b]));
      integral += real'(hist[b]) / real'(NA);
      check(integral > prev_i, "I(v) rises");
      prev_i = integral;
    end
    check(integral > 0.999 && integral < 1.001, "I(vmax) = 1");
    check(sep_max - sep_min <= 1, $sformatf("clock separation spans %0d..%0d", sep_min, sep_max));
    $display("part A: clock separation %0d..%0d, vernier bins %p", sep_min, sep_max, hist);

    // ------------------------------------------------ part B: Time Master sweep
    begin
      automatic int unsigned p = 40;
      automatic int k = 0;
      // 64 pairs with equal codes, then 256 pairs with channel 3's code swept
      for (int i = 0; i < 64 + 256; i++) begin
        automatic int unsigned ca = (i < 64) ? $urandom_range(0, 255) : 0;
        automatic int unsigned cb = (i < 64) ? ca : i - 64;
        hwrite(REG_PAT,  k, p ^ (p >> 1));        hwrite(REG_VER, k, ca); hwrite(REG_CHID, k, 2); k++;
        hwrite(REG_PAT,  k, (p + 15) ^ ((p + 15) >> 1)); hwrite(REG_VER, k, cb); hwrite(REG_CHID, k, 3); k++;
        p += 40;
      end
      hwrite(REG_CTRL, 0, k);
      hwrite(REG_CTRL, 1, 1);
      wait_idle();
      repeat (10) @(posedge clk);
      hread(REG_CTRL, 3, d);
      check(d == k, $sformatf("part B: %0d records", d));
      sep_min = 1 << 30; sep_max = 0; prev_dt = -1.0;
      for (int i = 0; i < 64 + 256; i++) begin
        rec(2 * i, n0, v0, c0, t0r);
        rec(2 * i + 1, n1, v1, c1, t1r);
        check(c0 == 2 && c1 == 3, "part B channels");
        if (i < 64) begin
          if (n1 - n0 < sep_min) sep_min = n1 - n0;
          if (n1 - n0 > sep_max) sep_max = n1 - n0;
        end else begin
          automatic real want = 15.0 * T + real'(i - 64) * LSB;
          automatic real got  = t1r - t0r;
          check(got - want < 2 * LSB && want - got < 2 * LSB,
                $sformatf("sweep code %0d: difference %0.3f, want %0.3f", i - 64, got, want));
          check(got > prev_dt - 2 * LSB, "sweep rises with the code");
          prev_dt = got;
        end
      end
      check(sep_min == sep_max && sep_min == 15,
            $sformatf("equal codes: clock separation %0d..%0d", sep_min, sep_max));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
