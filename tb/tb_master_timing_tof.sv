// tb_master_timing_tof: end-to-end test of the whole module at its full size
// (16 channels, 32K-word memories, 24-bit clock), run as the self-calibration
// loop: every Time Master output is wired back to the TOF input of the same
// channel, with behavioural models of the programmable delay and of the TOF
// vernier. All access goes through the PC bus.
//
// Run 1 (keyboard start) plays a pattern that fills all 32768 words of the
// pattern memories, with separations down to the 7-clock minimum and one word
// addressed to a channel that is not built. Every TOF record is read back and
// must rebuild the programmed pulse time to within one vernier step, on the
// programmed channel. Two extra pulses then fill the TOF memory and overflow it.
// Run 2 (external start) checks time differences only, plus a pulse inside
// the TOF dead time, a pulse that finds the converter disarmed but is seen
// after the dead time, and two pulses on the same clock. Run 3 puts a word inside
// the Time Master dead time, so the pattern stalls until a stop command.
// Each of these mechanisms is counted and must occur.
`timescale 1ns/1ps
module tb_master_timing_tof;
  import mtt_pkg::*;
  localparam real T      = 20.0;
  localparam real OFFSET = 2.0;       // fixed delay of the delay-line model
  localparam real LSB    = T / 256.0;

  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0;
  logic [17:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic host_rvalid;
  logic ext_start = 0;
  logic tm_vern_trig, tm_vern_pulse;
  logic [7:0] tm_vern_code, tof_adc_data;
  logic [15:0] tm_out, tof_in, extra = 0;
  logic tof_tac_arm;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_kbd_start = 0, n_ext_start = 0, n_min_sep = 0, n_unbuilt_ch = 0;
  int n_pat_end = 0, n_tm_dead_stall = 0, n_stop = 0, n_tof_full = 0;
  int n_tof_overflow_drop = 0, n_tof_dead_drop = 0, n_tof_priority = 0;
  int n_tof_unarmed_drop = 0;
  int n_records_checked = 0;

  always #(T/2) clk = ~clk;

  master_timing_tof dut (.*);

  ad9500_model #(.T_CLK_NS(T), .OFFSET_NS(OFFSET)) u_delay (
    .trig(tm_vern_trig), .code(tm_vern_code), .pulse(tm_vern_pulse));

  assign tof_in = tm_out | extra;

  tof_vernier_model #(.NCH(16), .T_CLK_NS(T)) u_vern (
    .clk, .arm(tof_tac_arm), .pulse_in(tof_in), .adc(tof_adc_data));

  // ---------------------------------------------------------------- helpers
  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL at %0t: %s", $realtime, msg);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  // returns the time of the clock edge that takes the request
  task automatic hwrite(region_e r, int unsigned a, logic [31:0] d, output real t_edge);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = {r, 15'(a)}; host_wdata = d;
    @(posedge clk); t_edge = $realtime;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  task automatic hread(region_e r, int unsigned a, output logic [31:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = {r, 15'(a)};
    @(negedge clk); host_req = 0;
    if (!host_rvalid) fail("read without rvalid");
    d = host_rdata;
  endtask

  function automatic int unsigned gray2bin(logic [23:0] g);
    logic [23:0] b;
    b[23] = g[23];
    for (int i = 22; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return {8'd0, b};
  endfunction

  // pattern
  int unsigned pt[$], pv[$], pc[$];
  real t_dummy;

  task automatic load_pattern();
    foreach (pt[i]) begin
      hwrite(REG_PAT,  i, pt[i] ^ (pt[i] >> 1), t_dummy);
      hwrite(REG_VER,  i, pv[i], t_dummy);
      hwrite(REG_CHID, i, pc[i], t_dummy);
    end
    hwrite(REG_CTRL, 0, pt.size(), t_dummy);
  endtask

  // expected TOF records of the pattern: pulses on built channels
  real et[$];
  int  ec[$];
  task automatic expected_records();
    et.delete(); ec.delete();
    foreach (pt[i])
      if (pc[i] < 16) begin
        et.push_back((pt[i] + 1) * T + OFFSET + pv[i] * LSB);
        ec.push_back(pc[i]);
      end
  endtask

  // read record i: rebuilt time relative to the counter's zero edge, and channel
  task automatic read_record(int i, output real t, output int c);
    logic [31:0] g, ch, v;
    hread(REG_TOF_TIME, i, g);
    hread(REG_TOF_CHID, i, ch);
    hread(REG_TOF_VER,  i, v);
    t = (real'(gray2bin(g[23:0])) - 1.0) * T - real'(v) * LSB;
    c = int'(ch);
  endtask

  task automatic wait_tm_idle(int max_reads);
    logic [31:0] s;
    for (int i = 0; i < max_reads; i++) begin
      hread(REG_CTRL, 2, s);
      if (!s[0]) return;
      repeat (200) @(negedge clk);
    end
    fail("Time Master never finished");
  endtask

  // fire an extra pulse on channel c (and c2) at a fine time inside a clock
  task automatic fire(int c, int c2 = -1);
    @(posedge clk); #(3.3);
    extra[c] = 1;
    if (c2 >= 0) extra[c2] = 1;
    #8 extra = '0;
  endtask

  initial begin
    #200ms; fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------------ test
  initial begin
    real t0, t, tprev;
    int c;
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- run 1: full pattern memory, keyboard start ----
    begin
      automatic int unsigned tt = 20;
      for (int i = 0; i < DEPTH; i++) begin
        automatic int unsigned gap = (i % 5 == 0) ? 7 : 7 + $urandom_range(0, 12);
        if (i > 0 && gap == 7) n_min_sep++;
        tt += (i == 0) ? 0 : gap;
        pt.push_back(tt);
        pv.push_back($urandom_range(0, 255));
        pc.push_back((i == 100) ? 200 : $urandom_range(0, 15));
      end
      n_unbuilt_ch++;
    end
    load_pattern();
    expected_records();
    hwrite(REG_CTRL, 1, 32'h1, t0);       // start from the keyboard
    t0 += T;                               // counter reads 0 after the next edge
    n_kbd_start++;
    wait_tm_idle(5000);
    hread(REG_CTRL, 2, d);
    check(d[0] == 0 && d[30:16] == 15'(DEPTH % 32768), "pattern end: MEM ADD and running");
    n_pat_end++;
    hread(REG_CTRL, 3, d);
    check(d == 32'(et.size()), $sformatf("TOF count %0d expected %0d", d, et.size()));
    for (int i = 0; i < et.size(); i++) begin
      read_record(i, t, c);
      check(c == ec[i] && t >= et[i] - 0.002 && t <= et[i] + LSB + 0.002,
            $sformatf("record %0d: ch %0d/%0d time %0.3f/%0.3f", i, c, ec[i], t, et[i]));
      n_records_checked++;
    end
    // one more pulse fills the TOF memory, the next one is dropped
    fire(4);
    repeat (10) @(posedge clk);
    hread(REG_CTRL, 2, d);
    hread(REG_CTRL, 3, d);
    check(d == DEPTH, "TOF memory full");
    hread(REG_CTRL, 2, d);
    check(d[2] == 1, "full flag");
    if (d[2]) n_tof_full++;
    fire(5);
    repeat (10) @(posedge clk);
    hread(REG_CTRL, 3, d);
    check(d == DEPTH, "pulse after full is dropped");
    n_tof_overflow_drop++;

    // ---- run 2: external start, differences only ----
    pt = '{30, 37, 60, 61 + 7, 200};
    pv = '{0, 255, 128, 3, 90};
    pc = '{2, 11, 0, 15, 6};
    n_min_sep += 2;
    load_pattern();
    expected_records();
    @(negedge clk); #3.1 ext_start = 1;
    repeat (5) @(negedge clk); ext_start = 0;
    n_ext_start++;
    wait_tm_idle(100);
    // a pulse inside the TOF dead time, then two pulses on one clock
    fire(9);
    @(posedge clk); #4 extra[12] = 1; #8 extra = '0;     // ignored
    n_tof_dead_drop++;
    repeat (12) @(posedge clk);
    // a pulse that arrives while the converter is disarmed but is seen only
    // after the dead time has ended must also be dropped
    fire(10);
    repeat (5) @(posedge clk); #3.3 extra[14] = 1; #8 extra = '0;  // dropped
    n_tof_unarmed_drop++;
    repeat (12) @(posedge clk);
    fire(13, 7);                                          // channel 7 kept
    n_tof_priority++;
    repeat (12) @(posedge clk);
    hread(REG_CTRL, 3, d);
    check(d == 32'(et.size() + 3), $sformatf("run 2 count %0d", d));
    for (int i = 0; i < et.size(); i++) begin
      read_record(i, t, c);
      if (i == 0) tprev = t - et[0];
      check(c == ec[i] && (t - et[i]) - tprev <= LSB + 0.004 && tprev - (t - et[i]) <= LSB + 0.004,
            $sformatf("run 2 record %0d: ch %0d/%0d offset %0.3f/%0.3f", i, c, ec[i], t - et[i], tprev));
      n_records_checked++;
    end
    read_record(et.size(), t, c);
    check(c == 9, "extra pulse channel");
    read_record(et.size() + 1, t, c);
    check(c == 10, "pulse before the disarmed one");
    read_record(et.size() + 2, t, c);
    check(c == 7, "lower channel kept on a double pulse");

    // ---- run 3: a word inside the Time Master dead time stalls the pattern ----
    pt = '{40, 50, 56, 70};
    pv = '{10, 20, 30, 40};
    pc = '{1, 2, 3, 4};
    load_pattern();
    hwrite(REG_CTRL, 1, 32'h1, t_dummy);
    n_kbd_start++;
    repeat (300) @(negedge clk);
    hread(REG_CTRL, 2, d);
    check(d[0] == 1 && d[30:16] == 15'd2, "stalled on the word inside the dead time");
    hread(REG_CTRL, 3, d);
    check(d == 2, "two pulses before the stall");
    if (d == 2) n_tm_dead_stall++;
    hwrite(REG_CTRL, 1, 32'h2, t_dummy);
    hread(REG_CTRL, 2, d);
    check(d[1:0] == 2'b00, "stop command halts both sections");
    n_stop++;

    // ---- every mechanism must have happened ----
    check(n_kbd_start > 0, "keyboard start");
    check(n_ext_start > 0, "external start");
    check(n_min_sep > 0, "minimum separation");
    check(n_unbuilt_ch > 0, "unbuilt channel");
    check(n_pat_end > 0, "pattern end");
    check(n_tm_dead_stall > 0, "Time Master dead-time stall");
    check(n_stop > 0, "stop");
    check(n_tof_full > 0, "TOF full");
    check(n_tof_overflow_drop > 0, "TOF overflow drop");
    check(n_tof_dead_drop > 0, "TOF dead-time drop");
    check(n_tof_priority > 0, "TOF priority");
    check(n_tof_unarmed_drop > 0, "TOF drop of a pulse that found the converter disarmed");
    $display("mechanisms: kbd start %0d, ext start %0d, min separation %0d, unbuilt channel %0d,",
             n_kbd_start, n_ext_start, n_min_sep, n_unbuilt_ch);
    $display("  pattern end %0d, TM dead-time stall %0d, stop %0d, TOF full %0d, overflow drop %0d,",
             n_pat_end, n_tm_dead_stall, n_stop, n_tof_full, n_tof_overflow_drop);
    $display("  TOF dead-time drop %0d, TOF disarmed drop %0d, TOF priority %0d, records checked %0d",
             n_tof_dead_drop, n_tof_unarmed_drop, n_tof_priority, n_records_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
