// tb_time_master: plays patterns through the Time Master with a model of the
// programmable delay and checks, for every pulse, the trigger clock, the
// vernier code, the output channel and the fine time of the output pulse.
// Also checks the minimum separation of 7 clocks (140 ns), a word lost in the
// dead time, a channel number outside the 16 built, the end of a pattern and
// the stop command, and that words 6 clocks apart are not played. The clock
// counter is modelled in the testbench.
`timescale 1ns/1ps
module tb_time_master;
  localparam real T = 20.0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [15:0] pat_len = 0;
  logic [23:0] tcount = 0, clock_gray;
  logic pat_we = 0, ver_we = 0, chid_we = 0;
  logic [14:0] host_waddr = 0;
  logic [23:0] host_wdata = 0;
  logic vern_trig, vern_pulse, running;
  logic [7:0] vern_code;
  logic [15:0] ch_out;
  logic [14:0] mem_add;
  int checks = 0, failures = 0;
  real t0;

  // pattern under test
  int unsigned pt[$], pv[$], pc[$];
  int ntrig = 0, nout = 0;

  always #(T/2) clk = ~clk;

  // reference clock counter, cleared by start
  always_ff @(posedge clk) begin
    if (start) begin tcount <= 0; t0 = $realtime; end
    else tcount <= tcount + 1;
  end
  assign clock_gray = tcount ^ (tcount >> 1);

  time_master u_dut (.clk, .rst_n, .start, .stop, .pat_len, .clock_gray,
    .pat_we, .ver_we, .chid_we, .host_waddr, .host_wdata,
    .vern_trig, .vern_code, .vern_pulse, .ch_out, .running, .mem_add);

  ad9500_model #(.T_CLK_NS(T), .OFFSET_NS(2.0)) u_delay (
    .trig(vern_trig), .code(vern_code), .pulse(vern_pulse));

  // check every trigger against the pattern
  real t_trig;
  always @(posedge vern_trig) begin
    t_trig = $realtime;
    checks++;
    if (ntrig >= pt.size()) begin
      failures++; $display("unexpected trigger at %0t", $realtime);
    end else begin
      automatic real exp_t = t0 + (pt[ntrig] + 1) * T;
      if (!(t_trig - exp_t < 0.01 && exp_t - t_trig < 0.01) || vern_code !== 8'(pv[ntrig])) begin
        failures++;
        $display("trigger %0d at %0.3f exp %0.3f code %0d exp %0d", ntrig, t_trig, exp_t, vern_code, pv[ntrig]);
      end
    end
    ntrig++;
  end

  // check every output pulse: channel and fine delay
  always @(posedge vern_pulse) begin
    automatic int k = ntrig - 1;
    #0.001;
    checks++;
    if (k < 0 || k >= pt.size()) begin
      failures++;
    end else begin
      automatic real exp_t = t0 + (pt[k] + 1) * T + 2.0 + pv[k] * T / 256.0;
      automatic logic [15:0] exp_out = (pc[k] < 16) ? (16'd1 << pc[k]) : 16'd0;
      if (ch_out !== exp_out || !($realtime - 0.001 - exp_t < 0.01 && exp_t - $realtime + 0.001 < 0.01)) begin
        failures++;
        $display("pulse %0d at %0.3f exp %0.3f out %h exp %h", k, $realtime, exp_t, ch_out, exp_out);
      end
      if (ch_out != 0) nout++;
    end
  end

  task automatic load(int unsigned a, int unsigned t, int unsigned v, int unsigned c);
    @(negedge clk);
    host_waddr = 15'(a);
    host_wdata = 24'(t) ^ (24'(t) >> 1); pat_we = 1; @(negedge clk); pat_we = 0;
    host_wdata = 24'(v); ver_we = 1;  @(negedge clk); ver_we = 0;
    host_wdata = 24'(c); chid_we = 1; @(negedge clk); chid_we = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // run 1: separations of 10, 7 (the minimum), 63 and more clocks
    pt = '{20, 30, 37, 100, 250, 257, 600};
    pv = '{0, 128, 255, 1, 77, 200, 33};
    pc = '{0, 5, 15, 3, 20, 9, 12};      // 20 is outside the 16 channels
    foreach (pt[i]) load(i, pt[i], pv[i], pc[i]);
    pat_len = 16'(pt.size());
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    checks++; if (!running) begin failures++; $display("not running"); end
    wait (!running);
    repeat (20) @(negedge clk);
    checks++;
    if (ntrig != 7 || nout != 6 || mem_add != 15'd7) begin
      failures++; $display("run 1: %0d triggers, %0d outputs, mem_add %0d", ntrig, nout, mem_add);
    end
    // run 2: third word is 6 clocks after the second, inside the dead time,
    // so it and all after it wait for the counter to wrap; stop ends the run
    pt = '{40, 50, 56, 70};
    pv = '{10, 20, 30, 40};
    pc = '{1, 2, 3, 4};
    foreach (pt[i]) load(i, pt[i], pv[i], pc[i]);
    pat_len = 16'(pt.size());
    pt = pt[0:1];                        // only the first two may fire
    ntrig = 0; nout = 0;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (ntrig != 2 || !running || mem_add != 15'd2) begin
      failures++; $display("run 2: %0d triggers, running %b", ntrig, running);
    end
    stop = 1; @(negedge clk) stop = 0;
    checks++;
    if (running) begin failures++; $display("stop ignored"); end
    // run 3: twelve words 6 clocks apart; only the first may fire
    for (int i = 0; i < 12; i++) load(i, 30 + 6 * i, i, i);
    pat_len = 16'd12;
    pt = '{30}; pv = '{0}; pc = '{0};
    ntrig = 0; nout = 0;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    repeat (150) @(negedge clk);
    checks++;
    if (ntrig != 1 || mem_add != 15'd1) begin
      failures++; $display("run 3: %0d triggers, mem_add %0d", ntrig, mem_add);
    end
    stop = 1; @(negedge clk) stop = 0;
    // run 4: zero length does not start
    pat_len = 0;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    checks++;
    if (running) begin failures++; $display("empty pattern started"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
