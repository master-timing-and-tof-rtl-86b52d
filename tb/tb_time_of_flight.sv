// tb_time_of_flight: sends timing pulses at random fine times on random
// channels to the TOF recorder, with an ideal model of its vernier, reads the
// three memories back and checks that every record rebuilds the pulse time to
// within one vernier step (1/256 clock) and carries the right channel. Also
// checks the dead time (a pulse 3 clocks after another is ignored), two pulses
// on the same clock (the lower channel is kept), the stop command and the
// memory-full stop after all 32768 words. The clock counter is modelled here.
`timescale 1ns/1ps
module tb_time_of_flight;
  localparam real T = 20.0;
  localparam int  DEPTH = 32768;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [23:0] tcount = 0, clock_gray;
  logic [15:0] pulse_in = 0;
  logic tac_arm, running, full;
  logic [7:0] adc_data;
  logic [14:0] host_raddr = 0;
  logic [23:0] time_rdata;
  logic [7:0] chid_rdata, ver_rdata;
  logic [15:0] count;
  int checks = 0, failures = 0;
  real t0;
  real exp_t[$];
  int  exp_c[$];
  int  n_dead = 0, n_double = 0;

  always #(T/2) clk = ~clk;

  always_ff @(posedge clk) begin
    if (start) begin tcount <= 0; t0 = $realtime; end
    else tcount <= tcount + 1;
  end
  assign clock_gray = tcount ^ (tcount >> 1);

  time_of_flight u_dut (.clk, .rst_n, .start, .stop, .clock_gray, .pulse_in,
    .tac_arm, .adc_data, .host_raddr, .time_rdata, .chid_rdata, .ver_rdata,
    .count, .running, .full);

  tof_vernier_model #(.NCH(16), .T_CLK_NS(T)) u_vern (
    .clk, .arm(tac_arm), .pulse_in, .adc(adc_data));

  function automatic int unsigned gray2bin(logic [23:0] g);
    logic [23:0] b;
    b[23] = g[23];
    for (int i = 22; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return {8'd0, b};
  endfunction

  // one pulse on channel c at a random point between two clock edges;
  // an optional second channel fires at the same moment
  task automatic fire(int c, int c2 = -1);
    real off = 0.5 + real'($urandom_range(0, 18900)) / 1000.0;
    @(posedge clk); #(off);
    pulse_in[c] = 1;
    if (c2 >= 0) pulse_in[c2] = 1;
    exp_t.push_back($realtime);
    exp_c.push_back((c2 >= 0 && c2 < c) ? c2 : c);
    #5 pulse_in = '0;
  endtask

  task automatic check_records(int first, int n);
    for (int i = first; i < first + n; i++) begin
      real t_rec;
      @(negedge clk) host_raddr = 15'(i);
      @(negedge clk);
      t_rec = t0 + (real'(gray2bin(time_rdata)) - 1.0) * T - real'(ver_rdata) * T / 256.0;
      checks++;
      if (chid_rdata !== 8'(exp_c[i]) || t_rec < exp_t[i] - 0.002 ||
          t_rec > exp_t[i] + T / 256.0 + 0.002) begin
        failures++;
        if (failures < 10)
          $display("record %0d: ch %0d exp %0d, t %0.3f exp %0.3f (v=%0d)", i,
                   chid_rdata, exp_c[i], t_rec, exp_t[i], ver_rdata);
      end
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    // ordinary pulses, dead-time pulses and double pulses
    for (int i = 0; i < 300; i++) begin
      fire(int'($urandom_range(0, 15)));
      if (i % 10 == 3) begin
        repeat (2) @(posedge clk);
        #3 pulse_in[7] = 1; #5 pulse_in = '0;   // inside the dead time: ignored
        n_dead++;
      end
      repeat ($urandom_range(9, 30)) @(posedge clk);
      if (i % 10 == 5) begin
        fire(int'($urandom_range(8, 15)), int'($urandom_range(0, 7)));
        n_double++;
        repeat (10) @(posedge clk);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (count != 16'(exp_t.size())) begin
      failures++; $display("count %0d exp %0d", count, exp_t.size());
    end
    check_records(0, exp_t.size());
    // stop: nothing more is recorded
    @(negedge clk) stop = 1; @(negedge clk) stop = 0;
    fire(1); void'(exp_t.pop_back()); void'(exp_c.pop_back());
    repeat (10) @(posedge clk);
    checks++;
    if (count != 16'(exp_t.size()) || running) begin
      failures++; $display("recorded after stop");
    end
    // fill the memory completely: the recorder stops and flags full
    exp_t.delete(); exp_c.delete();
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    for (int i = 0; i < DEPTH + 5; i++) begin
      fire(i % 16);
      repeat (8) @(posedge clk);
    end
    checks++;
    if (!full || count != 16'(DEPTH)) begin
      failures++; $display("full=%b count=%0d", full, count);
    end
    check_records(0, 200);
    check_records(DEPTH - 200, 200);
    $display("dead-time pulses %0d, double pulses %0d", n_dead, n_double);
    $display("TB_RESULT checks=%0d failures=%0d",
             checks, failures);
    $finish;
  end
endmodule
