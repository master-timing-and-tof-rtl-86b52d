// master_timing_tof: Master Timing and TOF module, top level.
//
// One 50 MHz clock drives a free-running 24-bit counter whose Gray code is the
// time base of two sections:
//  * the Time Master plays a pattern of pulses, written by the PC, on NCH
//    output channels: each pulse at a chosen clock count plus a fine delay of
//    1/256 clock period steps made by an external programmable delay;
//  * the TOF section stamps pulses arriving on NCH inputs with the Gray-coded
//    clock count, the channel number and the 8-bit code of an external
//    time-to-amplitude converter and flash ADC, and keeps them for the PC.
// Looping the outputs back into the inputs calibrates the TOF vernier.
//
// The analog parts stay outside and connect through ports: the programmable
// delay (`tm_vern_trig`, `tm_vern_code` out, `tm_vern_pulse` back in), the
// converter and ADC (`tof_tac_arm` out, `tof_adc_data` in) and the NIM/TTL
// output drivers (`tm_out`). The PC bus is described in host_interface. A start
// comes from the PC command register or from a rising edge on `ext_start`;
// it clears the clock counter and MEM ADD and arms both sections.
module master_timing_tof
  import mtt_pkg::*;
(
  input  logic               clk,           // 50 MHz
  input  logic               rst_n,
  // PC bus
  input  logic               host_req,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata,
  output logic               host_rvalid,
  // external start pulse
  input  logic               ext_start,
  // Time Master: programmable delay and outputs
  output logic               tm_vern_trig,
  output logic [VER_W-1:0]   tm_vern_code,
  input  logic               tm_vern_pulse,
  output logic [NCH-1:0]     tm_out,
  // TOF: inputs and vernier
  input  logic [NCH-1:0]     tof_in,
  output logic               tof_tac_arm,
  input  logic [VER_W-1:0]   tof_adc_data
);

  logic [CLK_W-1:0]  count_bin, count_gray;
  logic              start, cmd_start, cmd_stop;
  logic              pat_we, ver_we, chid_we;
  logic [ADDR_W-1:0] mem_addr, tm_mem_add;
  logic [CLK_W-1:0]  mem_wdata, tof_time_rdata;
  logic [CHID_W-1:0] tof_chid_rdata;
  logic [VER_W-1:0]  tof_ver_rdata;
  logic [ADDR_W:0]   pat_len, tof_count;
  logic              tm_running, tof_running, tof_full;

  start_control u_start (
    .clk, .rst_n, .cmd_start, .ext_start, .start);

  clock_counter #(.WIDTH(CLK_W)) u_clock (
    .clk, .rst_n, .clear(start), .count(count_bin));

  bin2gray #(.WIDTH(CLK_W)) u_gray (
    .bin(count_bin), .gray(count_gray));

  host_interface u_host (
    .clk, .rst_n,
    .host_req, .host_we, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .pat_we, .ver_we, .chid_we, .mem_addr, .mem_wdata,
    .tof_time_rdata, .tof_chid_rdata, .tof_ver_rdata,
    .pat_len, .cmd_start, .cmd_stop,
    .tm_running, .tof_running, .tof_full, .tm_mem_add, .tof_count);

  time_master u_tm (
    .clk, .rst_n, .start, .stop(cmd_stop), .pat_len,
    .clock_gray(count_gray),
    .pat_we, .ver_we, .chid_we, .host_waddr(mem_addr), .host_wdata(mem_wdata),
    .vern_trig(tm_vern_trig), .vern_code(tm_vern_code),
    .vern_pulse(tm_vern_pulse), .ch_out(tm_out),
    .running(tm_running), .mem_add(tm_mem_add));

  time_of_flight u_tof (
    .clk, .rst_n, .start, .stop(cmd_stop),
    .clock_gray(count_gray), .pulse_in(tof_in),
    .tac_arm(tof_tac_arm), .adc_data(tof_adc_data),
    .host_raddr(mem_addr),
    .time_rdata(tof_time_rdata), .chid_rdata(tof_chid_rdata),
    .ver_rdata(tof_ver_rdata),
    .count(tof_count), .running(tof_running), .full(tof_full));

endmodule
