// time_of_flight: the TOF time recorder.
//
// Up to NCH timing pulses come in on `pulse_in`. For each accepted pulse the
// section stores three words at the next address of its memories: the 24-bit
// Gray-coded clock count in TOF TIME MEM, the channel number in TOF CHID MEM and
// the 8-bit vernier in TOF VER MEM. The vernier is an external time-to-amplitude
// converter read by a flash ADC: it measures the time from the pulse to the
// second clock edge after it (the "following clock pulse plus one"), and its
// 8-bit code arrives on `adc_data` before the recorder stores it.
//
// Reconstructing a time: with N the stored count (in binary) and v the vernier
// code, the pulse came (N - 1) - v/256 clock periods after the clock edge at
// which the counter read 0, when the converter is ideal (v = 0 for exactly one
// period to the stop edge, 255 for just under two). The calibration that maps v
// to true time (the integral of the vernier histogram) is made by the PC.
//
// After a pulse the recorder ignores inputs for DEAD_P clocks while the converter
// is reset; `tac_arm` tells the converter when it may accept a pulse. A pulse is
// seen two clocks after it arrives, so the recorder keeps a two-clock history of
// `tac_arm` and stores a pulse only if the converter was armed when it arrived;
// otherwise it would store the code of an earlier conversion. A pulse that
// arrives while the converter is still busy with the previous one (up to two
// clocks after it) falls inside the dead time and is ignored too. The original
// design gives no TOF dead time; 4 clocks (80 ns) are used, short enough that
// pulses from the Time Master at its minimum separation of 7 clocks all reach
// an armed converter, since a pulse is stored about 3 clocks after it arrives.
//
// A start clears the write address and arms the recorder; a stop disarms it;
// when all DEPTH words are used the recorder stops and sets `full`. The PC reads the
// three memories through `host_raddr` (one cycle read latency).
//
// Timing: the words are written on the clock edge after the stop edge of the
// converter, i.e. at clock edge k+2 for a pulse between edges k-1 and k; the
// stored count is the counter value after edge k+1.
module time_of_flight
  import mtt_pkg::*;
#(
  parameter int unsigned NCH_P   = NCH,
  parameter int unsigned DEPTH_P = DEPTH,
  parameter int unsigned DEAD_P  = TOF_DEAD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,
  input  logic [CLK_W-1:0]  clock_gray,
  input  logic [NCH_P-1:0]  pulse_in,
  output logic              tac_arm,     // vernier may accept a pulse
  input  logic [VER_W-1:0]  adc_data,    // flash ADC code of the vernier
  input  logic [ADDR_W-1:0] host_raddr,
  output logic [CLK_W-1:0]  time_rdata,
  output logic [CHID_W-1:0] chid_rdata,
  output logic [VER_W-1:0]  ver_rdata,
  output logic [ADDR_W:0]   count,       // words recorded since start
  output logic              running,
  output logic              full
);

  logic              hit, accept;
  logic [CHID_W-1:0] hit_chid;
  logic [3:0]        dcnt;
  logic [1:0]        arm_hist;   // tac_arm one and two clocks ago
  logic [ADDR_W-1:0] waddr;

  tof_channel_encoder #(.NCH(NCH_P), .CHID_W(CHID_W)) u_enc (
    .clk, .rst_n, .pulse_in, .hit, .chid(hit_chid));

  always_comb begin
    full    = (count == (ADDR_W+1)'(DEPTH_P));
    tac_arm = running && !full && (dcnt == '0);
    // the converter took the pulse only if it was armed when the pulse came,
    // two clocks before the hit is seen
    accept  = hit && tac_arm && arm_hist[1];
    waddr   = count[ADDR_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      count    <= '0;
      dcnt     <= '0;
      arm_hist <= '0;
    end else if (start) begin
      running  <= 1'b1;
      count    <= '0;
      dcnt     <= '0;
      arm_hist <= '0;
    end else if (stop) begin
      running  <= 1'b0;
      arm_hist <= '0;
    end else begin
      arm_hist <= {arm_hist[0], tac_arm};
      if (accept) begin
        count <= count + 1'b1;
        dcnt  <= 4'(DEAD_P - 1);
      end else if (dcnt != '0) begin
        dcnt  <= dcnt - 1'b1;
      end
    end
  end

  dp_ram #(.WIDTH(CLK_W), .DEPTH(DEPTH_P), .ADDR_W(ADDR_W)) u_time_mem (
    .clk, .we(accept), .waddr, .wdata(clock_gray),
    .raddr(host_raddr), .rdata(time_rdata));
  dp_ram #(.WIDTH(CHID_W), .DEPTH(DEPTH_P), .ADDR_W(ADDR_W)) u_chid_mem (
    .clk, .we(accept), .waddr, .wdata(hit_chid),
    .raddr(host_raddr), .rdata(chid_rdata));
  dp_ram #(.WIDTH(VER_W), .DEPTH(DEPTH_P), .ADDR_W(ADDR_W)) u_ver_mem (
    .clk, .we(accept), .waddr, .wdata(adc_data),
    .raddr(host_raddr), .rdata(ver_rdata));

  initial assert (DEAD_P >= 1 && DEAD_P <= 15 && DEPTH_P <= 2**ADDR_W)
    else $error("time_of_flight: parameter out of range");

endmodule
