// time_master: the Time Master pattern generator.
//
// The PC fills three memories at consecutive addresses: PAT MEM with the
// Gray-coded clock count at which each pulse is to be issued, VER MEM with its
// 8-bit fine delay (1/256 of a clock period per step) and CHID MEM with the
// output channel. After a start command the sequencer reads the word at MEM ADD
// into the pattern latch and lets the word comparator watch the Gray-coded
// running clock. When the two are equal it sends a one-clock trigger to the
// external programmable delay (the Time Master vernier), holds the word's
// vernier code and channel number for it, advances MEM ADD and fetches the next
// word. The delayed pulse comes back on `vern_pulse` and the 1-to-16 decoder
// steers it to the channel named by CHID MEM.
//
// After a trigger the comparator is blind long enough that the next trigger
// comes at least DEAD_P clocks later: the original module's 140 ns minimum
// pulse separation (7 clocks at 50 MHz). A pattern word that falls inside the
// dead time is only met again when the 24-bit clock wraps.
//
// The original design does not say how a pattern ends: here the sequencer
// stops after `pat_len` words (a host register), and a stop command halts it
// at once. The fetch pipeline (one cycle of memory read, one of latch load) is this
// design's choice and fits inside the dead time.
//
// Timing: `vern_trig` rises on the clock edge after the one on which the clock
// counter takes the pattern value (i.e. one clock after the counter value is
// shown). `vern_code` and `chid` change on that same edge and stay until the next
// trigger.
module time_master
  import mtt_pkg::*;
#(
  parameter int unsigned NCH_P   = NCH,
  parameter int unsigned DEPTH_P = DEPTH,
  parameter int unsigned DEAD_P  = DEAD
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,       // one-cycle start pulse
  input  logic                stop,        // one-cycle stop pulse
  input  logic [ADDR_W:0]     pat_len,     // number of pattern words to play
  input  logic [CLK_W-1:0]    clock_gray,  // Gray-coded running clock
  // PC write port of PAT, VER and CHID MEM
  input  logic                pat_we,
  input  logic                ver_we,
  input  logic                chid_we,
  input  logic [ADDR_W-1:0]   host_waddr,
  input  logic [CLK_W-1:0]    host_wdata,
  // programmable delay (Time Master vernier) and outputs
  output logic                vern_trig,   // trigger to the programmable delay
  output logic [VER_W-1:0]    vern_code,   // its delay code, held
  input  logic                vern_pulse,  // delayed pulse back from it
  output logic [NCH_P-1:0]    ch_out,      // output pulses per channel
  output logic                running,
  output logic [ADDR_W-1:0]   mem_add      // current MEM ADD
);

  typedef enum logic [2:0] {IDLE, FETCH, LOAD, ARMED, DEADT} tm_state_e;

  tm_state_e           state;
  logic [3:0]          dcnt;
  logic                done_after_dead;
  logic [CLK_W-1:0]    pat_rdata, pat_q;
  logic [VER_W-1:0]    ver_rdata, ver_q;
  logic [CHID_W-1:0]   chid_rdata, chid_q, chid_hold;
  logic                match, latch_load, last;

  // ---- memories ----------------------------------------------------------
  dp_ram #(.WIDTH(CLK_W), .DEPTH(DEPTH_P), .ADDR_W(ADDR_W)) u_pat_mem (
    .clk, .we(pat_we), .waddr(host_waddr), .wdata(host_wdata),
    .raddr(mem_add), .rdata(pat_rdata));
  dp_ram #(.WIDTH(VER_W), .DEPTH(DEPTH_P), .ADDR_W(ADDR_W)) u_ver_mem (
    .clk, .we(ver_we), .waddr(host_waddr), .wdata(host_wdata[VER_W-1:0]),
    .raddr(mem_add), .rdata(ver_rdata));
  dp_ram #(.WIDTH(CHID_W), .DEPTH(DEPTH_P), .ADDR_W(ADDR_W)) u_chid_mem (
    .clk, .we(chid_we), .waddr(host_waddr), .wdata(host_wdata[CHID_W-1:0]),
    .raddr(mem_add), .rdata(chid_rdata));

  // ---- pattern latch (pattern word with its vernier and channel words) ----
  word_latch #(.WIDTH(CLK_W + VER_W + CHID_W)) u_latch (
    .clk, .rst_n, .load(latch_load),
    .d({pat_rdata, ver_rdata, chid_rdata}),
    .q({pat_q, ver_q, chid_q}));

  // ---- comparator and address register -----------------------------------
  word_comparator #(.WIDTH(CLK_W)) u_cmp (
    .en(state == ARMED), .clock_gray, .pattern_gray(pat_q), .match);

  mem_add_reg #(.ADDR_W(ADDR_W)) u_mem_add (
    .clk, .rst_n, .clear(start), .inc(match), .len(pat_len),
    .addr(mem_add), .last);

  // The latch takes the memory word one cycle after the address is settled:
  // in LOAD after a start, and in the second dead-time cycle after a trigger.
  always_comb
    latch_load = (state == LOAD) ||
                 (state == DEADT && dcnt == 4'(DEAD_P - 3));

  // ---- sequencer -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= IDLE;
      dcnt            <= '0;
      done_after_dead <= 1'b0;
      vern_trig       <= 1'b0;
      vern_code       <= '0;
      chid_hold       <= '0;
    end else begin
      vern_trig <= 1'b0;
      if (stop) begin
        state <= IDLE;
      end else if (start) begin
        state <= (pat_len != '0) ? FETCH : IDLE;
      end else begin
        unique case (state)
          IDLE:  ;
          FETCH: state <= LOAD;
          LOAD:  state <= ARMED;
          ARMED: if (match) begin
                   vern_trig       <= 1'b1;
                   vern_code       <= ver_q;
                   chid_hold       <= chid_q;
                   done_after_dead <= last;
                   dcnt            <= 4'(DEAD_P - 2);
                   state           <= DEADT;
                 end
          DEADT: if (dcnt == '0) state <= done_after_dead ? IDLE : ARMED;
                 else            dcnt  <= dcnt - 1'b1;
          default: state <= IDLE;
        endcase
      end
    end
  end

  always_comb running = (state != IDLE);

  // ---- 1-to-NCH output decoder ------------------------------------------------
  channel_decoder #(.NCH(NCH_P), .CHID_W(CHID_W)) u_dec (
    .pulse(vern_pulse), .chid(chid_hold), .out(ch_out));

  // The dead time must cover the memory read and the latch load.
  initial assert (DEAD_P >= 3 && DEAD_P <= 15)
    else $error("time_master: DEAD_P must be between 3 and 15");

endmodule
