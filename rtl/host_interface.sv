// host_interface: the PC port of the module.
//
// The original design says only that the memories are loaded and read by a PC and
// that a run can be started from the keyboard; the bus and its address map are
// this design's own. The PC sees a simple synchronous bus: one request per
// clock (`host_req`), a write when `host_we` is high, an 18-bit address whose
// top three bits select a region (see mtt_pkg::region_e) and whose low 15 bits
// are the word address, and 32-bit data.
//
//   PAT / VER / CHID MEM      write only, low 24 / 8 / 8 bits of the data
//   TOF TIME / CHID / VER MEM read only
//   CTRL word 0 (PATLEN)      read/write, pattern length in words (0..32768)
//   CTRL word 1 (CMD)         write: bit 0 start, bit 1 stop
//   CTRL word 2 (STATUS)      read: bit 0 Time Master running, bit 1 TOF
//                             running, bit 2 TOF memory full, bits 30:16 MEM ADD
//   CTRL word 3 (TOFCNT)      read: number of TOF records
//
// Timing: writes and commands act on the clock edge of the request (a command
// is a one-clock pulse in the following cycle). Read data come with
// `host_rvalid` one clock after the request, because the TOF memories have a
// registered read.
module host_interface
  import mtt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // PC bus
  input  logic               host_req,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata,
  output logic               host_rvalid,
  // Time Master memory write port
  output logic               pat_we,
  output logic               ver_we,
  output logic               chid_we,
  output logic [ADDR_W-1:0]  mem_addr,
  output logic [CLK_W-1:0]   mem_wdata,
  // TOF memory read data (address is mem_addr)
  input  logic [CLK_W-1:0]   tof_time_rdata,
  input  logic [CHID_W-1:0]  tof_chid_rdata,
  input  logic [VER_W-1:0]   tof_ver_rdata,
  // control and status
  output logic [ADDR_W:0]    pat_len,
  output logic               cmd_start,
  output logic               cmd_stop,
  input  logic               tm_running,
  input  logic               tof_running,
  input  logic               tof_full,
  input  logic [ADDR_W-1:0]  tm_mem_add,
  input  logic [ADDR_W:0]    tof_count
);

  region_e           region, rd_region;
  logic              wr, rd;
  logic [HOST_DW-1:0] ctrl_rdata;

  always_comb begin
    region    = region_e'(host_addr[HOST_AW-1 -: 3]);
    mem_addr  = host_addr[ADDR_W-1:0];
    mem_wdata = host_wdata[CLK_W-1:0];
    wr        = host_req && host_we;
    rd        = host_req && !host_we;
    pat_we    = wr && region == REG_PAT;
    ver_we    = wr && region == REG_VER;
    chid_we   = wr && region == REG_CHID;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_len     <= '0;
      cmd_start   <= 1'b0;
      cmd_stop    <= 1'b0;
      host_rvalid <= 1'b0;
      rd_region   <= REG_PAT;
      ctrl_rdata  <= '0;
    end else begin
      cmd_start   <= 1'b0;
      cmd_stop    <= 1'b0;
      host_rvalid <= rd;
      if (wr && region == REG_CTRL) begin
        if (mem_addr == CTRL_PATLEN) pat_len <= host_wdata[ADDR_W:0];
        if (mem_addr == CTRL_CMD) begin
          cmd_start <= host_wdata[0];
          cmd_stop  <= host_wdata[1];
        end
      end
      if (rd) begin
        rd_region <= region;
        unique case (mem_addr)
          CTRL_PATLEN: ctrl_rdata <= HOST_DW'(pat_len);
          CTRL_STATUS: ctrl_rdata <= {1'b0, tm_mem_add, 13'b0,
                                      tof_full, tof_running, tm_running};
          CTRL_TOFCNT: ctrl_rdata <= HOST_DW'(tof_count);
          default:     ctrl_rdata <= '0;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_region)
      REG_TOF_TIME: host_rdata = HOST_DW'(tof_time_rdata);
      REG_TOF_CHID: host_rdata = HOST_DW'(tof_chid_rdata);
      REG_TOF_VER:  host_rdata = HOST_DW'(tof_ver_rdata);
      REG_CTRL:     host_rdata = ctrl_rdata;
      default:      host_rdata = '0;
    endcase
  end

endmodule
