// tb_host_interface: checks the PC bus decoding: memory write strobes with
// address and data, the pattern length register, the start and stop command
// pulses, reads of the three TOF memories (one clock latency) and of the
// status and count registers.
`timescale 1ns/1ps
module tb_host_interface;
  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0;
  logic [17:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic host_rvalid;
  logic pat_we, ver_we, chid_we;
  logic [14:0] mem_addr;
  logic [23:0] mem_wdata;
  logic [23:0] tof_time_rdata = 0;
  logic [7:0]  tof_chid_rdata = 0, tof_ver_rdata = 0;
  logic [15:0] pat_len;
  logic cmd_start, cmd_stop;
  logic tm_running = 0, tof_running = 0, tof_full = 0;
  logic [14:0] tm_mem_add = 0;
  logic [15:0] tof_count = 0;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  host_interface u_dut (.*);

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(logic [2:0] region, logic [14:0] a, logic [31:0] d,
                       logic exp_pat, logic exp_ver, logic exp_chid);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = {region, a}; host_wdata = d;
    #1;
    expect_true(pat_we == exp_pat && ver_we == exp_ver && chid_we == exp_chid &&
                (!(exp_pat || exp_ver || exp_chid) ||
                 (mem_addr == a && mem_wdata == d[23:0])), "write strobe");
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  task automatic read(logic [2:0] region, logic [14:0] a, output logic [31:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = {region, a};
    #1 expect_true(!pat_we && !ver_we && !chid_we, "no write on read");
    @(negedge clk); host_req = 0;
    expect_true(host_rvalid, "rvalid");
    d = host_rdata;
  endtask

  // the TOF memories answer one clock after their address, like dp_ram
  always_ff @(posedge clk) begin
    tof_time_rdata <= {9'h1a5, mem_addr};
    tof_chid_rdata <= mem_addr[7:0] ^ 8'h3c;
    tof_ver_rdata  <= mem_addr[14:7];
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    automatic int nstart = 0, nstop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      automatic logic [14:0] a = 15'($urandom);
      automatic logic [31:0] w = $urandom;
      write(3'd0, a, w, 1, 0, 0);
      write(3'd1, a, w, 0, 1, 0);
      write(3'd2, a, w, 0, 0, 1);
      write(3'd3, a, w, 0, 0, 0);   // read-only region: ignored
      read(3'd3, a, d); expect_true(d == {8'd0, 9'h1a5, a}, "tof time read");
      read(3'd4, a, d); expect_true(d == {24'd0, a[7:0] ^ 8'h3c}, "tof chid read");
      read(3'd5, a, d); expect_true(d == {24'd0, a[14:7]}, "tof ver read");
    end
    write(3'd6, 15'd0, 32'd1234, 0, 0, 0);
    expect_true(pat_len == 16'd1234, "pattern length");
    read(3'd6, 15'd0, d); expect_true(d == 32'd1234, "pattern length read");
    // command pulses
    fork
      begin
        write(3'd6, 15'd1, 32'd1, 0, 0, 0);
        write(3'd6, 15'd1, 32'd2, 0, 0, 0);
        write(3'd6, 15'd1, 32'd0, 0, 0, 0);
        repeat (2) @(negedge clk);
      end
      begin
        repeat (12) begin
          @(posedge clk); #1;
          if (cmd_start) nstart++;
          if (cmd_stop) nstop++;
        end
      end
    join
    expect_true(nstart == 1 && nstop == 1, "one start and one stop pulse");
    tm_running = 1; tof_full = 1; tm_mem_add = 15'd321; tof_count = 16'd32768;
    read(3'd6, 15'd2, d);
    expect_true(d == {1'b0, 15'd321, 13'd0, 1'b1, 1'b0, 1'b1}, "status read");
    read(3'd6, 15'd3, d);
    expect_true(d == 32'd32768, "tof count read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
