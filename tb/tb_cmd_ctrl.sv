// tb_cmd_ctrl -- self-checking test of cmd_ctrl (core build). Commands are
// handed over as decoded frames; the engines are played by the testbench;
// an SRAM model serves the cmd 10 dump; reply bytes are taken with a random
// ready. Every reply is compared byte by byte with a frame built here from
// the command list's formats, and the control outputs, engine start
// arguments and the cmd 10 copy to address 0 are checked.
module tb_cmd_ctrl;
  import sc_pkg::*;
  localparam int AW = 12, NS = 10;
  logic clk = 0, rst_n = 0;
  frame_t frame;
  logic frame_done = 0, wdt_timeout = 0, busy;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready = 0;
  sram_req_t req;
  logic [7:0] rdata;
  logic chk_start, chk_done = 0, fc_start, fc_to_flash, fc_sel, fc_done = 0;
  logic ts_start, ts_done = 0, v2_start, v2_done = 0;
  logic [23:0] chk_last_good = 0;
  logic [NS-1:0][15:0] temps = '0;
  logic [7:0] v2_aa, v2_bb;
  logic psu_ok_core = 1, psu_ok_seg = 0;
  logic vclk_en, clk_int_sel, pwr_shutdown;
  logic [23:0] start_ptr, stop_ptr;
  logic [7:0] rx_q [$];
  int checks = 0, failures = 0;
  int n_chk = 0, n_fc = 0, n_ts = 0, n_v2 = 0;

  cmd_ctrl #(.IS_CORE(1'b1), .VERSION(7'd17), .SRAM_AW(AW), .N_SENS(NS)) dut (
    .clk, .rst_n, .frame, .frame_done, .wdt_timeout, .busy, .tx_data, .tx_valid, .tx_ready,
    .sram_req(req), .sram_rdata(rdata), .chk_start, .chk_done, .chk_last_good,
    .fc_start, .fc_to_flash, .fc_sel, .fc_done, .ts_start, .ts_done, .temps,
    .v2_start, .v2_aa, .v2_bb, .v2_done, .psu_ok_core, .psu_ok_seg,
    .vclk_en, .clk_int_sel, .pwr_shutdown, .start_ptr, .stop_ptr);
  sram_model #(.AW(AW)) mem (.clk, .en(req.en), .we(req.we), .addr(req.addr[AW-1:0]),
                             .wdata(req.wdata), .rdata, .inject(1'b0), .inj_addr('0));

  always #5 clk = ~clk;
  // reply sink with random back-pressure
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) rx_q.push_back(tx_data);
    tx_ready <= ($urandom_range(0, 3) != 0);
  end
  // engines
  always @(posedge clk) if (rst_n) begin
    if (chk_start) begin n_chk++; fork begin repeat (20) @(posedge clk); chk_done <= 1; @(posedge clk); chk_done <= 0; end join_none end
    if (fc_start)  begin n_fc++;  fork begin repeat (30) @(posedge clk); fc_done  <= 1; @(posedge clk); fc_done  <= 0; end join_none end
    if (ts_start)  begin n_ts++;  fork begin repeat (25) @(posedge clk); ts_done  <= 1; @(posedge clk); ts_done  <= 0; end join_none end
    if (v2_start)  begin n_v2++;  fork begin repeat (40) @(posedge clk); v2_done  <= 1; @(posedge clk); v2_done  <= 0; end join_none end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue a command and wait until it has finished
  task automatic cmd(input frame_type_e t, input logic [7:0] c, input logic [7:0] p0 = 0,
                     input logic [7:0] p1 = 0, input logic [7:0] p2 = 0, input logic [7:0] p3 = 0,
                     input logic [7:0] p4 = 0, input logic [7:0] p5 = 0);
    @(posedge clk);
    frame.ftype <= t;
    frame.len   <= 24'd8;
    frame.cmd   <= c;
    frame.p     <= {p5, p4, p3, p2, p1, p0};
    frame_done  <= 1'b1;
    @(posedge clk);
    frame_done <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  // compare the collected reply with header + payload
  task automatic expect_reply(input string what, input logic [7:0] c, input logic [7:0] pl [$]);
    logic [7:0] e [$];
    int n = pl.size() + 2;
    e = {8'h40, 8'(n >> 16), 8'(n >> 8), 8'(n), 8'h4C, c};
    e = {e, pl};
    checks++;
    if (rx_q != e) begin
      failures++;
      $display("FAIL: %s reply (%0d bytes, expected %0d)", what, rx_q.size(), e.size());
      foreach (rx_q[i]) $write("%02h ", rx_q[i]);
      $display("");
    end
    rx_q = {};
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame = '0;
    for (int a = 0; a < 2**AW; a++) mem.mem[a] = 8'(a ^ (a >> 8) ^ 8'h3C);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    check("power-up defaults", !vclk_en && !clk_int_sel && !pwr_shutdown);

    // cmd 12 / 13: stop = 0x00010F, start = 0x000100
    cmd(FT_LW, CMD_SET_PTR, 8'h00, 8'h01, 8'h0F, 8'h00, 8'h01, 8'h00);
    check("cmd 12 no reply", rx_q.size() == 0);
    check("pointers", start_ptr == 24'h000100 && stop_ptr == 24'h00010F);
    cmd(FT_SR, CMD_GET_PTR);
    expect_reply("cmd 13", 8'h0D, '{8'h00, 8'h01, 8'h0F, 8'h00, 8'h01, 8'h00});

    // cmd 10: dump 0x100..0x10F, copied to 0..15
    begin
      logic [7:0] exp [$];
      for (int a = 'h100; a <= 'h10F; a++) exp.push_back(mem.mem[a]);
      cmd(FT_SR, CMD_DUMP_SRAM);
      expect_reply("cmd 10", 8'h0A, exp);
      for (int i = 0; i < 16; i++) check($sformatf("cmd 10 copy %0d", i), mem.mem[i] == exp[i]);
    end

    // cmd 17, 40, 20 (core only)
    cmd(FT_NW, CMD_VCLK_EN, 8'h01);
    check("cmd 17 enables ADC clock", vclk_en);
    cmd(FT_NW, CMD_CLK_SEL, 8'h01);
    check("cmd 40 selects internal clock", clk_int_sel);
    cmd(FT_NW, CMD_POWER, 8'h05);
    check("cmd 20 d3 low keeps power", !pwr_shutdown);

    // three watchdog timeouts, then cmd 14 twice
    repeat (3) begin
      @(posedge clk) wdt_timeout <= 1'b1;
      @(posedge clk) wdt_timeout <= 1'b0;
    end
    cmd(FT_SR, CMD_STATUS);
    // reg0: bit0 vclk, bit1 internal clock, bit2 core PSU, bit3 segment PSU
    expect_reply("cmd 14", 8'h0E, '{8'h07, 8'h03, 8'h03, 8'h50, 8'h03, 8'h91});
    psu_ok_seg = 1'b1;
    cmd(FT_SR, CMD_STATUS);
    expect_reply("cmd 14 after clear", 8'h0E, '{8'h0F, 8'h00, 8'h00, 8'h50, 8'h00, 8'h91});
    cmd(FT_NW, CMD_VCLK_EN, 8'h00);
    check("cmd 17 disables ADC clock", !vclk_en);
    cmd(FT_NW, CMD_POWER, 8'h08);
    check("cmd 20 d3 shuts down", pwr_shutdown);

    // cmd 15
    chk_last_good = 24'h1FFFFF;
    cmd(FT_SR, CMD_MEM_CHECK);
    check("cmd 15 started check", n_chk == 1);
    expect_reply("cmd 15", 8'h0F, '{8'h1F, 8'hFF, 8'hFF});

    // cmd 19
    begin
      logic [7:0] exp [$];
      for (int i = 0; i < NS; i++) begin
        temps[i] = 16'($urandom);
        exp.push_back(temps[i][15:8]);
        exp.push_back(temps[i][7:0]);
      end
      cmd(FT_SR, CMD_TEMP);
      check("cmd 19 started readout", n_ts == 1);
      expect_reply("cmd 19", 8'h13, exp);
    end

    // cmd 16, cmd 11, cmd 18
    cmd(FT_NW, CMD_LOAD_SRAM, 8'h01);
    check("cmd 16 flash 1 -> sram", n_fc == 1 && !fc_to_flash && fc_sel);
    cmd(FT_NW, CMD_PROG_FLASH, 8'h00);
    check("cmd 11 sram -> flash 0", n_fc == 2 && fc_to_flash && !fc_sel);
    cmd(FT_NW, CMD_V2P_LOAD, 8'h05, 8'h32);
    check("cmd 18 arguments", n_v2 == 1 && v2_aa == 8'h05 && v2_bb == 8'h32);
    check("NW commands send nothing", rx_q.size() == 0);

    // cmd 9 and unknown commands do nothing
    cmd(FT_LW, CMD_STORE_SRAM);
    cmd(FT_SR, 8'h55);
    check("cmd 9 / unknown: no reply", rx_q.size() == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
