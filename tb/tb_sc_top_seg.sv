// tb_sc_top_seg -- end-to-end test of the segment build of sc_top
// (IS_CORE = 0) at reduced sizes. Checks that core frames are ignored, that
// the core-only commands 17, 20 and 40 have no effect, the segment header
// bytes (C0/D0) of every reply, the status bytes of a segment (reg0 bit 2
// clear, reg5 bit 7 clear), pointer write/read and dump with segment frames,
// the temperature reply and a serial load of all four ADC cards.
module tb_sc_top_seg;
  import sc_pkg::*;
  localparam int CPB = 8, AW = 12, NS = 10, NC = 4, WDT = 3000;
  localparam logic [23:0] FIRST = 24'h08, LAST = 24'h47;
  localparam int NB = LAST - FIRST + 1;

  logic clk = 0, rst_n = 0;
  logic uart_rx = 1, uart_tx;
  logic sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  logic [7:0] sram_wdata, sram_rdata;
  logic fl_req, fl_we, fl_sel, fl_ack;
  logic [23:0] fl_addr;
  logic [7:0] fl_wdata, fl_rdata;
  logic ts_sck;
  logic [NS-1:0] ts_cs_n, ts_so;
  logic [NC-1:0] prog_b, smap, cs_b, init_b, cdone, cfail;
  logic cclk;
  logic [7:0] cd;
  logic vclk_en, clk_int_sel, pwr_shutdown;
  logic [15:0] tval [NS];
  logic [7:0] rx_q [$];
  logic [7:0] bits [NB];
  int checks = 0, failures = 0;
  int unsigned loads0 [NC];

  sc_top #(.IS_CORE(1'b0), .CLKS_PER_BIT(CPB), .SRAM_AW(AW), .WDT_CYCLES(WDT), .N_SENS(NS),
           .SCK_DIV(2), .N_CARDS(NC), .BS_FIRST(FIRST), .BS_LAST(LAST),
           .PROG_CYCLES(8), .CFG_TIMEOUT(4000)) dut (
    .clk, .rst_n, .uart_rx, .uart_tx, .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .fl_req, .fl_we, .fl_sel, .fl_addr, .fl_wdata, .fl_ack, .fl_rdata,
    .ts_sck, .ts_cs_n, .ts_so, .cfg_prog_b(prog_b), .cfg_smap(smap), .cfg_cs_b(cs_b),
    .cfg_cclk(cclk), .cfg_d(cd), .cfg_init_b(init_b), .cfg_done(cdone), .cfg_fail(cfail),
    .psu_ok_core(1'b1), .psu_ok_seg(1'b1), .vclk_en, .clk_int_sel, .pwr_shutdown);

  sram_model #(.AW(AW)) mem (.clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata),
                             .rdata(sram_rdata), .inject(1'b0), .inj_addr('0));
  flash_model #(.AW(AW), .LAT(2)) fm (.clk, .req(fl_req), .we(fl_we), .sel(fl_sel), .addr(fl_addr),
                                      .wdata(fl_wdata), .ack(fl_ack), .rdata(fl_rdata));
  for (genvar i = 0; i < NS; i++) begin : g_ts
    temp_sensor_model s (.sck(ts_sck), .cs_n(ts_cs_n[i]), .value(tval[i]), .so(ts_so[i]));
  end
  for (genvar i = 0; i < NC; i++) begin : g_c
    v2pro_card_model #(.NBYTES(NB), .SER_CYCLES(150 + 40 * i)) c (
      .clk, .prog_b(prog_b[i]), .smap(smap[i]), .cs_b(cs_b[i]), .cclk, .d(cd), .dead(1'b0),
      .init_b(init_b[i]), .done(cdone[i]));
  end

  always #5 clk = ~clk;

  task automatic send(input logic [7:0] f [$]);
    foreach (f[k]) begin
      logic [9:0] w;
      w = {1'b1, f[k], 1'b0};
      for (int i = 0; i < 10; i++) begin
        uart_rx = w[i];
        repeat (CPB) @(posedge clk);
      end
    end
  endtask

  initial begin : rx_decoder
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_tx;
      end
      repeat (CPB) @(posedge clk);
      if (uart_tx) rx_q.push_back(b);
    end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_reply(input string what, input logic [7:0] c, input logic [7:0] pl [$]);
    logic [7:0] e [$];
    int n = pl.size() + 2;
    e = {8'hC0, 8'(n >> 16), 8'(n >> 8), 8'(n), 8'hD0, c};
    e = {e, pl};
    for (int t = 0; t < 20 * CPB * (e.size() + 4) + 20000 && rx_q.size() < e.size(); t++) @(posedge clk);
    repeat (12 * CPB) @(posedge clk);
    checks++;
    if (rx_q != e) begin
      failures++;
      $display("FAIL: %s reply (%0d bytes, expected %0d)", what, rx_q.size(), e.size());
      foreach (rx_q[i]) $write("%02h ", rx_q[i]);
      $display("");
    end
    rx_q = {};
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (dut.busy) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) bits[i] = 8'($urandom);
    for (int i = 0; i < NS; i++) tval[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // core frames are not for this module
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_STATUS, 8'h00, 8'h00});
    repeat (40 * CPB) @(posedge clk);
    check("core frame ignored", rx_q.size() == 0);

    // core-only commands have no effect on a segment
    send('{8'h80, 8'h00, 8'h00, 8'h04, 8'h90, CMD_VCLK_EN, 8'h01, 8'h00});
    send('{8'h80, 8'h00, 8'h00, 8'h04, 8'h90, CMD_CLK_SEL, 8'h01, 8'h00});
    send('{8'h80, 8'h00, 8'h00, 8'h04, 8'h90, CMD_POWER, 8'h0F, 8'h00});
    wait_idle();
    check("cmd 17/40/20 ignored", !vclk_en && !clk_int_sel && !pwr_shutdown);

    send('{8'hC0, 8'h00, 8'h00, 8'h04, 8'hD0, CMD_STATUS, 8'h00, 8'h00});
    expect_reply("cmd 14", CMD_STATUS, '{8'h08, 8'h00, 8'h00, 8'h00, 8'h00, 8'h11});

    // cmd 9 then dump 0x08..0x17 with segment frames
    begin
      logic [7:0] f [$];
      logic [7:0] e [$];
      int n = NB + 8;
      f = {8'hA0, 8'(n >> 16), 8'(n >> 8), 8'(n), 8'hB0, CMD_STORE_SRAM, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
      for (int i = 0; i < NB; i++) f.push_back(bits[i]);
      send(f);
      wait_idle();
      send('{8'hA0, 8'h00, 8'h00, 8'h08, 8'hB0, CMD_SET_PTR, 8'h00, 8'h00, 8'h17, 8'h00, 8'h00, 8'h08});
      wait_idle();
      send('{8'hC0, 8'h00, 8'h00, 8'h04, 8'hD0, CMD_GET_PTR, 8'h00, 8'h00});
      expect_reply("cmd 13", CMD_GET_PTR, '{8'h00, 8'h00, 8'h17, 8'h00, 8'h00, 8'h08});
      for (int i = 0; i < 16; i++) e.push_back(bits[i]);
      send('{8'hC0, 8'h00, 8'h00, 8'h04, 8'hD0, CMD_DUMP_SRAM, 8'h00, 8'h00});
      expect_reply("cmd 10", CMD_DUMP_SRAM, e);
    end

    begin
      logic [7:0] e [$];
      for (int i = 0; i < NS; i++) begin e.push_back(tval[i][15:8]); e.push_back(tval[i][7:0]); end
      send('{8'hC0, 8'h00, 8'h00, 8'h04, 8'hD0, CMD_TEMP, 8'h00, 8'h00});
      expect_reply("cmd 19", CMD_TEMP, e);
    end

    // serial load of all four segment ADC cards at once
    for (int i = 0; i < NC; i++) loads0[i] = 0;
    loads0[0] = g_c[0].c.loads; loads0[1] = g_c[1].c.loads;
    loads0[2] = g_c[2].c.loads; loads0[3] = g_c[3].c.loads;
    send('{8'h80, 8'h00, 8'h00, 8'h04, 8'h90, CMD_V2P_LOAD, 8'h0F, 8'h00});
    repeat (20) @(posedge clk);
    wait_idle();
    check("cmd 18 all four cards from PROM", cdone == 4'hF && cfail == '0 && smap == '0);
    check("each card loaded once", g_c[0].c.loads == loads0[0] + 1 && g_c[1].c.loads == loads0[1] + 1 &&
                                   g_c[2].c.loads == loads0[2] + 1 && g_c[3].c.loads == loads0[3] + 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
