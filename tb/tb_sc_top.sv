// tb_sc_top -- end-to-end test of sc_top (core build) through its serial
// port, with behavioural SRAM, flash, temperature sensor and ADC-card
// models, at reduced sizes: 8 clocks per bit, 4 KB SRAM, a 64-byte
// bitstream (0x08..0x47), short timeouts. A bitstream is stored with cmd 9,
// programmed into flash 0 (cmd 11), reloaded into a wiped SRAM (cmd 16),
// dumped (cmd 12/13/10), loaded into an ADC card in SelectMAP mode and two
// cards from PROM (cmd 18); the clock and power commands (17, 40, 20),
// status (14), temperatures (19) and the memory check (15, also with a
// faulty cell) are exercised. Frames for a segment module, a wrong address
// byte, a stalled frame (watchdog) and a frame sent while busy are also
// sent. Each mechanism is counted and must have happened at least once.
module tb_sc_top;
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
  logic psu_ok_core = 1, psu_ok_seg = 1;
  logic vclk_en, clk_int_sel, pwr_shutdown;
  logic inject = 0;
  logic [AW-1:0] inj_addr = 0;
  logic [15:0] tval [NS];
  logic [7:0] rx_q [$];
  logic [7:0] bits [NB];
  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {M_C9, M_C10, M_C11, M_C12, M_C13, M_C14, M_C15, M_C15_FAIL, M_C16,
                    M_C17, M_C18_SER, M_C18_PAR, M_C19, M_C20, M_C40, M_OTHER_MODULE,
                    M_BAD_ADDR, M_WDT, M_BUSY_DROP, M_NMECH} mech_e;
  int mech [M_NMECH];

  sc_top #(.IS_CORE(1'b1), .CLKS_PER_BIT(CPB), .SRAM_AW(AW), .WDT_CYCLES(WDT), .N_SENS(NS),
           .SCK_DIV(2), .N_CARDS(NC), .BS_FIRST(FIRST), .BS_LAST(LAST),
           .PROG_CYCLES(8), .CFG_TIMEOUT(4000)) dut (
    .clk, .rst_n, .uart_rx, .uart_tx, .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .fl_req, .fl_we, .fl_sel, .fl_addr, .fl_wdata, .fl_ack, .fl_rdata,
    .ts_sck, .ts_cs_n, .ts_so, .cfg_prog_b(prog_b), .cfg_smap(smap), .cfg_cs_b(cs_b),
    .cfg_cclk(cclk), .cfg_d(cd), .cfg_init_b(init_b), .cfg_done(cdone), .cfg_fail(cfail),
    .psu_ok_core, .psu_ok_seg, .vclk_en, .clk_int_sel, .pwr_shutdown);

  sram_model #(.AW(AW)) mem (.clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata),
                             .rdata(sram_rdata), .inject, .inj_addr);
  flash_model #(.AW(AW), .LAT(2)) fm (.clk, .req(fl_req), .we(fl_we), .sel(fl_sel), .addr(fl_addr),
                                      .wdata(fl_wdata), .ack(fl_ack), .rdata(fl_rdata));
  for (genvar i = 0; i < NS; i++) begin : g_ts
    temp_sensor_model s (.sck(ts_sck), .cs_n(ts_cs_n[i]), .value(tval[i]), .so(ts_so[i]));
  end
  for (genvar i = 0; i < NC; i++) begin : g_c
    v2pro_card_model #(.NBYTES(NB), .SER_CYCLES(150)) c (
      .clk, .prog_b(prog_b[i]), .smap(smap[i]), .cs_b(cs_b[i]), .cclk, .d(cd), .dead(1'b0),
      .init_b(init_b[i]), .done(cdone[i]));
  end

  always #5 clk = ~clk;

  // internal events that the serial port cannot show
  always @(posedge clk) if (rst_n) begin
    if (dut.hdr_err) mech[M_BAD_ADDR]++;
    if (dut.wdt_timeout) mech[M_WDT]++;
    if (dut.u_rx.valid && dut.busy) mech[M_BUSY_DROP]++;
  end

  // host side of the serial link
  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  task automatic send(input logic [7:0] f [$]);
    foreach (f[i]) send_byte(f[i]);
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

  // wait for a complete SR reply and compare it
  task automatic expect_reply(input string what, input logic [7:0] c, input logic [7:0] pl [$]);
    logic [7:0] e [$];
    int n = pl.size() + 2;
    e = {8'h40, 8'(n >> 16), 8'(n >> 8), 8'(n), 8'h4C, c};
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) bits[i] = 8'($urandom);
    for (int i = 0; i < NS; i++) tval[i] = 16'($urandom);
    for (int a = 0; a < 2**AW; a++) begin fm.mem0[a] = 8'hFF; fm.mem1[a] = 8'hFF; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // a frame for a segment module is ignored
    send('{8'hC0, 8'h00, 8'h00, 8'h04, 8'hD0, 8'h0E, 8'h00, 8'h00});
    // its trailing 00 bytes look like the start of a core NW frame, which
    // the watchdog drops
    repeat (WDT + 100) @(posedge clk);
    check("segment frame ignored", rx_q.size() == 0);
    if (rx_q.size() == 0) mech[M_OTHER_MODULE]++;

    // cmd 9: header, 6 padding bytes, bitstream
    begin
      logic [7:0] f [$];
      int n = NB + 8;
      f = {8'h20, 8'(n >> 16), 8'(n >> 8), 8'(n), 8'h2C, CMD_STORE_SRAM, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
      for (int i = 0; i < NB; i++) f.push_back(bits[i]);
      send(f);
      wait_idle();
      for (int i = 0; i < NB; i++) check($sformatf("cmd 9 byte %0d in SRAM", i), mem.mem[FIRST + i] == bits[i]);
      mech[M_C9]++;
    end

    // cmd 11: program flash 0 from SRAM
    send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_PROG_FLASH, 8'h00, 8'h00});
    repeat (20) @(posedge clk);
    wait_idle();
    begin
      logic ok = 1;
      for (int i = 0; i < NB; i++) if (fm.mem0[FIRST + i] != bits[i]) ok = 0;
      check("cmd 11 programmed flash 0", ok && fm.mem1[FIRST] == 8'hFF);
      if (ok) mech[M_C11]++;
    end

    // wipe the SRAM, cmd 16 reloads it from flash 0
    for (int a = 0; a < 2**AW; a++) mem.mem[a] = 8'h00;
    send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_LOAD_SRAM, 8'h00, 8'h00});
    repeat (20) @(posedge clk);
    wait_idle();
    begin
      logic ok = 1;
      for (int i = 0; i < NB; i++) if (mem.mem[FIRST + i] != bits[i]) ok = 0;
      check("cmd 16 loaded SRAM from flash 0", ok);
      if (ok) mech[M_C16]++;
    end

    // cmd 12 / 13 / 10: dump bitstream bytes 0x10..0x2F
    send('{8'h20, 8'h00, 8'h00, 8'h08, 8'h2C, CMD_SET_PTR, 8'h00, 8'h00, 8'h2F, 8'h00, 8'h00, 8'h10});
    wait_idle();
    mech[M_C12]++;
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_GET_PTR, 8'h00, 8'h00});
    expect_reply("cmd 13", CMD_GET_PTR, '{8'h00, 8'h00, 8'h2F, 8'h00, 8'h00, 8'h10});
    mech[M_C13]++;
    begin
      logic [7:0] e [$];
      for (int a = 'h10; a <= 'h2F; a++) e.push_back(bits[a - FIRST]);
      // core example with length 00, as printed in the command list
      send('{8'h40, 8'h00, 8'h00, 8'h00, 8'h4C, CMD_DUMP_SRAM, 8'h00, 8'h00});
      check("length-0 frame is not accepted", rx_q.size() == 0);
      repeat (WDT + 100) @(posedge clk);
      send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_DUMP_SRAM, 8'h00, 8'h00});
      expect_reply("cmd 10", CMD_DUMP_SRAM, e);
      check("cmd 10 copied range to address 0", mem.mem[0] == e[0] && mem.mem[31] == e[31]);
      mech[M_C10]++;
    end

    // cmd 17, 40, 20, then status
    send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_VCLK_EN, 8'h01, 8'h00});
    wait_idle();
    check("cmd 17 ADC clock on", vclk_en);
    if (vclk_en) mech[M_C17]++;
    send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_CLK_SEL, 8'h01, 8'h00});
    wait_idle();
    check("cmd 40 internal clock", clk_int_sel);
    if (clk_int_sel) mech[M_C40]++;
    send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_POWER, 8'h06, 8'h00});
    wait_idle();
    check("cmd 20 without d3", !pwr_shutdown);
    // a stalled frame is dropped by the watchdog
    send('{8'h40, 8'h00, 8'h00, 8'h04});
    repeat (WDT + 50) @(posedge clk);
    // a frame with a wrong address byte is abandoned
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4D, CMD_STATUS});
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_STATUS, 8'h00, 8'h00});
    // three timeouts: the stalled frame and the 00 bytes trailing the
    // segment frame and the length-0 frame
    expect_reply("cmd 14", CMD_STATUS, '{8'h0F, 8'h03, 8'h03, 8'h60, 8'h03, 8'h91});
    mech[M_C14]++;

    // cmd 19
    begin
      logic [7:0] e [$];
      for (int i = 0; i < NS; i++) begin e.push_back(tval[i][15:8]); e.push_back(tval[i][7:0]); end
      send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_TEMP, 8'h00, 8'h00});
      expect_reply("cmd 19", CMD_TEMP, e);
      mech[M_C19]++;
    end

    // cmd 15 fault-free; a cmd 14 frame sent meanwhile is dropped
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_MEM_CHECK, 8'h00, 8'h00});
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_STATUS, 8'h00, 8'h00});
    expect_reply("cmd 15", CMD_MEM_CHECK, '{8'h00, 8'h0F, 8'hFF});
    mech[M_C15]++;
    inj_addr = 12'h9A3;
    inject = 1'b1;
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_MEM_CHECK, 8'h00, 8'h00});
    expect_reply("cmd 15 with fault", CMD_MEM_CHECK, '{8'h00, 8'h09, 8'hA2});
    mech[M_C15_FAIL]++;
    inject = 1'b0;

    // cmd 18: cards 0 and 2 from PROM, card 1 in SelectMAP from flash 0
    send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_V2P_LOAD, 8'h05, 8'h02});
    repeat (20) @(posedge clk);
    wait_idle();
    check("cmd 18 serial cards", cdone[0] && cdone[2] && !smap[0] && !smap[2]);
    if (cdone[0] && cdone[2]) mech[M_C18_SER]++;
    begin
      int unsigned s = 0;
      foreach (bits[i]) s += bits[i];
      check("cmd 18 parallel card 1", cdone[1] && smap[1] && g_c[1].c.nbytes == NB && g_c[1].c.sum == s);
      if (cdone[1]) mech[M_C18_PAR]++;
    end
    check("cmd 18 no failures", cfail == '0);

    // cmd 20 d3: power down
    send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_POWER, 8'h08, 8'h00});
    wait_idle();
    check("cmd 20 d3 shuts down", pwr_shutdown);
    if (pwr_shutdown) mech[M_C20]++;

    for (int m = 0; m < M_NMECH; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL: mechanism %s never happened", mech_e'(m)); end
    end
    $display("mechanisms: %p", mech);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
