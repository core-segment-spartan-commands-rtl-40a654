// tb_sc_top_full -- sc_top at its default parameters (core build, 2 MB
// SRAM, 115200 baud at 40 MHz, full Virtex-II Pro bitstream range
// 0x000008..0x161B33). Over the serial link it reads the status (cmd 14),
// runs the memory check over the whole SRAM (cmd 15, expects 1F FF FF),
// loads the full bitstream from flash IC 1 into the SRAM (cmd 16), programs
// it into flash IC 0 (cmd 11), sends the last 52 bitstream bytes back
// (cmd 12, 13, 10), reads the ten temperature sensors (cmd 19), has cards 1
// to 3 load from their serial PROMs and loads ADC card 0 with the bitstream
// in SelectMAP mode from flash IC 0 (cmd 18), checking every byte, the byte
// count and checksum the card received and the cycle counts of the long
// operations.
module tb_sc_top_full;
  import sc_pkg::*;
  localparam int CPB = 347, AW = 21, NS = 10, NC = 4;
  localparam logic [23:0] FIRST = 24'h000008, LAST = 24'h161B33;

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
  logic [15:0] tval [NS];
  logic [NC-1:0] prog_b, smap, cs_b, cfail, init_b, cdone;
  logic cclk;
  logic [7:0] cd;
  logic vclk_en, clk_int_sel, pwr_shutdown;
  logic [7:0] rx_q [$];
  int checks = 0, failures = 0;
  longint cyc = 0;

  sc_top dut (
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
    v2pro_card_model #(.NBYTES(LAST - FIRST + 1), .SER_CYCLES(1000)) c (
      .clk, .prog_b(prog_b[i]), .smap(smap[i]), .cs_b(cs_b[i]), .cclk, .d(cd), .dead(1'b0),
      .init_b(init_b[i]), .done(cdone[i]));
  end

  always #12.5 clk = ~clk;     // 40 MHz
  always @(posedge clk) cyc++;

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

  task automatic expect_reply(input string what, input logic [7:0] c, input logic [7:0] pl [$]);
    logic [7:0] e [$];
    int n = pl.size() + 2;
    e = {8'h40, 8'(n >> 16), 8'(n >> 8), 8'(n), 8'h4C, c};
    e = {e, pl};
    while (rx_q.size() < e.size()) @(posedge clk);
    repeat (12 * CPB) @(posedge clk);
    checks++;
    if (rx_q != e) begin
      failures++;
      $display("FAIL: %s reply", what);
      foreach (rx_q[i]) $write("%02h ", rx_q[i]);
      $display("");
    end
    rx_q = {};
  endtask

  // cycles the controller is busy with one command
  task automatic busy_time(output longint n);
    longint t0;
    while (!dut.busy) @(posedge clk);
    t0 = cyc;
    while (dut.busy) @(posedge clk);
    n = cyc - t0;
  endtask

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n;
    for (int i = 0; i < NS; i++) tval[i] = 16'h0C80 + 16'(i * 37);
    for (int a = FIRST; a <= LAST; a++) fm.mem1[a] = mem_pattern(24'(a)) ^ 8'h96;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_STATUS, 8'h00, 8'h00});
    expect_reply("cmd 14", CMD_STATUS, '{8'h0C, 8'h00, 8'h00, 8'h00, 8'h00, 8'h91});

    fork
      send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_MEM_CHECK, 8'h00, 8'h00});
      busy_time(n);
    join
    expect_reply("cmd 15", CMD_MEM_CHECK, '{8'h1F, 8'hFF, 8'hFF});
    $display("memory check busy for %0d cycles", n);
    // two passes over 2**21 bytes, plus the reply frame
    checks++;
    if (n < 2 * 2**21 || n > 2 * 2**21 + 10 * 10 * CPB) begin failures++; $display("FAIL: memory check time"); end

    fork
      send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_LOAD_SRAM, 8'h01, 8'h00});
      busy_time(n);
    join
    $display("flash load busy for %0d cycles", n);
    begin
      int bad = 0;
      for (int a = FIRST; a <= LAST; a++) if (mem.mem[a] != (mem_pattern(24'(a)) ^ 8'h96)) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL: %0d bitstream bytes wrong", bad); end
      checks++;
      if (fm.reads != LAST - FIRST + 1) begin failures++; $display("FAIL: %0d flash reads", fm.reads); end
    end

    fork
      send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_PROG_FLASH, 8'h00, 8'h00});
      busy_time(n);
    join
    $display("flash program busy for %0d cycles", n);
    begin
      int bad = 0;
      for (int a = FIRST; a <= LAST; a++) if (fm.mem0[a] != (mem_pattern(24'(a)) ^ 8'h96)) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL: %0d flash 0 bytes wrong", bad); end
    end

    // the end of the bitstream, 0x161B00..0x161B33, sent back over the link
    send('{8'h20, 8'h00, 8'h00, 8'h08, 8'h2C, CMD_SET_PTR, 8'h16, 8'h1B, 8'h33, 8'h16, 8'h1B, 8'h00});
    send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_GET_PTR, 8'h00, 8'h00});
    expect_reply("cmd 13", CMD_GET_PTR, '{8'h16, 8'h1B, 8'h33, 8'h16, 8'h1B, 8'h00});
    begin
      logic [7:0] e [$];
      for (int a = 24'h161B00; a <= LAST; a++) e.push_back(mem_pattern(24'(a)) ^ 8'h96);
      send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_DUMP_SRAM, 8'h00, 8'h00});
      expect_reply("cmd 10", CMD_DUMP_SRAM, e);
    end

    begin
      logic [7:0] e [$];
      for (int i = 0; i < NS; i++) begin e.push_back(tval[i][15:8]); e.push_back(tval[i][7:0]); end
      send('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, CMD_TEMP, 8'h00, 8'h00});
      expect_reply("cmd 19", CMD_TEMP, e);
    end

    fork
      send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_V2P_LOAD, 8'h0E, 8'h00});
      busy_time(n);
    join
    $display("serial load busy for %0d cycles", n);
    checks++;
    if (!(cdone == 4'b1110 && cfail == '0 && g_c[1].c.loads == 1 && g_c[3].c.loads == 1)) begin
      failures++;
      $display("FAIL: serial load, done %b fail %b", cdone, cfail);
    end

    fork
      send('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, CMD_V2P_LOAD, 8'h00, 8'h01});
      busy_time(n);
    join
    $display("SelectMAP load busy for %0d cycles", n);
    begin
      int unsigned sum = 0;
      for (int a = FIRST; a <= LAST; a++) sum += mem_pattern(24'(a)) ^ 8'h96;
      checks++;
      if (!(cdone[0] && g_c[0].c.nbytes == LAST - FIRST + 1 && g_c[0].c.sum == sum && cfail == '0)) begin
        failures++;
        $display("FAIL: card 0 got %0d bytes, done %b", g_c[0].c.nbytes, cdone[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
