// tb_frame_rx -- self-checking test of frame_rx. A core and a segment
// instance receive the same byte stream. Checked: frames for the other
// module type are ignored, the length/command/parameters are captured, the
// body lands in SRAM from address 0 (cmd 9 payload from address 8), a wrong
// address byte abandons the frame, bytes during `busy` are dropped and a
// stalled frame is dropped by the watchdog and counted.
module tb_frame_rx;
  import sc_pkg::*;
  localparam int WDT = 200;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0, busy = 0;
  frame_t fc, fs;
  logic done_c, done_s, wdt_c, wdt_s, herr_c, herr_s;
  sram_req_t sr_c, sr_s;
  logic [7:0] mem_c [64];
  logic [7:0] mem_s [64];
  int checks = 0, failures = 0;
  int ndone_c = 0, ndone_s = 0, nwdt = 0, nherr = 0;

  frame_rx #(.IS_CORE(1'b1), .SRAM_AW(6), .WDT_CYCLES(WDT)) u_core (
    .clk, .rst_n, .rx_data, .rx_valid, .busy, .frame(fc), .frame_done(done_c),
    .sram_req(sr_c), .wdt_timeout(wdt_c), .hdr_err(herr_c));
  frame_rx #(.IS_CORE(1'b0), .SRAM_AW(6), .WDT_CYCLES(WDT)) u_seg (
    .clk, .rst_n, .rx_data, .rx_valid, .busy, .frame(fs), .frame_done(done_s),
    .sram_req(sr_s), .wdt_timeout(wdt_s), .hdr_err(herr_s));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n) begin
      if (sr_c.en && sr_c.we) mem_c[sr_c.addr[5:0]] <= sr_c.wdata;
      if (sr_s.en && sr_s.we) mem_s[sr_s.addr[5:0]] <= sr_s.wdata;
      if (sr_c.en && sr_c.addr >= 64) begin failures++; $display("write beyond SRAM"); end
      ndone_c += int'(done_c);
      ndone_s += int'(done_s);
      nwdt    += int'(wdt_c);
      nherr   += int'(herr_c);
    end
  end

  task automatic put(input logic [7:0] b, input int gap = 3);
    rx_data <= b;
    rx_valid <= 1'b1;
    @(posedge clk);
    rx_valid <= 1'b0;
    repeat (gap) @(posedge clk);
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] f12 [12] = '{8'h20, 8'h00, 8'h00, 8'h08, 8'h2C, 8'h0C,
                             8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66};
    for (int i = 0; i < 64; i++) begin mem_c[i] = 8'hEE; mem_s[i] = 8'hEE; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // cmd 12 to the core
    foreach (f12[i]) put(f12[i]);
    repeat (2) @(posedge clk);
    check("core frame done once", ndone_c == 1);
    check("segment ignores core frame", ndone_s == 0);
    check("core cmd/len/type", fc.cmd == 8'h0C && fc.len == 24'd8 && fc.ftype == FT_LW);
    for (int i = 0; i < 6; i++) check($sformatf("param %0d", i), fc.p[i] == f12[6+i]);
    for (int i = 0; i < 8; i++) check($sformatf("sram body %0d", i), mem_c[i] == f12[4+i]);
    check("sram beyond body untouched", mem_c[8] == 8'hEE);

    // cmd 9 to the segment: 6 padding bytes, 12 payload bytes -> length 20
    put(8'hA0); put(8'h00); put(8'h00); put(8'd20); put(8'hB0); put(8'h09);
    for (int i = 0; i < 6; i++) put(8'h00);
    for (int i = 0; i < 12; i++) put(8'h80 + 8'(i));
    repeat (2) @(posedge clk);
    check("segment frame done", ndone_s == 1 && fs.cmd == 8'h09 && fs.len == 24'd20);
    check("core ignores segment frame", ndone_c == 1);
    for (int i = 0; i < 12; i++) check($sformatf("payload at %0d", 8 + i), mem_s[8+i] == 8'h80 + 8'(i));

    // the core parser may have taken segment padding bytes (00) as the
    // start of an NW frame: let its watchdog clear that, then count afresh
    repeat (WDT + 10) @(posedge clk);
    ndone_c = 1; nwdt = 0; nherr = 0;
    // SR frame with a wrong address byte (0x4D instead of 0x4C)
    put(8'h40); put(8'h00); put(8'h00); put(8'h04); put(8'h4D); put(8'h0E); put(8'h00); put(8'h00);
    repeat (2) @(posedge clk);
    check("wrong address byte abandons frame", ndone_c == 1 && nherr == 1);
    // its trailing 00 bytes look like the start of a core NW frame
    repeat (WDT + 10) @(posedge clk);
    nwdt = 0;

    // bytes are dropped while busy
    busy = 1'b1;
    put(8'h40); put(8'h00); put(8'h00); put(8'h04); put(8'h4C); put(8'h0E); put(8'h00); put(8'h00);
    busy = 1'b0;
    repeat (2) @(posedge clk);
    check("busy drops frame", ndone_c == 1);

    // stalled frame: watchdog
    put(8'h40); put(8'h00); put(8'h00);
    repeat (WDT + 10) @(posedge clk);
    check("watchdog fired once", nwdt == 1);
    // a complete SR frame afterwards is accepted
    put(8'h40); put(8'h00); put(8'h00); put(8'h04); put(8'h4C); put(8'h0E); put(8'h00); put(8'h00);
    repeat (2) @(posedge clk);
    check("frame after timeout", ndone_c == 2 && fc.cmd == 8'h0E && fc.ftype == FT_SR);
    check("no timeout for complete frame", nwdt == 1);

    // gaps shorter than the watchdog never fire it
    put(8'h00, WDT - 20); put(8'h00, WDT - 20); put(8'h00, WDT - 20); put(8'h04, WDT - 20);
    put(8'h0C, WDT - 20); put(8'h11, WDT - 20); put(8'h01, WDT - 20); put(8'h00, 2);
    check("slow NW frame accepted", ndone_c == 3 && fc.cmd == 8'h11 && fc.p[0] == 8'h01 && nwdt == 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
