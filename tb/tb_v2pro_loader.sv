// tb_v2pro_loader -- self-checking test of v2pro_loader with four card
// models and a 64-byte bitstream range. Run 1: aa = 0x05 (serial cards 0
// and 2 together), bb = 0x22 (parallel load of card 1 from flash IC 1).
// Run 2: parallel cards 0 and 3 from flash 0,
// card 3 dead: it must be reported in `fail` after the timeout. Checks that
// serial cards are pulsed together, parallel cards one at a time, the byte
// count and checksum each parallel card received, and the DONE results.
module tb_v2pro_loader;
  import sc_pkg::*;
  localparam int NC = 4, AW = 10;
  localparam logic [23:0] FIRST = 24'h08, LAST = 24'h47;
  localparam int NB = LAST - FIRST + 1;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [7:0] aa = 0, bb = 0;
  logic [NC-1:0] fail, prog_b, smap, cs_b, init_b, cdone;
  logic [NC-1:0] dead = '0;
  logic cclk;
  logic [7:0] d;
  flash_req_t fl;
  logic fl_ack;
  logic [7:0] fl_rdata;
  int checks = 0, failures = 0;
  int both_prog = 0, par_overlap = 0;

  v2pro_loader #(.N_CARDS(NC), .FIRST(FIRST), .LAST(LAST), .PROG_CYCLES(8), .TIMEOUT(3000)) dut (
    .clk, .rst_n, .start, .aa, .bb, .done, .fail, .cfg_prog_b(prog_b), .cfg_smap(smap),
    .cfg_cs_b(cs_b), .cfg_cclk(cclk), .cfg_d(d), .cfg_init_b(init_b), .cfg_done(cdone),
    .fl, .fl_ack, .fl_rdata);
  flash_model #(.AW(AW), .LAT(1)) fm (.clk, .req(fl.req), .we(fl.we), .sel(fl.sel), .addr(fl.addr),
                                      .wdata(fl.wdata), .ack(fl_ack), .rdata(fl_rdata));
  for (genvar i = 0; i < NC; i++) begin : g_c
    v2pro_card_model #(.NBYTES(NB), .SER_CYCLES(200)) c (
      .clk, .prog_b(prog_b[i]), .smap(smap[i]), .cs_b(cs_b[i]), .cclk, .d, .dead(dead[i]),
      .init_b(init_b[i]), .done(cdone[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (prog_b[0] == 1'b0 && prog_b[2] == 1'b0) both_prog++;
    if (!$onehot0(~cs_b)) par_overlap++;
  end

  function automatic int unsigned flash_sum(input bit ic);
    int unsigned s = 0;
    for (int a = FIRST; a <= LAST; a++) s += ic ? fm.mem1[a] : fm.mem0[a];
    return s;
  endfunction

  task automatic run(input logic [7:0] a, input logic [7:0] b);
    @(posedge clk);
    aa <= a;
    bb <= b;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!done);
    @(posedge clk);
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      fm.mem0[a] = 8'($urandom);
      fm.mem1[a] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    run(8'h05, 8'h22);
    check("serial cards 0 and 2 pulsed together", both_prog > 0);
    check("serial cards loaded", g_c[0].c.loads == 1 && g_c[2].c.loads == 1 && cdone[0] && cdone[2]);
    check("card 1 loaded in SelectMAP mode", cdone[1] && smap[1] && g_c[1].c.nbytes == NB);
    check("card 1 data from flash 1", g_c[1].c.sum == flash_sum(1'b1));
    check("card 3 untouched", g_c[3].c.loads == 0);
    check("no failures", fail == '0);

    dead[3] = 1'b1;
    run(8'h00, 8'h09);
    check("card 0 loaded from flash 0", g_c[0].c.loads == 2 && g_c[0].c.nbytes == NB && g_c[0].c.sum == flash_sum(1'b0));
    check("card 3 received bitstream", g_c[3].c.nbytes == NB);
    check("dead card 3 reported", fail == 4'b1000);
    check("one parallel card at a time", par_overlap == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
