// tb_flash_copy -- self-checking test of flash_copy with a small bitstream
// range (0x08..0x47) and behavioural flash and SRAM models. cmd 16: flash
// IC 1 to SRAM, every byte in range copied, bytes outside untouched. cmd 11:
// SRAM to flash IC 0, every byte in range programmed, IC 1 untouched.
module tb_flash_copy;
  import sc_pkg::*;
  localparam int AW = 10;
  localparam logic [23:0] FIRST = 24'h08, LAST = 24'h47;
  logic clk = 0, rst_n = 0, start = 0, to_flash = 0, sel = 0, done;
  flash_req_t fl;
  logic fl_ack;
  logic [7:0] fl_rdata, rdata;
  sram_req_t req;
  int checks = 0, failures = 0;

  flash_copy #(.AW(AW), .FIRST(FIRST), .LAST(LAST)) dut (
    .clk, .rst_n, .start, .to_flash, .sel, .done, .fl, .fl_ack, .fl_rdata,
    .sram_req(req), .sram_rdata(rdata));
  sram_model #(.AW(AW)) mem (.clk, .en(req.en), .we(req.we), .addr(req.addr[AW-1:0]),
                             .wdata(req.wdata), .rdata, .inject(1'b0), .inj_addr('0));
  flash_model #(.AW(AW), .LAT(2)) fm (.clk, .req(fl.req), .we(fl.we), .sel(fl.sel), .addr(fl.addr),
                                      .wdata(fl.wdata), .ack(fl_ack), .rdata(fl_rdata));

  always #5 clk = ~clk;

  task automatic run(input logic tf, input logic s);
    @(posedge clk);
    to_flash <= tf;
    sel      <= s;
    start    <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!done);
    @(posedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      fm.mem0[a] = 8'h00;
      fm.mem1[a] = 8'($urandom);
      mem.mem[a] = 8'h5A;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // cmd 16 from flash 1
    run(1'b0, 1'b1);
    for (int a = 0; a < 2**AW; a++) begin
      logic [7:0] exp;
      exp = (a >= FIRST && a <= LAST) ? fm.mem1[a] : 8'h5A;
      checks++;
      if (mem.mem[a] != exp) begin failures++; $display("sram %0h = %02h, expected %02h", a, mem.mem[a], exp); end
    end
    checks++;
    if (fm.reads != LAST - FIRST + 1) begin failures++; $display("%0d flash reads", fm.reads); end
    // cmd 11 into flash 0
    for (int a = 0; a < 2**AW; a++) mem.mem[a] = 8'(a * 7 + 3);
    run(1'b1, 1'b0);
    for (int a = 0; a < 2**AW; a++) begin
      logic [7:0] exp;
      exp = (a >= FIRST && a <= LAST) ? 8'(a * 7 + 3) : 8'h00;
      checks++;
      if (fm.mem0[a] != exp) begin failures++; $display("flash0 %0h = %02h, expected %02h", a, fm.mem0[a], exp); end
    end
    checks++;
    if (fm.writes != LAST - FIRST + 1) begin failures++; $display("%0d flash writes", fm.writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
