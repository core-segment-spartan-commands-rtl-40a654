// tb_sram_check -- self-checking test of sram_check on a 4 KB SRAM model
// (AW = 12). Run 1: fault-free memory, expects last_good = FFF and the
// two-pass cycle count. Run 2: a faulty byte at a random address a, expects
// a - 1. Run 3: every written byte is compared with the pattern.
module tb_sram_check;
  import sc_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [23:0] last_good;
  sram_req_t req;
  logic [7:0] rdata;
  logic inject = 0;
  logic [AW-1:0] inj_addr = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sram_check #(.AW(AW)) dut (.clk, .rst_n, .start, .done, .last_good, .sram_req(req), .sram_rdata(rdata));
  sram_model #(.AW(AW)) mem (.clk, .en(req.en), .we(req.we), .addr(req.addr[AW-1:0]),
                             .wdata(req.wdata), .rdata, .inject, .inj_addr);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic run(output longint cycles);
    longint t0;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = cyc;
    do @(posedge clk); while (!done);
    cycles = cyc - t0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(c);
    checks++;
    if (last_good != 24'h000FFF) begin failures++; $display("fault-free: last_good %06h", last_good); end
    // write pass + read pass + pipeline: about 2 * 4096 cycles
    checks++;
    if (c < 2 * 4096 || c > 2 * 4096 + 8) begin failures++; $display("took %0d cycles", c); end
    for (int a = 0; a < 2**AW; a++) begin
      checks++;
      if (mem.mem[a] != mem_pattern(24'(a))) begin
        failures++;
        $display("addr %0h holds %02h", a, mem.mem[a]);
        break;
      end
    end
    for (int k = 0; k < 3; k++) begin
      inj_addr = AW'(1 + $urandom_range(0, 2**AW - 2));
      inject = 1'b1;
      run(c);
      checks++;
      if (last_good != 24'(inj_addr - 1'b1)) begin
        failures++;
        $display("fault at %0h: last_good %06h", inj_addr, last_good);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
