// tb_uart_rx -- self-checking test of uart_rx. Sends random bytes as 8N1
// frames with CLKS_PER_BIT = 8, checks every received byte, its arrival time
// (middle of the stop bit) and that a frame with a low stop bit is dropped.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [7:0] last;
  longint t_valid;
  longint cyc = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .data, .valid);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (valid) begin nvalid++; last = data; t_valid = cyc; end
  end

  task automatic send(input logic [7:0] b, input logic stop = 1'b1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (CPB) @(posedge clk);
    end
    rx = 1'b1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      int n0;
      longint t0;
      b = 8'($urandom);
      n0 = nvalid;
      t0 = cyc;
      send(b);
      repeat (2 * CPB) @(posedge clk);
      checks++;
      if (nvalid != n0 + 1 || last != b) begin
        failures++;
        $display("byte %0d: sent %02h got %02h (%0d strobes)", n, b, last, nvalid - n0);
      end
      // stop bit starts 9 bit periods after the start edge; the byte is
      // reported near its middle (plus two synchroniser cycles)
      checks++;
      if (t_valid - t0 < 9 * CPB || t_valid - t0 > 10 * CPB + 3) begin
        failures++;
        $display("byte %0d: strobe after %0d cycles", n, t_valid - t0);
      end
    end
    begin
      int n0;
      n0 = nvalid;
      send(8'hA5, 1'b0);            // framing error
      repeat (3 * CPB) @(posedge clk);
      checks++;
      if (nvalid != n0) begin failures++; $display("framing error not dropped"); end
      send(8'h3C);
      repeat (2 * CPB) @(posedge clk);
      checks++;
      if (last != 8'h3C) begin failures++; $display("no recovery after framing error"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
