// tb_uart_tx -- self-checking test of uart_tx. Offers random bytes back to
// back with CLKS_PER_BIT = 8, decodes the serial line independently in the
// middle of every bit and checks the data, the stop bit and that each byte
// occupies exactly 10 bit periods.
module tb_uart_tx;
  localparam int CPB = 8;
  localparam int N = 30;
  logic clk = 0, rst_n = 0;
  logic [7:0] data;
  logic valid = 0, ready, tx;
  int checks = 0, failures = 0;
  logic [7:0] sent [N];
  longint cyc = 0;
  longint t_start [N];

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .tx);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line decoder
  initial begin
    @(posedge rst_n);
    for (int n = 0; n < N; n++) begin
      logic [7:0] b;
      @(negedge tx);
      t_start[n] = cyc;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (b != sent[n] || tx != 1'b1) begin
        failures++;
        $display("byte %0d: sent %02h line %02h stop %b", n, sent[n], b, tx);
      end
      if (n > 0) begin
        checks++;
        if (t_start[n] - t_start[n-1] != 10 * CPB) begin
          failures++;
          $display("byte %0d: %0d cycles after previous", n, t_start[n] - t_start[n-1]);
        end
      end
    end
    repeat (4 * CPB) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) sent[n] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      data  = sent[n];
      valid = 1'b1;
      while (!ready) @(negedge clk);
      @(negedge clk);               // taken on the edge in between
      valid = 1'b0;
      // ready must be low while the byte is on the line
      checks++;
      if (ready) begin failures++; $display("ready high while sending"); end
    end
  end
endmodule
