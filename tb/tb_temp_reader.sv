// tb_temp_reader -- self-checking test of temp_reader with ten sensor
// models holding random 16-bit words. Checks every reading, that exactly one
// chip select is low at a time, the number of clock pulses per sensor and
// the readout time, then reads again with new values.
module tb_temp_reader;
  localparam int N = 10, DIV = 3;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic sck;
  logic [N-1:0] cs_n, so;
  logic [N-1:0][15:0] temps;
  logic [15:0] val [N];
  int checks = 0, failures = 0;
  int pulses [N];
  longint cyc = 0;

  temp_reader #(.N_SENS(N), .SCK_DIV(DIV)) dut (
    .clk, .rst_n, .start, .done, .ts_sck(sck), .ts_cs_n(cs_n), .ts_so(so), .temps);
  for (genvar i = 0; i < N; i++) begin : g_s
    temp_sensor_model s (.sck, .cs_n(cs_n[i]), .value(val[i]), .so(so[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && !$onehot0(~cs_n)) begin failures++; $display("two chip selects low"); end
  end
  always @(posedge sck) for (int i = 0; i < N; i++) if (!cs_n[i]) pulses[i]++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      longint t0;
      for (int i = 0; i < N; i++) begin
        val[i] = 16'($urandom);
        pulses[i] = 0;
      end
      // one reading as the command list shows it: -25.0625 degC in the
      // sign/12-bit field, 0.0625 degC per bit starting at d3
      if (r == 1) val[4] = {1'b1, 12'(401), 3'b000};
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      t0 = cyc;
      do @(posedge clk); while (!done);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (temps[i] != val[i]) begin failures++; $display("sensor %0d: %04h, expected %04h", i, temps[i], val[i]); end
        checks++;
        if (pulses[i] != 16) begin failures++; $display("sensor %0d: %0d clock pulses", i, pulses[i]); end
      end
      checks++;
      if (cyc - t0 > N * (34 * DIV + 4)) begin failures++; $display("readout took %0d cycles", cyc - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
