// temp_reader -- temperature sensor readout (cmd 19).
//
// On `start` the N_SENS sensors are read one after another over a shared
// SPI clock `ts_sck` with one active-low chip select each and one data line
// each (`ts_so[i]`). For a sensor the chip select goes low, then 16 clock
// pulses follow (SCK_DIV cycles high, SCK_DIV low); the data bit is taken
// as the clock rises, most significant bit first, and the sensor is
// expected to change its output after the falling edge. The 16-bit words
// are kept in `temps` in the sensor's own format (d15 sign, d14..d3 the
// 12-bit reading at 0.0625 degC per bit, d2..d0 unused) and `done` pulses
// after the last sensor. One readout takes about N_SENS * 34 * SCK_DIV
// cycles. The word format and the twenty reply bytes follow the command
// list; the SPI bus, its timing and reading on demand are this design's
// choice.
module temp_reader #(
  parameter int unsigned N_SENS  = 10,
  parameter int unsigned SCK_DIV = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     done,
  output logic                     ts_sck,
  output logic [N_SENS-1:0]        ts_cs_n,
  input  logic [N_SENS-1:0]        ts_so,
  output logic [N_SENS-1:0][15:0]  temps
);
  typedef enum logic [2:0] {S_IDLE, S_CS, S_HIGH, S_LOW, S_GAP} state_e;
  state_e state;
  logic [$clog2(N_SENS)-1:0]  sidx;
  logic [4:0]                 nbit;
  logic [$clog2(SCK_DIV+1)-1:0] div;
  logic [15:0]                sh;
  logic                       tick;

  assign tick = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sidx    <= '0;
      nbit    <= '0;
      div     <= '0;
      sh      <= '0;
      done    <= 1'b0;
      ts_sck  <= 1'b0;
      ts_cs_n <= '1;
      temps   <= '0;
    end else begin
      done <= 1'b0;
      if (!tick) div <= div - 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          sidx    <= '0;
          ts_cs_n <= ~(N_SENS'(1));
          div     <= ($clog2(SCK_DIV+1))'(SCK_DIV - 1);
          state   <= S_CS;
          nbit    <= '0;
        end
        S_CS: if (tick) begin          // chip select set-up time
          ts_sck <= 1'b1;
          sh     <= {sh[14:0], ts_so[sidx]};
          div    <= ($clog2(SCK_DIV+1))'(SCK_DIV - 1);
          state  <= S_HIGH;
        end
        S_HIGH: if (tick) begin
          ts_sck <= 1'b0;
          nbit   <= nbit + 1'b1;
          div    <= ($clog2(SCK_DIV+1))'(SCK_DIV - 1);
          state  <= (nbit == 5'd15) ? S_GAP : S_LOW;
        end
        S_LOW: if (tick) begin
          ts_sck <= 1'b1;
          sh     <= {sh[14:0], ts_so[sidx]};
          div    <= ($clog2(SCK_DIV+1))'(SCK_DIV - 1);
          state  <= S_HIGH;
        end
        S_GAP: if (tick) begin
          temps[sidx] <= sh;
          ts_cs_n     <= '1;
          div         <= ($clog2(SCK_DIV+1))'(SCK_DIV - 1);
          nbit        <= '0;
          if (sidx == ($clog2(N_SENS))'(N_SENS - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            sidx  <= sidx + 1'b1;
            state <= S_CS;
          end
        end
        default: state <= S_IDLE;
      endcase
      // next chip select one gap after the previous one was released
      if (state == S_CS && ts_cs_n == '1) ts_cs_n <= ~(N_SENS'(1) << sidx);
    end
  end
endmodule
