// uart_rx -- serial receiver for the link from the XPort device server.
//
// 8 data bits, LSB first, no parity, one stop bit. The line is synchronised
// by two flip-flops; a falling edge starts a frame and every bit is sampled
// in the middle of its CLKS_PER_BIT-cycle period. A byte whose stop bit is
// low is discarded. `valid` pulses for one cycle with `data` when a byte is
// complete, in the middle of the stop bit.
// The command list only names the XPort; the UART format and bit rate are
// this design's choice (115200 baud from a 40 MHz clock by default).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 347
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [1:0] {IDLE, START, BITS, STOP} state_e;
  state_e state;
  logic [1:0]  sync;
  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT+1);
  logic [CNT_W-1:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= IDLE;
      cnt   <= '0;
      bitn  <= '0;
      sh    <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      unique case (state)
        IDLE: if (!sync[1]) begin
          state <= START;
          cnt   <= '0;
        end
        START: if (cnt == CNT_W'(CLKS_PER_BIT/2 - 1)) begin
          cnt   <= '0;
          bitn  <= '0;
          state <= sync[1] ? IDLE : BITS;   // glitch: back to idle
        end else cnt <= cnt + 1'b1;
        BITS: if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
          cnt <= '0;
          sh  <= {sync[1], sh[7:1]};
          if (bitn == 3'd7) state <= STOP;
          bitn <= bitn + 1'b1;
        end else cnt <= cnt + 1'b1;
        STOP: if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
          cnt   <= '0;
          state <= IDLE;
          if (sync[1]) begin
            data  <= sh;
            valid <= 1'b1;
          end
        end else cnt <= cnt + 1'b1;
      endcase
    end
  end
endmodule
