// uart_tx -- serial transmitter for the reply link to the XPort device server.
//
// 8 data bits, LSB first, no parity, one stop bit, CLKS_PER_BIT cycles per
// bit. A byte is taken when `valid` and `ready` are both high; `ready` is
// high while the transmitter is idle and in the last cycle of a stop bit, so one byte occupies the line for
// exactly 10 bit periods and back-to-back bytes follow without a gap.
// `tx` comes straight from the shift register. The UART format is this design's choice; the command list
// only says that replies go to the XPort.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 347
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);
  logic [9:0] sh;       // {stop, data, start}, shifted out LSB first
  logic [3:0] nbits;    // bits still to send
  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT+1);
  logic [CNT_W-1:0] cnt;

  // ready while idle and in the last cycle of a stop bit
  assign ready = (nbits == 0) || (nbits == 4'd1 && cnt == CNT_W'(CLKS_PER_BIT - 1));
  assign tx    = sh[0];         // sh is all ones while idle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (ready) begin
      if (valid) begin
        sh    <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
      end else if (nbits != 0) begin
        sh    <= '1;
        nbits <= '0;
        cnt   <= '0;
      end
    end else begin
      if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
        cnt   <= '0;
        sh    <= {1'b1, sh[9:1]};
        nbits <= nbits - 1'b1;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
