// frame_rx -- command frame receiver of the slow-control module.
//
// Takes the byte stream from the XPort link and recognises frames addressed
// to this module: byte 0 must be a valid header for this module type (core
// or segment), bytes 1-3 give the length of the rest of the frame (MSB
// first), byte 4 must be the matching address byte and byte 5 is the command.
// Every byte from byte 4 on is written into SRAM from address 0 upward, so a
// cmd 9 stream lands with its payload from address 8 and a following short
// frame only overwrites the header and padding bytes. The first NPARAM
// parameter bytes are also captured in `frame.p`. `frame_done` pulses for
// one cycle after the last byte; `frame` is stable until the next frame.
//
// An I/O watchdog drops a frame that receives no byte for WDT_CYCLES cycles
// and pulses `wdt_timeout`. Bytes that arrive while `busy` is high (a command
// is executing) are dropped. A byte 0 that is not a header is skipped, which
// resynchronises the parser; a wrong byte 4 abandons the frame (`hdr_err`).
// Frame layout and SRAM placement follow the command list; the watchdog
// condition, dropping while busy and the length byte order (taken from the
// examples) are this design's reading.
module frame_rx
  import sc_pkg::*;
#(
  parameter bit          IS_CORE    = 1'b1,
  parameter int unsigned SRAM_AW    = 21,
  parameter int unsigned WDT_CYCLES = 4_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  input  logic       busy,
  output frame_t     frame,
  output logic       frame_done,
  output sram_req_t  sram_req,
  output logic       wdt_timeout,
  output logic       hdr_err
);
  typedef enum logic [2:0] {S_H0, S_L2, S_L1, S_L0, S_H4, S_CMD, S_BODY} state_e;
  state_e state;
  logic [23:0] idx;        // index of the next byte counted from byte 4
  localparam int unsigned WDT_W = $clog2(WDT_CYCLES+1);
  logic [WDT_W-1:0] wdt;
  logic take;
  logic last;

  assign take = rx_valid && !busy;
  assign last = (idx + 24'd1 >= frame.len);

  function automatic logic is_hdr0(input logic [7:0] b);
    return b[7] == ~IS_CORE && b[4:0] == 5'b0 && b[6:5] != 2'b11;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_H0;
      frame       <= '0;
      idx         <= '0;
      wdt         <= '0;
      frame_done  <= 1'b0;
      wdt_timeout <= 1'b0;
      hdr_err     <= 1'b0;
      sram_req    <= '0;
    end else begin
      frame_done  <= 1'b0;
      wdt_timeout <= 1'b0;
      hdr_err     <= 1'b0;
      sram_req    <= '0;
      if (state != S_H0 && !take) begin
        if (wdt == WDT_W'(WDT_CYCLES - 1)) begin
          wdt         <= '0;
          state       <= S_H0;
          wdt_timeout <= 1'b1;
        end else wdt <= wdt + 1'b1;
      end else wdt <= '0;
      if (take) begin
        if (state >= S_H4 && idx < 24'(1 << SRAM_AW)) begin
          sram_req.en    <= 1'b1;
          sram_req.we    <= 1'b1;
          sram_req.addr  <= idx;
          sram_req.wdata <= rx_data;
        end
        unique case (state)
          S_H0: if (is_hdr0(rx_data)) begin
            frame.ftype <= frame_type_e'(rx_data[6:5]);
            frame.p     <= '0;
            state       <= S_L2;
          end
          S_L2: begin frame.len[23:16] <= rx_data; state <= S_L1; end
          S_L1: begin frame.len[15:8]  <= rx_data; state <= S_L0; end
          S_L0: begin
            frame.len[7:0] <= rx_data;
            idx <= '0;
            // a frame must hold at least the address and command bytes
            state <= ({frame.len[23:8], rx_data} < 24'd2) ? S_H0 : S_H4;
          end
          S_H4: begin
            idx <= idx + 1'b1;
            if (rx_data == hdr4(IS_CORE, frame.ftype)) state <= S_CMD;
            else begin
              state   <= S_H0;
              hdr_err <= 1'b1;
            end
          end
          S_CMD: begin
            frame.cmd <= rx_data;
            idx <= idx + 1'b1;
            if (last) begin
              state      <= S_H0;
              frame_done <= 1'b1;
            end else state <= S_BODY;
          end
          S_BODY: begin
            if (idx - 24'd2 < 24'(NPARAM)) frame.p[3'(idx - 24'd2)] <= rx_data;
            idx <= idx + 1'b1;
            if (last) begin
              state      <= S_H0;
              frame_done <= 1'b1;
            end
          end
          default: state <= S_H0;
        endcase
      end
    end
  end
endmodule
