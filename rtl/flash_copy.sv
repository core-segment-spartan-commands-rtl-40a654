// flash_copy -- bitstream transfer between flash and SRAM (cmd 16 and cmd 11).
//
// Copies the Virtex bitstream range FIRST..LAST byte by byte, keeping each
// byte at the same address. With `to_flash` low (cmd 16) every byte is read
// from flash IC `sel` and written to the SRAM; with `to_flash` high (cmd 11)
// every byte is read from the SRAM and programmed into flash IC `sel`.
// Flash port: `fl.req` is held until the device answers with a one-cycle
// `fl_ack` (with `fl_rdata` for a read), so any flash access time, including
// program time, is absorbed by the handshake. SRAM port: registered request,
// read data one cycle after the SRAM samples it. `done` pulses when the last
// byte has been transferred.
// The range and the flash select follow the command list (cmd 16); using
// the same range for cmd 11 and the byte handshake are this design's choice.
module flash_copy
  import sc_pkg::*;
#(
  parameter int unsigned AW    = 21,
  parameter logic [23:0] FIRST = 24'h000008,
  parameter logic [23:0] LAST  = 24'h161B33
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       to_flash,
  input  logic       sel,
  output logic       done,
  output flash_req_t fl,
  input  logic       fl_ack,
  input  logic [7:0] fl_rdata,
  output sram_req_t  sram_req,
  input  logic [7:0] sram_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_FREAD, S_SREAD, S_SWAIT, S_SCAP, S_FWRITE, S_NEXT} state_e;
  state_e state;
  logic [23:0] a;
  logic        dir_to_flash;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      a            <= '0;
      dir_to_flash <= 1'b0;
      done         <= 1'b0;
      fl           <= '0;
      sram_req     <= '0;
    end else begin
      done     <= 1'b0;
      sram_req <= '0;
      unique case (state)
        S_IDLE: if (start) begin
          a            <= FIRST;
          dir_to_flash <= to_flash;
          fl.sel       <= sel;
          state        <= to_flash ? S_SREAD : S_FREAD;
        end
        // flash -> SRAM
        S_FREAD: begin
          fl.req  <= 1'b1;
          fl.we   <= 1'b0;
          fl.addr <= a;
          if (fl.req && fl_ack) begin
            fl.req         <= 1'b0;
            sram_req.en    <= 1'b1;
            sram_req.we    <= 1'b1;
            sram_req.addr  <= a & 24'((1 << AW) - 1);
            sram_req.wdata <= fl_rdata;
            state          <= S_NEXT;
          end
        end
        // SRAM -> flash
        S_SREAD: begin
          sram_req.en   <= 1'b1;
          sram_req.addr <= a & 24'((1 << AW) - 1);
          state         <= S_SWAIT;
        end
        S_SWAIT: state <= S_SCAP;
        S_SCAP: begin
          fl.wdata <= sram_rdata;
          state    <= S_FWRITE;
        end
        S_FWRITE: begin
          fl.req  <= 1'b1;
          fl.we   <= 1'b1;
          fl.addr <= a;
          if (fl.req && fl_ack) begin
            fl.req <= 1'b0;
            state  <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (a == LAST) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            a     <= a + 1'b1;
            state <= dir_to_flash ? S_SREAD : S_FREAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
