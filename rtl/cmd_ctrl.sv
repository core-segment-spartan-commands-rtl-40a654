// cmd_ctrl -- command dispatcher, register file and reply sender.
//
// When `frame_done` pulses, the command in `frame` is executed and `busy`
// stays high until it has finished, reply included:
//   cmd 9  store stream  : nothing to do, frame_rx already wrote the SRAM
//   cmd 10 SRAM dump     : sends SRAM[start..stop] in an SR reply frame and
//                          writes each byte read to address (a - start), so
//                          the range is also copied to address 0 upward
//   cmd 11 / 16          : starts flash_copy (SRAM -> flash / flash -> SRAM)
//   cmd 12 / 13          : write / read the stop and start pointers
//   cmd 14 status        : six status bytes; clears the watchdog counter
//   cmd 15 memory check  : runs sram_check, replies its last good address
//   cmd 17 / 20 / 40     : ADC clock enable, power shut-down, clock source
//                          (core build only)
//   cmd 18               : starts v2pro_loader with bytes aa, bb
//   cmd 19               : runs temp_reader, replies 20 bytes, MSB first
// An SR reply is header (hdr0(SR), 3 length bytes, hdr4(SR), command)
// followed by the payload; the length counts the bytes from the fifth on.
// NW and LW commands send nothing back; unknown commands are ignored.
// Replies leave through a valid/ready byte port, one byte per handshake.
// The SRAM request is registered; the SRAM samples it on the next edge and
// returns read data one cycle later, so a dump byte takes a read, a wait, a
// write-back and a send step. Command codes, reply layouts and register bits follow the
// command list; the cmd 10 framing, the watchdog counter saturating at 255
// and ignoring core-only commands in the segment build are this design's
// choices.
module cmd_ctrl
  import sc_pkg::*;
#(
  parameter bit          IS_CORE = 1'b1,
  parameter logic [6:0]  VERSION = 7'd17,
  parameter int unsigned SRAM_AW = 21,
  parameter int unsigned N_SENS  = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  // received command
  input  frame_t     frame,
  input  logic       frame_done,
  input  logic       wdt_timeout,
  output logic       busy,
  // reply bytes
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  // SRAM port (cmd 10)
  output sram_req_t  sram_req,
  input  logic [7:0] sram_rdata,
  // sub-engines
  output logic       chk_start,
  input  logic       chk_done,
  input  logic [23:0] chk_last_good,
  output logic       fc_start,
  output logic       fc_to_flash,
  output logic       fc_sel,
  input  logic       fc_done,
  output logic       ts_start,
  input  logic       ts_done,
  input  logic [N_SENS-1:0][15:0] temps,
  output logic       v2_start,
  output logic [7:0] v2_aa,
  output logic [7:0] v2_bb,
  input  logic       v2_done,
  // module status and control
  input  logic       psu_ok_core,
  input  logic       psu_ok_seg,
  output logic       vclk_en,
  output logic       clk_int_sel,
  output logic       pwr_shutdown,
  output logic [23:0] start_ptr,
  output logic [23:0] stop_ptr
);
  localparam int unsigned RBUF = 2 * N_SENS;   // largest buffered payload

  typedef enum logic [3:0] {
    S_IDLE, S_EXEC, S_WAIT, S_HDR, S_BUF, S_DRD, S_DWAIT, S_DCAP, S_DSEND
  } state_e;
  state_e state;

  logic [7:0]  cmd;
  logic [7:0]  rbuf [RBUF];
  logic [4:0]  rlen;            // payload bytes in rbuf
  logic [4:0]  ridx;
  logic [2:0]  hidx;
  logic [23:0] plen;            // payload length written in the header
  logic        dump;            // payload comes from SRAM (cmd 10)
  logic [23:0] cur;
  logic [7:0]  dbyte;
  logic [7:0]  wdt_cnt;
  logic [2:0]  c20_bits;
  logic [7:0]  hdr [6];

  // header of an SR reply
  always_comb begin
    logic [23:0] l;
    l = plen + 24'd2;
    hdr[0] = hdr0(IS_CORE, FT_SR);
    hdr[1] = l[23:16];
    hdr[2] = l[15:8];
    hdr[3] = l[7:0];
    hdr[4] = hdr4(IS_CORE, FT_SR);
    hdr[5] = cmd;
  end

  assign busy = (state != S_IDLE);

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = '0;
    unique case (state)
      S_HDR:   begin tx_valid = 1'b1; tx_data = hdr[hidx]; end
      S_BUF:   begin tx_valid = 1'b1; tx_data = rbuf[ridx]; end
      S_DSEND: begin tx_valid = 1'b1; tx_data = dbyte; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cmd          <= '0;
      rlen         <= '0;
      ridx         <= '0;
      hidx         <= '0;
      plen         <= '0;
      dump         <= 1'b0;
      cur          <= '0;
      dbyte        <= '0;
      wdt_cnt      <= '0;
      c20_bits     <= '0;
      vclk_en      <= 1'b0;     // power-up default: not enabled
      clk_int_sel  <= 1'b0;     // power-up default: external
      pwr_shutdown <= 1'b0;
      start_ptr    <= '0;
      stop_ptr     <= '0;
      sram_req     <= '0;
      chk_start    <= 1'b0;
      fc_start     <= 1'b0;
      fc_to_flash  <= 1'b0;
      fc_sel       <= 1'b0;
      ts_start     <= 1'b0;
      v2_start     <= 1'b0;
      v2_aa        <= '0;
      v2_bb        <= '0;
      for (int i = 0; i < RBUF; i++) rbuf[i] <= '0;
    end else begin
      chk_start <= 1'b0;
      fc_start  <= 1'b0;
      ts_start  <= 1'b0;
      v2_start  <= 1'b0;
      sram_req  <= '0;
      if (wdt_timeout && wdt_cnt != 8'hFF) wdt_cnt <= wdt_cnt + 1'b1;

      unique case (state)
        S_IDLE: if (frame_done) begin
          cmd   <= frame.cmd;
          state <= S_EXEC;
        end

        S_EXEC: begin
          state <= S_IDLE;
          dump  <= 1'b0;
          hidx  <= '0;
          ridx  <= '0;
          unique case (cmd)
            CMD_DUMP_SRAM: begin
              dump  <= 1'b1;
              cur   <= start_ptr;
              plen  <= (stop_ptr >= start_ptr) ? stop_ptr - start_ptr + 24'd1 : 24'd0;
              state <= S_HDR;
            end
            CMD_PROG_FLASH, CMD_LOAD_SRAM: begin
              fc_start    <= 1'b1;
              fc_to_flash <= (cmd == CMD_PROG_FLASH);
              fc_sel      <= frame.p[0][0];
              state       <= S_WAIT;
            end
            CMD_SET_PTR: begin
              stop_ptr  <= {frame.p[0], frame.p[1], frame.p[2]};
              start_ptr <= {frame.p[3], frame.p[4], frame.p[5]};
            end
            CMD_GET_PTR: begin
              rbuf[0] <= stop_ptr[23:16];
              rbuf[1] <= stop_ptr[15:8];
              rbuf[2] <= stop_ptr[7:0];
              rbuf[3] <= start_ptr[23:16];
              rbuf[4] <= start_ptr[15:8];
              rbuf[5] <= start_ptr[7:0];
              rlen    <= 5'd6;
              plen    <= 24'd6;
              state   <= S_HDR;
            end
            CMD_STATUS: begin
              rbuf[0] <= {4'b0, psu_ok_seg, IS_CORE ? psu_ok_core : 1'b0, clk_int_sel, vclk_en};
              rbuf[1] <= wdt_cnt;
              rbuf[2] <= wdt_cnt;
              rbuf[3] <= {1'b0, c20_bits, 4'b0};
              rbuf[4] <= wdt_cnt;
              rbuf[5] <= {IS_CORE, VERSION};
              // reading clears the count; a timeout in this cycle is kept
              wdt_cnt <= {7'b0, wdt_timeout};
              rlen    <= 5'd6;
              plen    <= 24'd6;
              state   <= S_HDR;
            end
            CMD_MEM_CHECK: begin
              chk_start <= 1'b1;
              state     <= S_WAIT;
            end
            CMD_VCLK_EN: if (IS_CORE) vclk_en <= frame.p[0][0];
            CMD_V2P_LOAD: begin
              v2_aa    <= frame.p[0];
              v2_bb    <= frame.p[1];
              v2_start <= 1'b1;
              state    <= S_WAIT;
            end
            CMD_TEMP: begin
              ts_start <= 1'b1;
              state    <= S_WAIT;
            end
            CMD_POWER: if (IS_CORE) begin
              c20_bits <= frame.p[0][2:0];
              if (frame.p[0][3]) pwr_shutdown <= 1'b1;
            end
            CMD_CLK_SEL: if (IS_CORE) clk_int_sel <= frame.p[0][0];
            default: ;   // cmd 9 and unknown codes
          endcase
        end

        S_WAIT: begin
          if (chk_done) begin
            rbuf[0] <= chk_last_good[23:16];
            rbuf[1] <= chk_last_good[15:8];
            rbuf[2] <= chk_last_good[7:0];
            rlen    <= 5'd3;
            plen    <= 24'd3;
            state   <= S_HDR;
          end
          if (ts_done) begin
            for (int i = 0; i < N_SENS; i++) begin
              rbuf[2*i]   <= temps[i][15:8];
              rbuf[2*i+1] <= temps[i][7:0];
            end
            rlen  <= 5'(RBUF);
            plen  <= 24'(RBUF);
            state <= S_HDR;
          end
          if (fc_done || v2_done) state <= S_IDLE;
        end

        S_HDR: if (tx_ready) begin
          hidx <= hidx + 1'b1;
          if (hidx == 3'd5) begin
            if (dump) state <= (plen == 0) ? S_IDLE : S_DRD;
            else      state <= (rlen == 0) ? S_IDLE : S_BUF;
          end
        end

        S_BUF: if (tx_ready) begin
          ridx <= ridx + 1'b1;
          if (ridx == rlen - 1'b1) state <= S_IDLE;
        end

        S_DRD: begin
          sram_req.en   <= 1'b1;
          sram_req.we   <= 1'b0;
          sram_req.addr <= cur;
          state         <= S_DWAIT;
        end

        S_DWAIT: state <= S_DCAP;     // SRAM samples the request

        S_DCAP: begin
          dbyte          <= sram_rdata;
          sram_req.en    <= 1'b1;
          sram_req.we    <= 1'b1;
          sram_req.addr  <= cur - start_ptr;
          sram_req.wdata <= sram_rdata;
          state          <= S_DSEND;
        end

        S_DSEND: if (tx_ready) begin
          if (cur == stop_ptr) state <= S_IDLE;
          else begin
            cur   <= cur + 1'b1;
            state <= S_DRD;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
