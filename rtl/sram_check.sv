// sram_check -- SRAM memory check (cmd 15).
//
// On `start` the whole SRAM (2**AW bytes) is tested in two passes. The
// write pass stores mem_pattern(a), the XOR of the address bytes, at every
// address a, one write per cycle. The read pass reads every address in
// order, one read per cycle, and compares each byte two cycles later (the
// request register plus the SRAM's one-cycle read latency). At the first
// mismatch at address a the check stops and reports a - 1 as the last good
// address; if every byte matches it reports 2**AW - 1 (1F FF FF for the 2 MB
// SRAM), which the host reads as success. `done` pulses for one cycle with
// `last_good` valid; the check takes about 2 * 2**AW cycles.
// What is reported follows the command list; the pattern and the two-pass
// order are this design's choice.
module sram_check
  import sc_pkg::*;
#(
  parameter int unsigned AW = 21
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output logic [23:0] last_good,
  output sram_req_t   sram_req,
  input  logic [7:0]  sram_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ, S_DRAIN} state_e;
  state_e state;
  logic [AW-1:0] a;
  logic [1:0]    pv;            // read issued 1 and 2 cycles ago
  logic [AW-1:0] pa [2];        // their addresses

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      a         <= '0;
      pv        <= '0;
      pa[0]     <= '0;
      pa[1]     <= '0;
      done      <= 1'b0;
      last_good <= '0;
      sram_req  <= '0;
    end else begin
      done     <= 1'b0;
      sram_req <= '0;
      pv       <= {pv[0], 1'b0};
      pa[1]    <= pa[0];
      unique case (state)
        S_IDLE: if (start) begin
          a     <= '0;
          state <= S_WRITE;
        end
        S_WRITE: begin
          sram_req.en    <= 1'b1;
          sram_req.we    <= 1'b1;
          sram_req.addr  <= 24'(a);
          sram_req.wdata <= mem_pattern(24'(a));
          a <= a + 1'b1;
          if (&a) state <= S_READ;
        end
        S_READ: begin
          sram_req.en   <= 1'b1;
          sram_req.addr <= 24'(a);
          pv[0] <= 1'b1;
          pa[0] <= a;
          a <= a + 1'b1;
          if (&a) state <= S_DRAIN;
        end
        default: ;
      endcase
      // compare the byte read two cycles ago
      if (state inside {S_READ, S_DRAIN} && pv[1]) begin
        if (sram_rdata != mem_pattern(24'(pa[1]))) begin
          last_good <= 24'(pa[1] - 1'b1);
          done      <= 1'b1;
          state     <= S_IDLE;
          pv        <= '0;
        end else if (&pa[1]) begin
          last_good <= 24'(pa[1]);
          done      <= 1'b1;
          state     <= S_IDLE;
        end
      end
    end
  end
endmodule
