// v2pro_loader -- configuration of the ADC-card Virtex-II Pro FPGAs (cmd 18).
//
// Byte `aa` selects cards to load from their own serial PROMs, byte `bb`
// bits 0..N_CARDS-1 select cards to load in parallel (SelectMAP) mode from
// flash, and `bb` bit 4+i picks flash IC 0 or 1 for card i.
//  1. Serial load: every card selected in `aa` gets serial mode
//     (`cfg_smap` low) and a PROG_CYCLES-long low pulse on `cfg_prog_b`, all
//     at the same time; the loader then waits until all of them raise DONE.
//  2. Parallel load: the cards selected in `bb` are then taken one after
//     another: SelectMAP mode, PROG_B pulse, wait for INIT_B high, then every
//     flash byte FIRST..LAST is put on `cfg_d` with chip select `cfg_cs_b`
//     low and clocked by one `cfg_cclk` pulse, and CCLK keeps running until
//     the card raises DONE.
// A wait that lasts TIMEOUT cycles gives up and marks the card in `fail`
// (kept until the next start). `done` pulses when everything has finished.
// Flash is read through the same request/acknowledge port as in
// flash_copy. Order (serial first, all serial cards together, parallel
// cards one by one) and the bit assignment follow the command list; the
// pin-level sequence is the usual Virtex-II Pro one and is this design's
// choice, as are PROG_CYCLES and TIMEOUT.
module v2pro_loader
  import sc_pkg::*;
#(
  parameter int unsigned N_CARDS     = 4,
  parameter logic [23:0] FIRST       = 24'h000008,
  parameter logic [23:0] LAST        = 24'h161B33,
  parameter int unsigned PROG_CYCLES = 40,
  parameter int unsigned TIMEOUT     = 48_000_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [7:0]         aa,
  input  logic [7:0]         bb,
  output logic               done,
  output logic [N_CARDS-1:0] fail,
  // card configuration pins
  output logic [N_CARDS-1:0] cfg_prog_b,
  output logic [N_CARDS-1:0] cfg_smap,
  output logic [N_CARDS-1:0] cfg_cs_b,
  output logic               cfg_cclk,
  output logic [7:0]         cfg_d,
  input  logic [N_CARDS-1:0] cfg_init_b,
  input  logic [N_CARDS-1:0] cfg_done,
  // flash port
  output flash_req_t         fl,
  input  logic               fl_ack,
  input  logic [7:0]         fl_rdata
);
  typedef enum logic [3:0] {
    S_IDLE, S_SPROG, S_SWAIT, S_PNEXT, S_PPROG, S_PINIT, S_PREAD, S_PCLK, S_PDONE
  } state_e;
  state_e state;
  logic [N_CARDS-1:0]         ser, par;
  logic [3:0]                 fsel;        // flash IC per card (bb[7:4])
  logic [$clog2(N_CARDS)-1:0] card;
  logic [31:0]                t;           // pulse / timeout counter
  logic [23:0]                a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ser        <= '0;
      par        <= '0;
      fsel       <= '0;
      card       <= '0;
      t          <= '0;
      a          <= '0;
      done       <= 1'b0;
      fail       <= '0;
      cfg_prog_b <= '1;
      cfg_smap   <= '0;
      cfg_cs_b   <= '1;
      cfg_cclk   <= 1'b0;
      cfg_d      <= '0;
      fl         <= '0;
    end else begin
      done <= 1'b0;
      t    <= t + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          ser   <= aa[N_CARDS-1:0];
          par   <= bb[N_CARDS-1:0];
          fsel  <= bb[7:4];
          fail  <= '0;
          card  <= '0;
          t     <= '0;
          if (aa[N_CARDS-1:0] != '0) begin
            cfg_smap   <= cfg_smap & ~aa[N_CARDS-1:0];
            cfg_prog_b <= ~aa[N_CARDS-1:0];
            state      <= S_SPROG;
          end else state <= S_PNEXT;
        end
        S_SPROG: if (t == PROG_CYCLES - 1) begin
          cfg_prog_b <= '1;
          t          <= '0;
          state      <= S_SWAIT;
        end
        S_SWAIT: if ((cfg_done & ser) == ser || t == TIMEOUT - 1) begin
          fail  <= ser & ~cfg_done;
          state <= S_PNEXT;
        end
        S_PNEXT: begin
          if (par == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (par[card]) begin
            par[card]        <= 1'b0;
            cfg_smap[card]   <= 1'b1;
            cfg_prog_b[card] <= 1'b0;
            t                <= '0;
            state            <= S_PPROG;
          end else card <= card + 1'b1;
        end
        S_PPROG: if (t == PROG_CYCLES - 1) begin
          cfg_prog_b[card] <= 1'b1;
          t                <= '0;
          state            <= S_PINIT;
        end
        S_PINIT: begin
          if (t > 1 && cfg_init_b[card]) begin
            a            <= FIRST;
            cfg_cs_b[card] <= 1'b0;
            state        <= S_PREAD;
          end else if (t == TIMEOUT - 1) begin
            fail[card] <= 1'b1;
            state      <= S_PNEXT;
          end
        end
        S_PREAD: begin
          cfg_cclk <= 1'b0;
          fl.req   <= 1'b1;
          fl.we    <= 1'b0;
          fl.sel   <= fsel[card];
          fl.addr  <= a;
          if (fl.req && fl_ack) begin
            fl.req <= 1'b0;
            cfg_d  <= fl_rdata;
            state  <= S_PCLK;
          end
        end
        S_PCLK: begin
          cfg_cclk <= 1'b1;         // card takes cfg_d on this rising edge
          t        <= '0;
          if (a == LAST) state <= S_PDONE;
          else begin
            a     <= a + 1'b1;
            state <= S_PREAD;
          end
        end
        S_PDONE: begin              // start-up clocks until DONE
          cfg_cclk <= ~cfg_cclk;
          if (cfg_done[card] || t == TIMEOUT - 1) begin
            fail[card]     <= ~cfg_done[card];
            cfg_cs_b[card] <= 1'b1;
            cfg_cclk       <= 1'b0;
            state          <= S_PNEXT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
