// v2pro_card_model -- behavioural model of the configuration pins of one
// ADC-card FPGA, for testbenches only. A low pulse on `prog_b` clears the
// card (INIT_B and DONE low); INIT_B rises INIT_DLY cycles after PROG_B is
// released. In serial mode (`smap` low) the card loads itself from its PROM
// and raises DONE SER_CYCLES cycles later. In SelectMAP mode it takes one
// byte of `d` on every rising `cclk` (seen at the next `clk` edge) while `cs_b` is low, sums them, and
// raises DONE four clocks after the NBYTES-th byte. With `dead` high the
// card never raises DONE.
module v2pro_card_model #(
  parameter int unsigned NBYTES     = 64,
  parameter int unsigned SER_CYCLES = 100,
  parameter int unsigned INIT_DLY   = 5
) (
  input  logic       clk,
  input  logic       prog_b,
  input  logic       smap,
  input  logic       cs_b,
  input  logic       cclk,
  input  logic [7:0] d,
  input  logic       dead,
  output logic       init_b,
  output logic       done
);
  int unsigned nbytes = 0;
  int unsigned extra = 0;
  int unsigned sum = 0;
  int unsigned t = 0;
  int unsigned loads = 0;
  logic        cleared = 1'b0;

  initial begin
    init_b = 1'b1;
    done   = 1'b0;
  end

  logic cclk_q = 1'b0;

  int unsigned age = 0;         // pins are ignored for the first cycles

  always @(posedge clk) begin
    cclk_q <= cclk;
    if (age < 4) age <= age + 1;
    else if (!prog_b) begin
      init_b  <= 1'b0;
      done    <= 1'b0;
      cleared <= 1'b1;
      nbytes  <= 0;
      extra   <= 0;
      sum     <= 0;
      t       <= 0;
    end else if (cleared) begin
      t <= t + 1;
      if (t == INIT_DLY) init_b <= 1'b1;
      if (!smap && t == SER_CYCLES && !dead) begin
        done    <= 1'b1;
        cleared <= 1'b0;
        loads   <= loads + 1;
      end
      // rising CCLK in SelectMAP mode
      if (smap && cclk && !cclk_q && !cs_b && init_b) begin
        if (nbytes < NBYTES) begin
          nbytes <= nbytes + 1;
          sum    <= sum + d;
        end else begin
          extra <= extra + 1;
          if (extra == 3 && !dead) begin
            done    <= 1'b1;
            cleared <= 1'b0;
            loads   <= loads + 1;
          end
        end
      end
    end
  end
endmodule
