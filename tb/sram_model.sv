// sram_model -- behavioural model of the byte-wide SRAM on the slow-control
// card, for testbenches only. A request is sampled on the rising clock edge;
// a write stores `wdata`, a read returns the byte on `rdata` after that edge.
// With `inject` high a read of `inj_addr` returns the stored byte inverted,
// which stands for a faulty memory cell.
module sram_model #(
  parameter int unsigned AW = 21
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata,
  input  logic          inject,
  input  logic [AW-1:0] inj_addr
);
  logic [7:0] mem [2**AW];
  int unsigned writes = 0;
  int unsigned reads = 0;

  initial begin
    rdata = '0;
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    if (en && we) begin
      mem[addr] <= wdata;
      writes++;
    end else if (en) begin
      rdata <= (inject && addr == inj_addr) ? ~mem[addr] : mem[addr];
      reads++;
    end
  end
endmodule
