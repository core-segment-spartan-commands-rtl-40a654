// flash_model -- behavioural model of the two flash ICs, for testbenches
// only. A request held on `req` is answered after LAT cycles by a one-cycle
// `ack`; a read returns the byte of IC `sel` on `rdata` with the ack, a write
// stores `wdata` there. Each IC holds 2**AW bytes.
module flash_model #(
  parameter int unsigned AW  = 21,
  parameter int unsigned LAT = 3
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic        sel,
  input  logic [23:0] addr,
  input  logic [7:0]  wdata,
  output logic        ack,
  output logic [7:0]  rdata
);
  logic [7:0] mem0 [2**AW];
  logic [7:0] mem1 [2**AW];
  int unsigned cnt = 0;
  int unsigned writes = 0;
  int unsigned reads = 0;

  initial begin
    ack = 1'b0;
    rdata = '0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (cnt == LAT) begin
        cnt <= 0;
        ack <= 1'b1;
        if (we) begin
          if (sel) mem1[addr[AW-1:0]] <= wdata; else mem0[addr[AW-1:0]] <= wdata;
          writes++;
        end else begin
          rdata <= sel ? mem1[addr[AW-1:0]] : mem0[addr[AW-1:0]];
          reads++;
        end
      end else cnt <= cnt + 1;
    end else cnt <= 0;
  end
endmodule
