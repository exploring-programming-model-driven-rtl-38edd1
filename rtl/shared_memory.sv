// shared_memory: one memory bank (a shared L2 bank SM or a private L2
// bank PM of the platform).
//
// Synchronous single-port RAM of 2**AW words of DW bits. A write happens on
// the clock edge where en and we are high; a read (en high, we low) returns
// the word on rdata in the following cycle, and rdata holds it until the
// next read. Bank size is not given by the published design; 1024 words of
// 32 bits is this design's choice. Contents are not reset.
module shared_memory #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
