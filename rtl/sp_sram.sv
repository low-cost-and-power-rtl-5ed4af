// sp_sram: single-port synchronous SRAM array with a per-bit write mask.
//
// One instance stands for each of the cache's storage arrays: a tag RAM per way
// (64 entries of tag plus valid bit), a lock/HP bit array per way (64 x 2), the
// per-set collision tag or collision bit vector (64 x 1 in the collision bit vector
// scheme, 64 x 21 with full collision tags) and a data RAM per way (64 x 256).
// These are memory-compiler macros in a real implementation; here they are written
// as an array so that synthesis can map them to whatever RAM is available.
//
// Interface and timing: with en high, a read (we low) returns mem[addr] on rdata
// one clock later, and a write (we high) updates the bits of mem[addr] selected by
// wmask at the clock edge; rdata keeps its value on a write or an idle cycle. The
// array has no reset: its contents are undefined until written, and the cache
// controller clears every entry after reset.
module sp_sram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 21,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wmask,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        mem[addr] <= (mem[addr] & ~wmask) | (wdata & wmask);
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
