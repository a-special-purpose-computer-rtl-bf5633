// sparc_memory: main memory, 64K bytes organised as 32K 16-bit words.
//
// Single-port synchronous RAM behind the primary memory controller. On a
// rising edge with en high, a write (we = 1) stores wdata at word address
// addr; a read (we = 0) loads the word into rdata, which is valid from the
// next cycle on and holds until the next read. Contents are not reset.
// The size follows the machine's 64K-byte address space; the word
// organisation and the one-cycle read latency are this design's own.
module sparc_memory #(
  parameter int unsigned WORDS = 32768,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
