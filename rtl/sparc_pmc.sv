// sparc_pmc: primary memory controller.
//
// Arbitrates main memory between the CPU and the DMA controller. Each
// requester holds read or write, a byte address and (for a write) the data
// until its busy output is low at a rising clock edge; in that cycle a read
// returns its data on rdata. busy is high whenever the requester asks and
// its access is not completing in that cycle, as the CPU's BUSY input is
// used by the machine's control sequence.
// An access takes two cycles: in ISSUE the winner's request goes to the
// RAM, in DONE the RAM's data is returned and the winner released. When
// both ask in the same cycle the DMA controller wins (this priority and the
// timing are this design's own); the loser keeps waiting. Address bit 0
// is ignored: memory accesses are whole words.
module sparc_pmc
  import sparc_pkg::*;
#(
  parameter int unsigned AW = 15     // word address bits of the RAM
) (
  input  logic          clk,
  input  logic          rst,
  // CPU port
  input  logic          cpu_read,
  input  logic          cpu_write,
  input  word_t         cpu_addr,
  input  word_t         cpu_wdata,
  output word_t         cpu_rdata,
  output logic          cpu_busy,
  // DMA port
  input  logic          dma_read,
  input  logic          dma_write,
  input  word_t         dma_addr,
  input  word_t         dma_wdata,
  output word_t         dma_rdata,
  output logic          dma_busy,
  // RAM side
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output word_t         mem_wdata,
  input  word_t         mem_rdata,
  // contention: both asked while the controller was free
  output logic          conflict
);
  typedef enum logic {S_ISSUE, S_DONE} state_e;
  state_e state;
  logic   owner_dma;      // owner of the access in S_DONE
  logic   cpu_req, dma_req, grant_dma;

  always_comb begin
    cpu_req   = cpu_read || cpu_write;
    dma_req   = dma_read || dma_write;
    grant_dma = dma_req;
    conflict  = (state == S_ISSUE) && cpu_req && dma_req;
    mem_en    = (state == S_ISSUE) && (cpu_req || dma_req);
    mem_we    = grant_dma ? dma_write : cpu_write;
    mem_addr  = grant_dma ? dma_addr[AW:1] : cpu_addr[AW:1];
    mem_wdata = grant_dma ? dma_wdata : cpu_wdata;
    cpu_rdata = mem_rdata;
    dma_rdata = mem_rdata;
    cpu_busy  = cpu_req && !((state == S_DONE) && !owner_dma);
    dma_busy  = dma_req && !((state == S_DONE) && owner_dma);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_ISSUE;
      owner_dma <= 1'b0;
    end else begin
      unique case (state)
        S_ISSUE: if (cpu_req || dma_req) begin
          state     <= S_DONE;
          owner_dma <= grant_dma;
        end
        S_DONE: state <= S_ISSUE;
      endcase
    end
  end

  // Handshake rule: a requester keeps asking until its access completes.
  a_cpu_hold: assert property (@(posedge clk) disable iff (rst)
    cpu_busy |=> (cpu_read || cpu_write));
  a_dma_hold: assert property (@(posedge clk) disable iff (rst)
    dma_busy |=> (dma_read || dma_write));
endmodule
