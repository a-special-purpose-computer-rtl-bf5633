// sparc_top: the SPARC Arabic text processing computer.
//
// Two buses, as in the machine's bus structure: the memory bus, on which the
// primary memory controller (sparc_pmc) shares the 64K-byte main memory
// (sparc_memory) between the CPU (sparc_cpu) and the DMA controller
// (sparc_dma); and the I/O bus with its command bus and control/status lines,
// shared by the CPU and the DMA controller, on which the I/O devices sit.
// The devices are outside this design: their side of the I/O bus is brought
// out as ports. While the DMA controller moves a block it owns the I/O bus:
// its data handshakes reach the devices and a CPU I/O instruction waits.
// Commands whose bits [15:13] are 111 are for the DMA controller; a device
// must accept only the commands meant for it. The DMA controller's end of
// block pulse drives interrupt line DMA_IRQ; the other lines come from the
// ext_int port (the bit of ext_int at DMA_IRQ is ignored).
// The one-owner-at-a-time I/O bus sharing and the interrupt wiring are this
// design's own.
module sparc_top
  import sparc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 32768,   // 64K bytes
  parameter int unsigned DMA_IRQ   = 15
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [15:0] ext_int,
  output logic        halted,
  output logic        reset_out,
  // I/O bus, device side
  output word_t       dev_dout,
  output logic        dev_datavalid,
  input  logic        dev_accept,
  input  word_t       dev_din,
  input  logic        dev_ready,
  output logic        dev_accept_out,
  output word_t       dev_cs_out,
  output logic        dev_cs_rdy,
  input  word_t       dev_cs_in
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  // CPU side
  logic  c_rd, c_wr, c_busy;
  word_t c_addr, c_wdata, c_rdata;
  word_t c_dout, c_cs_out;
  logic  c_dv, c_acc_in, c_ready, c_acc_out, c_cs_rdy;
  // DMA side
  logic  d_rd, d_wr, d_busy;
  word_t d_addr, d_wdata, d_rdata;
  word_t d_dout;
  logic  d_dv, d_acc_out, d_cs_acc, dma_busy, dma_done;
  // memory
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  word_t         m_wdata, m_rdata;
  logic          pmc_conflict;
  logic [15:0]   intline;

  always_comb begin
    intline          = ext_int;
    intline[DMA_IRQ] = dma_done;
  end

  sparc_cpu u_cpu (
    .clk, .rst, .start, .intline, .reset_out, .halted,
    .mem_read(c_rd), .mem_write(c_wr), .mem_addr(c_addr), .mem_wdata(c_wdata),
    .mem_rdata(c_rdata), .mem_busy(c_busy),
    .io_dout(c_dout), .io_datavalid(c_dv), .io_accept_in(c_acc_in),
    .io_din(dev_din), .io_ready(c_ready), .io_accept_out(c_acc_out),
    .cs_out(c_cs_out), .cs_rdy(c_cs_rdy), .cs_in(dev_cs_in)
  );

  sparc_dma u_dma (
    .clk, .rst, .cs_cmd(c_cs_out), .cs_rdy(c_cs_rdy), .cs_accept(d_cs_acc),
    .mem_read(d_rd), .mem_write(d_wr), .mem_addr(d_addr), .mem_wdata(d_wdata),
    .mem_rdata(d_rdata), .mem_busy(d_busy),
    .io_dout(d_dout), .io_datavalid(d_dv), .io_accept_in(dev_accept),
    .io_din(dev_din), .io_ready(dev_ready), .io_accept_out(d_acc_out),
    .busy(dma_busy), .done(dma_done)
  );

  sparc_pmc #(.AW(AW)) u_pmc (
    .clk, .rst,
    .cpu_read(c_rd), .cpu_write(c_wr), .cpu_addr(c_addr), .cpu_wdata(c_wdata),
    .cpu_rdata(c_rdata), .cpu_busy(c_busy),
    .dma_read(d_rd), .dma_write(d_wr), .dma_addr(d_addr), .dma_wdata(d_wdata),
    .dma_rdata(d_rdata), .dma_busy(d_busy),
    .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
    .mem_rdata(m_rdata), .conflict(pmc_conflict)
  );

  sparc_memory #(.WORDS(MEM_WORDS), .WIDTH(16)) u_mem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  // I/O bus ownership
  always_comb begin
    dev_cs_out     = c_cs_out;
    dev_cs_rdy     = c_cs_rdy && !dma_busy && (c_cs_out[15:13] != DMA_SEL);
    c_acc_in       = dma_busy ? 1'b0 : (dev_accept || d_cs_acc);
    c_ready        = dma_busy ? 1'b0 : dev_ready;
    dev_dout       = dma_busy ? d_dout : c_dout;
    dev_datavalid  = dma_busy ? d_dv : c_dv;
    dev_accept_out = dma_busy ? d_acc_out : c_acc_out;
  end
endmodule
