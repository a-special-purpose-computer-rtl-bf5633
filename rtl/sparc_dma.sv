// sparc_dma: DMA controller between the I/O bus and main memory.
//
// The CPU programs the controller with command words on the command bus
// (CSBUS, strobed by CSRDY). A command is for the DMA controller when its
// bits [15:13] are 111; bits [12:11] select what it sets and bits [10:0]
// carry the value:
//   0  address bits 7..0      1  address bits 15..8
//   2  word count (11 bits)   3  start; bit 0 = 1 device to memory,
//                                        bit 0 = 0 memory to device
// The controller accepts a command (ACCEPT) only while idle. Once started it
// owns the I/O bus (busy high) and moves count words, one at a time, between
// consecutive word addresses in memory (through the primary memory
// controller) and the device, using the same handshakes as the CPU:
// output, DATAVALID held with the word until the device's ACCEPT; input,
// ACCEPT given to the device in the cycle its READY is seen. After the last
// word it pulses done for one cycle (wired to an interrupt line).
// The machine only names its DMA controller; the command format, the
// handshakes and the one-word-at-a-time operation are this design's own.
module sparc_dma
  import sparc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // command bus from the CPU
  input  word_t cs_cmd,
  input  logic  cs_rdy,
  output logic  cs_accept,
  // memory port to the primary memory controller
  output logic  mem_read,
  output logic  mem_write,
  output word_t mem_addr,
  output word_t mem_wdata,
  input  word_t mem_rdata,
  input  logic  mem_busy,
  // I/O bus, master side while busy
  output word_t io_dout,
  output logic  io_datavalid,
  input  logic  io_accept_in,
  input  word_t io_din,
  input  logic  io_ready,
  output logic  io_accept_out,
  // status
  output logic  busy,
  output logic  done
);
  typedef enum logic [2:0] {S_IDLE, S_MRD, S_SEND, S_RECV, S_MWR, S_NEXT} state_e;
  state_e      state;
  word_t       addr, data;
  logic [10:0] count;
  logic        to_mem;
  logic        cmd_hit;

  always_comb begin
    cmd_hit       = cs_rdy && (cs_cmd[15:13] == DMA_SEL);
    cs_accept     = cmd_hit && (state == S_IDLE);
    busy          = (state != S_IDLE);
    mem_read      = (state == S_MRD);
    mem_write     = (state == S_MWR);
    mem_addr      = addr;
    mem_wdata     = data;
    io_dout       = data;
    io_datavalid  = (state == S_SEND);
    io_accept_out = (state == S_RECV) && io_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      addr   <= '0;
      data   <= '0;
      count  <= '0;
      to_mem <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cs_accept) begin
          unique case (dma_reg_e'(cs_cmd[12:11]))
            DMA_ADDR_LO: addr[7:0]  <= cs_cmd[7:0];
            DMA_ADDR_HI: addr[15:8] <= cs_cmd[7:0];
            DMA_COUNT:   count      <= cs_cmd[10:0];
            DMA_START: begin
              to_mem <= cs_cmd[0];
              if (count == '0)    done  <= 1'b1;
              else if (cs_cmd[0]) state <= S_RECV;
              else                state <= S_MRD;
            end
          endcase
        end
        S_MRD: if (!mem_busy) begin
          data  <= mem_rdata;
          state <= S_SEND;
        end
        S_SEND: if (io_accept_in) state <= S_NEXT;
        S_RECV: if (io_ready) begin
          data  <= io_din;
          state <= S_MWR;
        end
        S_MWR: if (!mem_busy) state <= S_NEXT;
        S_NEXT: begin
          addr  <= addr + 16'd2;
          count <= count - 11'd1;
          if (count == 11'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= to_mem ? S_RECV : S_MRD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
