// sparc_intc: interrupt request register, mask and priority selection.
//
// Each of the NLINES external interrupt lines sets its bit of the request
// register INTR on a rising clock edge while the line is high; the bit stays
// set until the processor acknowledges that request (ack with ack_id). A
// request is pending when its bit is set in both INTR and the mask register
// MSR; the processor takes it when interrupts are enabled (ENIF), as in
//   INTF = OR(MSR & INTR) & ENIF.
// Among pending requests the lowest-numbered line wins (this priority order
// is this design's own). req and id are combinational from the registers.
module sparc_intc #(
  parameter int unsigned NLINES = 16,
  localparam int unsigned IW    = $clog2(NLINES)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NLINES-1:0] intline,
  input  logic [NLINES-1:0] msr,
  input  logic              enif,
  input  logic              ack,
  input  logic [IW-1:0]     ack_id,
  output logic [NLINES-1:0] intr,
  output logic              req,
  output logic [IW-1:0]     id
);
  logic [NLINES-1:0] pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      intr <= '0;
    end else begin
      for (int i = 0; i < NLINES; i++) begin
        if (intline[i])                   intr[i] <= 1'b1;
        else if (ack && ack_id == IW'(i)) intr[i] <= 1'b0;
      end
    end
  end

  always_comb begin
    pend = intr & msr;
    req  = enif && (pend != '0);
    id   = '0;
    for (int i = NLINES - 1; i >= 0; i--) begin
      if (pend[i]) id = IW'(i);
    end
  end
endmodule
