// sparc_regfile: the bank of general-purpose registers R0..R15.
//
// NREGS registers of WIDTH bits (16 x 16 in the machine). R15 doubles as
// the program counter and R14 as the stack pointer; that role is given to
// them by the controller, the bank itself treats all registers alike.
// Two combinational read ports, one write port written on the rising clock
// edge when we is high. A read of the register being written returns the
// old value. Synchronous reset clears every register.
module sparc_regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra_addr,
  output logic [WIDTH-1:0] ra_data,
  input  logic [AW-1:0]    rb_addr,
  output logic [WIDTH-1:0] rb_data,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] r [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (we) begin
      r[wa] <= wd;
    end
  end

  assign ra_data = r[ra_addr];
  assign rb_data = r[rb_addr];
endmodule
