// diva_regfile: scalar general-purpose register file, 32 registers of 32 bits,
// two asynchronous read ports and one synchronous write port, so two operand
// reads and one result write can happen every cycle without a structural hazard.
// Size and port count follow the architecture. Register 0 reads as zero, as in
// DLX, which the scalar ISA is modelled on (this implementation's choice).
// A write is visible to the reads from the next cycle on; same-cycle
// write-to-read bypassing is done by the pipeline's forwarding logic.
module diva_regfile #(
  parameter int NREGS = 32,
  parameter int XLEN  = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic [AW-1:0]   ra_addr,
  input  logic [AW-1:0]   rb_addr,
  output logic [XLEN-1:0] ra_data,
  output logic [XLEN-1:0] rb_data,
  input  logic            we,
  input  logic [AW-1:0]   w_addr,
  input  logic [XLEN-1:0] w_data
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk)
    if (we && w_addr != '0) regs[w_addr] <= w_data;

  assign ra_data = (ra_addr == '0) ? '0 : regs[ra_addr];
  assign rb_data = (rb_addr == '0) ? '0 : regs[rb_addr];
endmodule
