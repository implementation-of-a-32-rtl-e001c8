// diva_node_memory: the node memory array. In the single-node prototype the
// node's memory is 8 Mbit of SRAM; it is modelled here as a synthesizable
// single-port array of ROWS rows of WIDTH bits (default 32768 x 256 = 8 Mbit)
// with per-byte write enables. The row width equal to the 256-bit WideWord, so
// that one access moves a whole WideWord or instruction-cache line, is this
// design's choice. Timing: an access is presented with en high; a write
// updates the enabled bytes at the clock edge, a read returns the row in
// rdata after that edge (one-cycle latency, held until the next read).
module diva_node_memory #(
  parameter int ROWS  = 32768,
  parameter int WIDTH = 256,
  localparam int AW   = $clog2(ROWS)
) (
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [AW-1:0]      addr,
  input  logic [WIDTH/8-1:0] be,
  input  logic [WIDTH-1:0]   wdata,
  output logic [WIDTH-1:0]   rdata
);
  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk)
    if (en) begin
      if (we) begin
        for (int i = 0; i < WIDTH / 8; i++)
          if (be[i]) mem[addr][i*8 +: 8] <= wdata[i*8 +: 8];
      end else
        rdata <= mem[addr];
    end
endmodule
