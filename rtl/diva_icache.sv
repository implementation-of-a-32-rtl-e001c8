// diva_icache: the instruction cache in front of the fetch stage.
// Direct-mapped, LINES lines of one 256-bit bus row (eight instructions)
// each. A hit returns the instruction combinationally in the fetch cycle
// (valid high). On a miss valid stays low, which stalls fetch, and the cache
// requests the line over the node memory bus; the pipeline resumes once the
// fill has been written. The invalidate input clears the one line that holds
// inv_addr, so the supervisor can evict code without flushing the whole
// cache. Stalling on a miss and the single-line invalidate are the
// architecture's; organisation and size are this design's (not published).
// Bus protocol: bus_req is held until bus_rsp.done, which carries the line.
// The cache only reads, so the write fields of bus_req are constant zero.
module diva_icache
  import diva_pkg::*;
#(
  parameter int LINES = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] addr,
  input  logic        fetch,      // a fetch is wanted this cycle
  output logic        valid,
  output logic [31:0] instr,
  input  logic        inv,
  input  logic [31:0] inv_addr,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp,
  output logic        miss_start  // pulses when a fill starts (statistics)
);
  localparam int IW = $clog2(LINES);
  localparam int TW = 32 - 5 - IW;

  logic [BUS_W-1:0] data [LINES];
  logic [TW-1:0]    tags [LINES];
  logic [LINES-1:0] vld;

  logic [IW-1:0] idx, inv_idx, fill_idx;
  logic [TW-1:0] tag, fill_tag;
  logic          filling;
  logic [31:0]   fill_addr;
  logic [BUS_W-1:0] line;

  assign idx     = addr[5 +: IW];
  assign tag     = addr[31 -: TW];
  assign inv_idx = inv_addr[5 +: IW];
  assign fill_idx = fill_addr[5 +: IW];
  assign fill_tag = fill_addr[31 -: TW];

  assign line  = data[idx];
  assign valid = vld[idx] && tags[idx] == tag;
  assign instr = line[addr[4:2]*32 +: 32];

  assign miss_start = fetch && !valid && !filling;

  always_comb begin
    bus_req       = '0;
    bus_req.valid = filling;
    bus_req.addr  = {fill_addr[31:5], 5'd0};
  end

  always_ff @(posedge clk)
    if (filling && bus_rsp.done) begin
      data[fill_idx] <= bus_rsp.rdata;
      tags[fill_idx] <= fill_tag;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vld       <= '0;
      filling   <= 1'b0;
      fill_addr <= '0;
    end else begin
      if (miss_start) begin
        filling   <= 1'b1;
        fill_addr <= addr;
      end else if (filling && bus_rsp.done) begin
        filling       <= 1'b0;
        vld[fill_idx] <= 1'b1;
      end
      if (inv && !(filling && bus_rsp.done && inv_idx == fill_idx))
        vld[inv_idx] <= 1'b0;
    end
endmodule
