// diva_node: one DIVA processing-in-memory node. The scalar processor
// (diva_core) fetches through the instruction cache and reaches memory over
// the node data bus, which the memory bus control and arbiter shares among
// the memory port (host accesses arriving over the PIM memory bus), the
// WideWord datapath, scalar loads/stores and instruction-cache fills. The bus
// reaches the node memory array and the memory-mapped parcel buffer (PBUF).
// This organisation is the architecture's node; the WideWord datapath, the
// memory port and the parcel interconnect are outside this RTL and appear as
// ports. The 256-bit bus and the master order are this design's choices.
//
// Ports:
//   host_req/host_rsp        memory-port master (bus protocol of diva_pkg)
//   ww_mem_req/ww_mem_rsp    WideWord datapath memory master
//   ww_valid..ww_mask        scalar<->WideWord exchange of the EX stage
//   parcel_in_*/parcel_out_* 32-bit parcel words to and from the PBUF
//   ext_irq                  external interrupt line
// Scalar data accesses are 32-bit; this module places them in the right lane
// of the 256-bit bus and returns the addressed word.
module diva_node
  import diva_pkg::*;
#(
  parameter int          MEM_ROWS  = 32768,
  parameter int          IC_LINES  = 128,
  parameter int          PB_DEPTH  = 16,
  parameter logic [31:0] RESET_PC  = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    host_req,
  output bus_rsp_t    host_rsp,
  input  bus_req_t    ww_mem_req,
  output bus_rsp_t    ww_mem_rsp,
  output logic        ww_valid,
  output logic [31:0] ww_instr,
  output logic [31:0] ww_a,
  output logic [31:0] ww_b,
  input  logic [31:0] ww_rdata,
  input  ww_cc_t      ww_cc,
  input  logic [31:0] ww_mask,
  input  logic        parcel_in_valid,
  output logic        parcel_in_ready,
  input  logic [31:0] parcel_in_data,
  output logic        parcel_out_valid,
  input  logic        parcel_out_ready,
  output logic [31:0] parcel_out_data,
  input  logic        ext_irq,
  output psw_t        psw
);
  localparam int NM = 4;
  localparam int MAW = $clog2(MEM_ROWS);

  // core <-> instruction cache
  logic [31:0] imem_addr, imem_instr, icinv_addr;
  logic        imem_fetch, imem_valid, icinv, ic_miss;
  // core data port
  logic        dmem_req, dmem_we, dmem_lock;
  logic [31:0] dmem_addr, dmem_wdata;
  logic [3:0]  dmem_be;
  // bus
  bus_req_t    req [NM];
  bus_rsp_t    rsp [NM];
  logic        mem_en, mem_we;
  logic [MAW-1:0]    mem_addr;
  logic [BUS_BE-1:0] mem_be;
  logic [BUS_W-1:0]  mem_wdata, mem_rdata;
  logic        pb_req, pb_we, pb_irq, locked;
  logic [1:0]  pb_word;
  logic [31:0] pb_wdata, pb_rdata;

  diva_core #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst_n,
    .imem_addr, .imem_fetch, .imem_valid, .imem_instr, .icinv, .icinv_addr,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata, .dmem_lock,
    .dmem_ready(rsp[2].done), .dmem_rdata(rsp[2].rdata[dmem_addr[4:2]*32 +: 32]),
    .ww_valid, .ww_instr, .ww_a, .ww_b, .ww_rdata, .ww_cc, .ww_mask,
    .irq_ext({ext_irq, pb_irq}), .psw_o(psw));

  diva_icache #(.LINES(IC_LINES)) u_icache (
    .clk, .rst_n, .addr(imem_addr), .fetch(imem_fetch), .valid(imem_valid), .instr(imem_instr),
    .inv(icinv), .inv_addr(icinv_addr), .bus_req(req[3]), .bus_rsp(rsp[3]), .miss_start(ic_miss));

  // scalar data master: 32-bit access in its lane of the 256-bit bus
  always_comb begin
    req[2].valid = dmem_req;
    req[2].we    = dmem_we;
    req[2].lock  = dmem_lock;
    req[2].addr  = dmem_addr;
    req[2].be    = BUS_BE'(dmem_be) << (dmem_addr[4:2] * 4);
    req[2].wdata = {WORDS_PER_ROW{dmem_wdata}};
  end
  assign req[0]     = host_req;
  assign req[1]     = ww_mem_req;
  assign host_rsp   = rsp[0];
  assign ww_mem_rsp = rsp[1];

  diva_mem_arbiter #(.NM(NM), .ROWS(MEM_ROWS)) u_arb (
    .clk, .rst_n, .req, .rsp,
    .mem_en, .mem_we, .mem_addr, .mem_be, .mem_wdata, .mem_rdata,
    .pb_req, .pb_we, .pb_word, .pb_wdata, .pb_rdata, .locked_o(locked));

  diva_node_memory #(.ROWS(MEM_ROWS), .WIDTH(BUS_W)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .be(mem_be), .wdata(mem_wdata), .rdata(mem_rdata));

  diva_pbuf #(.DEPTH(PB_DEPTH)) u_pbuf (
    .clk, .rst_n, .req(pb_req), .we(pb_we), .word(pb_word), .wdata(pb_wdata), .rdata(pb_rdata),
    .in_valid(parcel_in_valid), .in_ready(parcel_in_ready), .in_data(parcel_in_data),
    .out_valid(parcel_out_valid), .out_ready(parcel_out_ready), .out_data(parcel_out_data),
    .irq(pb_irq));
endmodule
