// diva_mem_arbiter: memory bus control and arbiter of the node. Several
// masters share the node data bus: by default 0 = memory port (host
// accesses), 1 = WideWord datapath, 2 = scalar loads/stores, 3 = instruction
// cache fills. In an idle cycle the lowest-numbered requesting master that is
// allowed wins; its access goes to the node memory array, or to the parcel
// buffer when the address lies in the PBUF window (PBUF_BASE and up). The
// next cycle returns done (with the read row) to that master, and the bus is
// free again the cycle after, so each access takes two cycles.
// Locked accesses: a locked read by a master opens a lock held by that
// master; until its locked write, the masters in LOCKABLE are refused. This
// serves the locked load/store pair used for semaphores. The arbiter's
// existence and the locked operations are the architecture's; the master
// order, the lock rule, the timing and the PBUF window are this design's.
module diva_mem_arbiter
  import diva_pkg::*;
#(
  parameter int          NM        = 4,
  parameter int          ROWS      = 32768,
  parameter logic [NM-1:0] LOCKABLE = NM'(3),   // masters excluded by a lock
  localparam int         AW        = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bus_req_t      req [NM],
  output bus_rsp_t      rsp [NM],
  // node memory array
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [BUS_BE-1:0] mem_be,
  output logic [BUS_W-1:0]  mem_wdata,
  input  logic [BUS_W-1:0]  mem_rdata,
  // parcel buffer registers
  output logic          pb_req,
  output logic          pb_we,
  output logic [1:0]    pb_word,
  output logic [31:0]   pb_wdata,
  input  logic [31:0]   pb_rdata,
  output logic          locked_o
);
  localparam int MW = (NM > 1) ? $clog2(NM) : 1;

  logic          busy;
  logic [MW-1:0] owner, win;
  logic          any;
  logic          owner_pb;
  logic [2:0]    owner_lane;
  logic          locked;
  logic [MW-1:0] lock_owner;
  bus_req_t      g;

  always_comb begin
    any = 1'b0;
    win = '0;
    for (int i = NM - 1; i >= 0; i--)
      if (req[i].valid && !(locked && LOCKABLE[i] && lock_owner != MW'(i))) begin
        any = 1'b1;
        win = MW'(i);
      end
    g = req[win];
  end

  wire start = !busy && any;
  wire to_pb = g.addr >= PBUF_BASE;

  always_comb begin
    mem_en    = start && !to_pb;
    mem_we    = g.we;
    mem_addr  = g.addr[5 +: AW];
    mem_be    = g.be;
    mem_wdata = g.wdata;
    pb_req    = start && to_pb;
    pb_we     = g.we && g.be[g.addr[4:2]*4];
    pb_word   = g.addr[3:2];
    pb_wdata  = g.wdata[g.addr[4:2]*32 +: 32];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; owner <= '0; owner_pb <= 1'b0; owner_lane <= '0;
      locked <= 1'b0; lock_owner <= '0;
    end else begin
      if (start) begin
        busy       <= 1'b1;
        owner      <= win;
        owner_pb   <= to_pb;
        owner_lane <= g.addr[4:2];
        if (g.lock && !g.we) begin locked <= 1'b1; lock_owner <= win; end
        if (g.lock &&  g.we && lock_owner == win) locked <= 1'b0;
      end else
        busy <= 1'b0;
    end

  always_comb
    for (int i = 0; i < NM; i++) begin
      rsp[i].done  = busy && owner == MW'(i);
      rsp[i].rdata = owner_pb ? BUS_W'({pb_rdata} << (owner_lane * 32)) : mem_rdata;
    end

  assign locked_o = locked;

  // A master keeps its request stable until it is answered.
  for (genvar i = 0; i < NM; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (busy && owner == MW'(i)) |-> req[i].valid);
  end
endmodule
