// diva_pbuf: the node's parcel buffer, memory-mapped into the node's local
// address space so that software sends and receives parcels with ordinary
// loads and stores. Parcel words arriving from the parcel interconnect wait in
// an inbound FIFO, words written by software wait in an outbound FIFO until
// the interconnect takes them, and irq is high while an inbound word waits.
// The mapping and interrupt role are the architecture's; the parcel format is
// not published, so parcels move as a stream of 32-bit words, and the FIFO
// depth and register map are this design's:
//   word 0 STATUS  (read) {out_free[15:0], in_count[15:0]}
//   word 1 IN      (read) pops the oldest inbound word (0 if empty)
//   word 2 OUT     (write) pushes a word to send (dropped if full)
// Register access: one-cycle request (req, we, word, wdata); rdata is
// registered and valid the cycle after the request.
module diva_pbuf #(
  parameter int DEPTH = 16,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [1:0]  word,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        irq
);
  localparam int PW = $clog2(DEPTH);
  logic [31:0] inq [DEPTH];
  logic [31:0] outq[DEPTH];
  logic [PW-1:0] in_rd, in_wr, out_rd, out_wr;
  logic [CW-1:0] in_cnt, out_cnt;
  logic in_push, in_pop, out_push, out_pop;

  assign in_ready  = (in_cnt != CW'(DEPTH));
  assign in_push   = in_valid && in_ready;
  assign in_pop    = req && !we && word == 2'd1 && in_cnt != '0;
  assign out_valid = (out_cnt != '0);
  assign out_data  = outq[out_rd];
  assign out_pop   = out_valid && out_ready;
  assign out_push  = req && we && word == 2'd2 && out_cnt != CW'(DEPTH);
  assign irq       = (in_cnt != '0);

  always_ff @(posedge clk) begin
    if (in_push)  inq[in_wr]   <= in_data;
    if (out_push) outq[out_wr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_rd <= '0; in_wr <= '0; out_rd <= '0; out_wr <= '0;
      in_cnt <= '0; out_cnt <= '0; rdata <= '0;
    end else begin
      if (in_push)  in_wr  <= in_wr + 1'b1;
      if (in_pop)   in_rd  <= in_rd + 1'b1;
      if (out_push) out_wr <= out_wr + 1'b1;
      if (out_pop)  out_rd <= out_rd + 1'b1;
      in_cnt  <= in_cnt  + CW'(in_push)  - CW'(in_pop);
      out_cnt <= out_cnt + CW'(out_push) - CW'(out_pop);
      if (req && !we)
        unique case (word)
          2'd0:    rdata <= {16'(CW'(DEPTH) - out_cnt), 16'(in_cnt)};
          2'd1:    rdata <= (in_cnt != '0) ? inq[in_rd] : 32'd0;
          default: rdata <= '0;
        endcase
    end

  // A full outbound FIFO silently drops a write; software checks STATUS first.
  a_in_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) in_cnt <= CW'(DEPTH));
endmodule
