// diva_timer: the node's internal interval timer, one of the interrupt
// sources of the scalar processor. The architecture only names the timer;
// everything here is this design's choice. Software writes a reload value
// (load_we), which also restarts the count, and a control word: bit 0 enables
// counting, writing 1 to bit 1 clears a pending interrupt. While enabled the
// counter decrements every cycle; when it is at zero it reloads and sets the
// sticky interrupt, which stays high until cleared.
module diva_timer #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_we,
  input  logic [WIDTH-1:0] load_val,
  input  logic             ctrl_we,
  input  logic [1:0]       ctrl_wdata,
  output logic [WIDTH-1:0] count,
  output logic             enable,
  output logic             irq
);
  logic [WIDTH-1:0] reload;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      reload <= '0; count <= '0; enable <= 1'b0; irq <= 1'b0;
    end else begin
      if (ctrl_we) begin
        enable <= ctrl_wdata[0];
        if (ctrl_wdata[1]) irq <= 1'b0;
      end
      if (load_we) begin
        reload <= load_val;
        count  <= load_val;
      end else if (enable) begin
        if (count == '0) begin
          count <= reload;
          irq   <= 1'b1;
        end else
          count <= count - 1'b1;
      end
    end
endmodule
