// diva_hazard_unit: the hazard-detection part of the pipeline controller.
// Operands are read in the decode stage (branches resolve there), so
// forwarding feeds the decode stage: for each decode-stage source register the
// youngest later stage that will write it supplies the value - execute (the
// ALU result of the cycle), memory (ALU result or the load data returned this
// cycle), writeback - otherwise the register file. The one case that cannot be
// forwarded is a load in execute whose target is read by the instruction in
// decode: load_use then holds fetch and decode for one cycle and sends a
// bubble into execute, as the architecture specifies. stall_all freezes the
// whole pipeline while the memory stage waits for a load/store (there is no
// data cache); fetch stalls on an instruction-cache miss are handled by the
// fetch stage itself. Register 0 is never forwarded. Combinational.
module diva_hazard_unit (
  input  logic [4:0] id_rs_a,
  input  logic       id_use_a,
  input  logic [4:0] id_rs_b,
  input  logic       id_use_b,
  input  logic       ex_wr,        // valid instruction in EX writes ex_rd
  input  logic [4:0] ex_rd,
  input  logic       ex_is_load,
  input  logic       mem_wr,
  input  logic [4:0] mem_rd,
  input  logic       wb_wr,
  input  logic [4:0] wb_rd,
  input  logic       mem_busy,     // MEM stage access not yet complete
  output logic [1:0] fwd_a,        // 0 regfile, 1 EX, 2 MEM, 3 WB
  output logic [1:0] fwd_b,
  output logic       load_use,
  output logic       stall_all
);
  function automatic logic [1:0] pick(input logic [4:0] rs);
    if (rs == '0)                    return 2'd0;
    else if (ex_wr  && ex_rd  == rs) return 2'd1;
    else if (mem_wr && mem_rd == rs) return 2'd2;
    else if (wb_wr  && wb_rd  == rs) return 2'd3;
    else                             return 2'd0;
  endfunction

  always_comb begin
    fwd_a = pick(id_rs_a);
    fwd_b = pick(id_rs_b);
    load_use = ex_wr && ex_is_load && ex_rd != '0 &&
               ((id_use_a && id_rs_a == ex_rd) || (id_use_b && id_rs_b == ex_rd));
    stall_all = mem_busy;
  end
endmodule
