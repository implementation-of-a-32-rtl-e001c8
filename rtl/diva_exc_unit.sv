// diva_exc_unit: run-time kernel support of the execution control unit.
// It holds the processor status word (supervisor mode, interrupt enable,
// current interrupt level and the condition codes), the shadow registers
// written on exception entry (saved PSW, address of the faulting
// instruction, faulting memory address, cause) and the other special
// registers (handler base, interrupt mask, interrupt levels, a scratch
// register, and access to the timer).
//
// Exceptions are taken when the instruction carrying them is in the execute
// stage. In that one cycle the unit picks the highest-priority source among
// the instruction's synchronous exceptions and the enabled interrupts, fills
// the shadow registers, points the PC at the handler (EVEC + cause*16) and
// switches the PSW to supervisor mode with interrupts disabled; the pipeline
// squashes the execute instruction and everything younger. A synchronous
// exception in a branch delay slot saves the branch's address and sets
// ECAUSE[31]. RFE copies the saved PSW back and returns to EPC.
// Interrupt priority is programmable: IPRI gives each line a level 0-3
// (2 bits per line). A line is accepted only if its level is above the
// level in PSW.ilvl; on entry PSW.ilvl takes the line's level, and RFE
// restores the old one. A handler that saves EPC/EPSW and sets PSW.ie again
// can therefore be preempted by a higher-priority line but not by its own
// or a lower one. Synchronous exceptions always win over interrupts and
// leave the level unchanged. Among accepted lines the highest level wins,
// then the lowest line number.
// That sequence, a flexible priority assignment and handler preemption
// follow the architecture; the level scheme, the fixed order of the
// synchronous causes, the vector formula, the register map and the rule that
// interrupts wait for an instruction that is neither a branch nor a delay
// slot are this design's.
module diva_exc_unit
  import diva_pkg::*;
#(
  parameter int NIRQ = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stall,        // pipeline frozen this cycle
  input  logic            ex_valid,
  input  sync_exc_t       ex_sync,
  input  logic            ex_irq_ok,    // EX instruction may be interrupted
  input  logic            ex_delay_slot,
  input  logic [31:0]     ex_pc,
  input  logic [31:0]     ex_badaddr,
  input  logic [NIRQ-1:0] irq,
  input  logic            rfe,          // RFE in EX (no exception)
  input  logic            cc_we,
  input  cc_t             cc_in,
  input  logic            sr_we,
  input  sreg_e           sr_addr,
  input  logic [31:0]     sr_wdata,
  output logic [31:0]     sr_rdata,
  output logic            take,
  output exc_cause_e      cause,
  output logic [31:0]     vector,
  output logic [31:0]     epc,
  output psw_t            psw,
  // timer access
  output logic            tload_we,
  output logic            tctrl_we,
  input  logic [31:0]     tcount,
  input  logic            tenable,
  input  logic            tirq
);
  psw_t        epsw;
  logic [31:0] ebad, ecause, evec, imask, scratch, ipri;
  logic [NIRQ-1:0] irq_act;
  logic [1:0]  best_lvl, new_lvl;

  always_comb
    for (int i = 0; i < NIRQ; i++)
      irq_act[i] = irq[i] && imask[i] && psw.ie && (ipri[2*i +: 2] > psw.ilvl);

  always_comb begin
    cause = EXC_NONE;
    best_lvl = '0;
    if (ex_valid) begin
      if      (ex_sync.illegal) cause = EXC_ILLEGAL;
      else if (ex_sync.priv)    cause = EXC_PRIV;
      else if (ex_sync.addr)    cause = EXC_ADDR;
      else if (ex_sync.divz)    cause = EXC_DIVZ;
      else if (ex_sync.trap)    cause = EXC_TRAP;
      else if (ex_irq_ok) begin
        best_lvl = '0;
        for (int i = 0; i < NIRQ; i++)
          if (irq_act[i] && (cause == EXC_NONE || ipri[2*i +: 2] > best_lvl)) begin
            cause    = exc_cause_e'(4'(EXC_IRQ0) + 4'(i));
            best_lvl = ipri[2*i +: 2];
          end
      end
    end
    new_lvl = (cause >= EXC_IRQ0) ? best_lvl : psw.ilvl;
    take   = !stall && cause != EXC_NONE;
    vector = evec + {24'd0, cause, 4'd0};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      psw     <= '{cc: '0, ilvl: '0, ie: 1'b0, sup: 1'b1};
      ipri    <= 32'({NIRQ{2'b01}});
      epsw    <= '0;
      epc     <= '0;
      ebad    <= '0;
      ecause  <= '0;
      evec    <= 32'h0000_0100;
      imask   <= '0;
      scratch <= '0;
    end else if (!stall) begin
      if (take) begin
        epsw   <= psw;
        epc    <= (ex_delay_slot && cause < EXC_IRQ0) ? ex_pc - 32'd4 : ex_pc;
        if (cause == EXC_ADDR) ebad <= ex_badaddr;
        ecause <= {ex_delay_slot && cause < EXC_IRQ0, 27'd0, cause};
        psw.sup  <= 1'b1;
        psw.ie   <= 1'b0;
        psw.ilvl <= new_lvl;
      end else if (rfe) begin
        psw <= epsw;
      end else begin
        if (cc_we) psw.cc <= cc_in;
        if (sr_we)
          unique case (sr_addr)
            SR_PSW:     psw     <= psw_t'(sr_wdata[7:0]);
            SR_EPSW:    epsw    <= psw_t'(sr_wdata[7:0]);
            SR_EPC:     epc     <= sr_wdata;
            SR_EBAD:    ebad    <= sr_wdata;
            SR_ECAUSE:  ecause  <= sr_wdata;
            SR_EVEC:    evec    <= sr_wdata;
            SR_IMASK:   imask   <= sr_wdata;
            SR_SCRATCH: scratch <= sr_wdata;
            SR_IPRI:    ipri    <= sr_wdata;
            default: ;
          endcase
      end
    end

  assign tload_we = sr_we && !stall && !take && sr_addr == SR_TLOAD;
  assign tctrl_we = sr_we && !stall && !take && sr_addr == SR_TCTRL;

  always_comb
    unique case (sr_addr)
      SR_PSW:     sr_rdata = {24'd0, psw};
      SR_EPSW:    sr_rdata = {24'd0, epsw};
      SR_EPC:     sr_rdata = epc;
      SR_EBAD:    sr_rdata = ebad;
      SR_ECAUSE:  sr_rdata = ecause;
      SR_EVEC:    sr_rdata = evec;
      SR_IMASK:   sr_rdata = imask;
      SR_TCTRL:   sr_rdata = {30'd0, tirq, tenable};
      SR_TCOUNT:  sr_rdata = tcount;
      SR_SCRATCH: sr_rdata = scratch;
      SR_IPRI:    sr_rdata = ipri;
      default:    sr_rdata = '0;
    endcase
endmodule
