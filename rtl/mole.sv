// mole -- embedded multi-channel logic analyzer for one UltraSONIC PIPE.
//
// Four 32-channel probe ports (P1..P4, 128 channels) are wired to signals of
// the user design. Two 4:1 multiplexers pick the trigger port and the
// capture port under register control, so the roles can change at run time
// without rebuilding the FPGA. The controller clears a host-chosen area of
// PIPE memory, waits for the trigger, then writes capture-port samples into
// that area through MemPortB, one 32-bit word per clock, until the area has
// been filled RoundNo times or the host stops it; Finish_REG then tells the
// host that the data is ready. The host configures and commands the mole
// through the 13 registers on the PIPE bus (see mole_registers).
//
// The block structure (registers, two multiplexers, controller with address
// counter, MemPortB interface) follows the published architecture. The
// memory bank the samples go to is an input (iBank) here, to be tied to the
// bank the user design leaves free; Mode_REG is brought out as oMode so that
// the surrounding logic can act on embedded/standalone mode.
//
// Timing: one clock domain (the PIPE clock). Register writes take effect at
// the next clock edge; memory writes are issued one per clock and are never
// stalled, which the PIPE memory multiplexer guarantees.
module mole
  import sonic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // PIPE bus register access
  input  logic                 iPBSel,
  input  logic                 iPBWrite,
  input  logic [PB_ADDR_W-1:0] iPBAd,
  input  logic [PB_DATA_W-1:0] iPBData,
  output logic [PB_DATA_W-1:0] oPBData,
  // probe ports P1..P4
  input  ch_t [N_PORTS-1:0]    iProbe,
  // MemPortB
  input  logic                 iBank,
  output pm_req_t              oMemB,
  // status
  output logic [3:0]           oMode,
  output mole_state_e          oState,
  output logic                 oTrigger,
  output maddr_t               oAddrCnt
);

  mole_cfg_t   cfg;
  logic        reset_reg;
  logic [3:0]  finish_set;
  ch_t         trg_data, cap_data;
  logic        mem_we;
  maddr_t      mem_addr;
  mdata_t      mem_wdata;

  mole_registers u_regs (
    .clk, .rst_n,
    .iPBSel, .iPBWrite, .iPBAd, .iPBData, .oPBData,
    .oCfg       (cfg),
    .iResetReg  (reset_reg),
    .iFinishSet (finish_set),
    .iState     (oState)
  );

  mole_mux4 #(.W(CH_W)) u_trigger_port (
    .iPorts (iProbe),
    .iSel   (cfg.sel_trg_ch[1:0]),
    .oData  (trg_data)
  );

  mole_mux4 #(.W(CH_W)) u_capture_port (
    .iPorts (iProbe),
    .iSel   (cfg.sel_out_ch[1:0]),
    .oData  (cap_data)
  );

  mole_controller u_ctrl (
    .clk, .rst_n,
    .iCfg       (cfg),
    .iTrg       (trg_data),
    .iCap       (cap_data),
    .oMemWe     (mem_we),
    .oMemAddr   (mem_addr),
    .oMemWData  (mem_wdata),
    .oResetReg  (reset_reg),
    .oFinishSet (finish_set),
    .oState     (oState),
    .oTrigger   (oTrigger),
    .oAddrCnt   (oAddrCnt)
  );

  // MemPortB only ever writes; when idle it presents a read of the current
  // address, which the memory side treats as a no-op.
  assign oMemB = '{we: mem_we, bank: iBank, addr: mem_addr, wdata: mem_wdata};
  assign oMode = cfg.mode;

endmodule
