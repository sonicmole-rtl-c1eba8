// sonic_pipe_mole -- one UltraSONIC PIPE's debug path: the mole embedded in
// the PIPE engine, sharing the PIPE memory with the user design.
//
// The user design owns MemPortA; the mole owns MemPortB. The memory
// controller's port multiplexer (pm_port_mux) time-shares the single PIPE
// memory interface between the two ports at twice the PIPE clock, so the
// mole's capture writes never disturb the user's accesses, provided the two
// use different memory words (normally different banks: iMoleBank selects
// the bank the mole stores into). The host programs the mole over the PIPE
// bus and later reads the captured samples back from PIPE memory.
//
// Only clk2x enters; the PIPE clock is clk2x/2 and is brought out as oClk.
// Everything on the PIPE bus, the probe ports and MemPortA is synchronous to
// oClk (rising edge). The PIPE memory interface (oPm, iPmRdata) is
// synchronous to clk2x and expects a synchronous SRAM with one clk2x cycle
// of read latency. The user logic, the bus control, the PIPE router and the
// SRAM chips are outside this module.
module sonic_pipe_mole
  import sonic_pkg::*;
(
  input  logic                 clk2x,
  input  logic                 rst_n,
  output logic                 oClk,
  // PIPE bus access to the mole registers
  input  logic                 iPBSel,
  input  logic                 iPBWrite,
  input  logic [PB_ADDR_W-1:0] iPBAd,
  input  logic [PB_DATA_W-1:0] iPBData,
  output logic [PB_DATA_W-1:0] oPBData,
  // probe ports P1..P4 from the user design
  input  ch_t [N_PORTS-1:0]    iProbe,
  // user design's memory port (MemPortA)
  input  pm_req_t              iMemA,
  output mdata_t               oMemARdata,
  // PM bank the mole stores into
  input  logic                 iMoleBank,
  // PIPE memory (clk2x)
  output pm_req_t              oPm,
  input  mdata_t               iPmRdata,
  // mole status
  output logic [3:0]           oMoleMode,
  output mole_state_e          oMoleState,
  output logic                 oMoleTrigger,
  output maddr_t               oMoleAddrCnt
);

  pm_req_t mem_b;
  mdata_t  rdata_b;   // MemPortB read data; the mole only writes

  pm_port_mux u_mx (
    .clk2x, .rst_n,
    .oClk     (oClk),
    .iReqA    (iMemA),
    .oRdataA  (oMemARdata),
    .iReqB    (mem_b),
    .oRdataB  (rdata_b),
    .oPm      (oPm),
    .iPmRdata (iPmRdata)
  );

  mole u_mole (
    .clk      (oClk),
    .rst_n,
    .iPBSel, .iPBWrite, .iPBAd, .iPBData, .oPBData,
    .iProbe,
    .iBank    (iMoleBank),
    .oMemB    (mem_b),
    .oMode    (oMoleMode),
    .oState   (oMoleState),
    .oTrigger (oMoleTrigger),
    .oAddrCnt (oMoleAddrCnt)
  );

endmodule
