// mole_registers -- the 13 host-visible registers of the mole (moleRegisters).
//
// The host reaches the registers over the PIPE bus: when iPBSel and iPBWrite
// are high at a clock edge, the register addressed by iPBAd (byte address,
// one register per 8-byte PIPE bus word) takes iPBData, truncated to the
// register's width. Reads are combinational: oPBData shows the addressed
// register, zero-extended, whenever iPBSel is high and iPBWrite is low, and
// zero otherwise. Address bits [2:0] are ignored; unmapped addresses read 0.
//
// The register map and widths are the published ones (Mode 4, EdgeTrig 4,
// Operation 4, TriggerValueA/B 32, StoreAddress 21, StoreValueA/B 32,
// MemSize 21, RoundNo 4, SelOutCH 4, SelTrgCH 4, Finish 4 bits). When the
// controller finishes a capture it pulses iResetReg, which clears every
// register, and in the same cycle iFinishSet is written into Finish_REG, so
// the host sees all registers at zero except the finish flags. A read of
// Mode_REG also returns the controller state in bits [7:4] so that the host
// can see what the mole is doing; that placement is this design's choice.
//
// All registers reset to zero (asynchronous, active-low rst_n).
module mole_registers
  import sonic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // PIPE bus slave
  input  logic                 iPBSel,
  input  logic                 iPBWrite,
  input  logic [PB_ADDR_W-1:0] iPBAd,
  input  logic [PB_DATA_W-1:0] iPBData,
  output logic [PB_DATA_W-1:0] oPBData,
  // to and from the controller
  output mole_cfg_t            oCfg,
  input  logic                 iResetReg,
  input  logic [3:0]           iFinishSet,
  input  mole_state_e          iState
);

  mole_cfg_t cfg_q;
  logic      wr;
  logic [PB_ADDR_W-1:0] wa;

  assign wr   = iPBSel && iPBWrite;
  assign wa   = {iPBAd[PB_ADDR_W-1:3], 3'b000};
  assign oCfg = cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
    end else if (iResetReg) begin
      cfg_q        <= '0;
      cfg_q.finish <= iFinishSet;
    end else begin
      if (|iFinishSet) cfg_q.finish <= cfg_q.finish | iFinishSet;
      if (wr) begin
        unique case (wa)
          A_MODE:        cfg_q.mode        <= iPBData[3:0];
          A_EDGE_TRIG:   cfg_q.edge_trig   <= iPBData[3:0];
          A_OPERATION:   cfg_q.operation   <= iPBData[3:0];
          A_TRIG_VAL_A:  cfg_q.trig_val_a  <= iPBData[CH_W-1:0];
          A_TRIG_VAL_B:  cfg_q.trig_val_b  <= iPBData[CH_W-1:0];
          A_STORE_ADDR:  cfg_q.store_addr  <= iPBData[MEM_ADDR_W-1:0];
          A_STORE_VAL_A: cfg_q.store_val_a <= iPBData[CH_W-1:0];
          A_STORE_VAL_B: cfg_q.store_val_b <= iPBData[CH_W-1:0];
          A_MEM_SIZE:    cfg_q.mem_size    <= iPBData[MEM_ADDR_W-1:0];
          A_ROUND_NO:    cfg_q.round_no    <= iPBData[3:0];
          A_SEL_OUT_CH:  cfg_q.sel_out_ch  <= iPBData[3:0];
          A_SEL_TRG_CH:  cfg_q.sel_trg_ch  <= iPBData[3:0];
          A_FINISH:      cfg_q.finish      <= iPBData[3:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    oPBData = '0;
    if (iPBSel && !iPBWrite) begin
      unique case (wa)
        A_MODE:        oPBData = PB_DATA_W'({1'b0, iState, cfg_q.mode});
        A_EDGE_TRIG:   oPBData = PB_DATA_W'(cfg_q.edge_trig);
        A_OPERATION:   oPBData = PB_DATA_W'(cfg_q.operation);
        A_TRIG_VAL_A:  oPBData = PB_DATA_W'(cfg_q.trig_val_a);
        A_TRIG_VAL_B:  oPBData = PB_DATA_W'(cfg_q.trig_val_b);
        A_STORE_ADDR:  oPBData = PB_DATA_W'(cfg_q.store_addr);
        A_STORE_VAL_A: oPBData = PB_DATA_W'(cfg_q.store_val_a);
        A_STORE_VAL_B: oPBData = PB_DATA_W'(cfg_q.store_val_b);
        A_MEM_SIZE:    oPBData = PB_DATA_W'(cfg_q.mem_size);
        A_ROUND_NO:    oPBData = PB_DATA_W'(cfg_q.round_no);
        A_SEL_OUT_CH:  oPBData = PB_DATA_W'(cfg_q.sel_out_ch);
        A_SEL_TRG_CH:  oPBData = PB_DATA_W'(cfg_q.sel_trg_ch);
        A_FINISH:      oPBData = PB_DATA_W'(cfg_q.finish);
        default:       oPBData = '0;
      endcase
    end
  end

endmodule
