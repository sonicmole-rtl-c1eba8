// mole_controller -- finite state machine and address counter of the mole
// (moleController).
//
// States and the transitions between them follow the published FSM:
//   INI          idle; the Start command moves to Clear Mem.
//   Clear Mem    writes zero to every word of the store area
//                (StoreAddress .. StoreAddress+MemSize-1) through MemPortB,
//                one word per clock, then moves to Trigger Search.
//   Trigger Search  compares the trigger port with the trigger pattern each
//                clock; Stop returns to INI, a trigger moves to Store Search.
//   Store Search writes capture-port samples that pass the store qualifier to
//                consecutive words of the store area. When the area is full
//                the address counter wraps and a round is counted; after
//                RoundNo rounds (0 counts as 1) memory is full. Memory full
//                or Stop moves to Finish, Pause moves to Pause.
//   Pause        no stores; Resume returns to Store Search, Stop to Finish.
//   Finish       one clock: pulses oResetReg (the registers clear) and sets
//                the finish flags, then returns to INI.
// A command is acted on only in the states listed for it above: Pause during
// Trigger Search and Stop during Clear Mem, for instance, are ignored.
//
// Trigger: match = ((trigger port ^ TriggerValueA) & TriggerValueB) == 0,
// i.e. ValueA is the pattern and ValueB marks the bits that are compared
// (0 = don't care). EdgeTrig selects the event: bit 0 triggers when the
// match starts (positive edge), bit 1 when it ends (negative edge), neither
// bit triggers on the match itself. The store qualifier uses StoreValueA and
// StoreValueB the same way on the capture port. These encodings are this
// design's own; the published design gives the register names and the
// pattern-with-don't-care idea.
//
// Timing: the capture port is registered once, so the first word stored is
// the capture-port sample of the clock in which the trigger was seen, and
// every later stored word is one clock's sample. Memory writes are single
// cycle (oMemWe with oMemAddr and oMemWData); the memory port behind them
// accepts one write per clock and never stalls. Commands are levels in
// Operation_REG: the host writes the whole register to issue one.
module mole_controller
  import sonic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mole_cfg_t   iCfg,
  input  ch_t         iTrg,        // selected trigger port
  input  ch_t         iCap,        // selected capture port
  // MemPortB write side
  output logic        oMemWe,
  output maddr_t      oMemAddr,
  output mdata_t      oMemWData,
  // to the registers
  output logic        oResetReg,
  output logic [3:0]  oFinishSet,
  output mole_state_e oState,
  // observation
  output logic        oTrigger,    // one-clock pulse on the trigger event
  output maddr_t      oAddrCnt     // address counter (offset in store area)
);

  mole_state_e state_q, state_d;
  maddr_t      cnt_q, cnt_d;
  logic [3:0]  round_q, round_d;
  logic [3:0]  reason_q, reason_d;
  logic        match_prev_q;
  ch_t         cap_q;

  logic        trg_match, trg_hit, store_match, mem_full, last_word;
  logic [3:0]  rounds;
  logic        go_start, go_stop, go_pause, go_resume;

  assign go_start  = iCfg.operation[OP_START];
  assign go_stop   = iCfg.operation[OP_STOP];
  assign go_pause  = iCfg.operation[OP_PAUSE];
  assign go_resume = iCfg.operation[OP_RESUME];

  assign trg_match   = ((iTrg  ^ iCfg.trig_val_a)  & iCfg.trig_val_b)  == '0;
  assign store_match = ((cap_q ^ iCfg.store_val_a) & iCfg.store_val_b) == '0;

  always_comb begin
    if (!iCfg.edge_trig[EDGE_POS] && !iCfg.edge_trig[EDGE_NEG])
      trg_hit = trg_match;
    else
      trg_hit = (iCfg.edge_trig[EDGE_POS] &&  trg_match && !match_prev_q)
             || (iCfg.edge_trig[EDGE_NEG] && !trg_match &&  match_prev_q);
  end

  assign rounds    = (iCfg.round_no == '0) ? 4'd1 : iCfg.round_no;
  assign mem_full  = (iCfg.mem_size == '0) || (round_q >= rounds);
  assign last_word = (cnt_q == iCfg.mem_size - 1'b1);

  always_comb begin
    state_d    = state_q;
    cnt_d      = cnt_q;
    round_d    = round_q;
    reason_d   = reason_q;
    oMemWe     = 1'b0;
    oMemWData  = '0;
    oResetReg  = 1'b0;
    oFinishSet = '0;
    oTrigger   = 1'b0;
    unique case (state_q)
      ST_INI: begin
        cnt_d    = '0;
        round_d  = '0;
        reason_d = '0;
        if (go_start) state_d = ST_CLEAR;
      end
      ST_CLEAR: begin
        if (cnt_q == iCfg.mem_size) begin
          cnt_d   = '0;
          state_d = ST_TRIG;
        end else begin
          oMemWe = 1'b1;
          cnt_d  = cnt_q + 1'b1;
        end
      end
      ST_TRIG: begin
        if (go_stop) begin
          state_d = ST_INI;
        end else if (trg_hit) begin
          oTrigger = 1'b1;
          state_d  = ST_STORE;
        end
      end
      ST_STORE: begin
        if (go_stop) begin
          reason_d = 4'(1 << FIN_STOPPED);
          state_d  = ST_FINISH;
        end else if (mem_full) begin
          reason_d = 4'(1 << FIN_FULL);
          state_d  = ST_FINISH;
        end else if (go_pause) begin
          state_d = ST_PAUSE;
        end else if (store_match) begin
          oMemWe    = 1'b1;
          oMemWData = cap_q;
          if (last_word) begin
            cnt_d   = '0;
            round_d = round_q + 1'b1;
          end else begin
            cnt_d = cnt_q + 1'b1;
          end
        end
      end
      ST_PAUSE: begin
        if (go_stop) begin
          reason_d = 4'(1 << FIN_STOPPED);
          state_d  = ST_FINISH;
        end else if (go_resume) begin
          state_d = ST_STORE;
        end
      end
      ST_FINISH: begin
        oResetReg  = 1'b1;
        oFinishSet = reason_q | 4'(1 << FIN_DONE);
        state_d    = ST_INI;
      end
      default: state_d = ST_INI;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_INI;
      cnt_q        <= '0;
      round_q      <= '0;
      reason_q     <= '0;
      match_prev_q <= 1'b0;
      cap_q        <= '0;
    end else begin
      state_q      <= state_d;
      cnt_q        <= cnt_d;
      round_q      <= round_d;
      reason_q     <= reason_d;
      match_prev_q <= trg_match;
      cap_q        <= iCap;
    end
  end

  assign oMemAddr = iCfg.store_addr + cnt_q;
  assign oState   = state_q;
  assign oAddrCnt = cnt_q;

  // Memory is written only while clearing or storing.
  a_we_state: assert property (@(posedge clk) disable iff (!rst_n)
    oMemWe |-> (state_q == ST_CLEAR || state_q == ST_STORE));
  // The address counter stays inside the store area.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_STORE) |-> (cnt_q < iCfg.mem_size || iCfg.mem_size == '0));

endmodule
