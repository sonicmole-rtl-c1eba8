// tb_mole_controller -- self-checking test of the mole controller FSM.
//
// The configuration bundle is driven directly. The trigger port carries the
// cycle number cyc and the capture port carries cap_of(cyc), so every stored
// word identifies the cycle it was sampled in. Expected memory contents and
// cycle counts are worked out here from the timing rules of the controller:
// the first stored word is the sample of the trigger cycle, clearing takes
// MemSize+1 cycles, and ResetReg pulses MemSize*rounds+2 cycles after the
// trigger when nothing stops or pauses the capture.
module tb_mole_controller;
  import sonic_pkg::*;

  logic clk = 0, rst_n = 0;
  mole_cfg_t cfg;
  ch_t trg, cap;
  logic mem_we, reset_reg, trigger;
  maddr_t mem_addr, addr_cnt;
  mdata_t mem_wdata;
  logic [3:0] finish_set;
  mole_state_e state;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  mole_controller dut (
    .clk, .rst_n, .iCfg(cfg), .iTrg(trg), .iCap(cap),
    .oMemWe(mem_we), .oMemAddr(mem_addr), .oMemWData(mem_wdata),
    .oResetReg(reset_reg), .oFinishSet(finish_set), .oState(state),
    .oTrigger(trigger), .oAddrCnt(addr_cnt));

  always #5 clk = !clk;

  function automatic ch_t cap_of(int unsigned c);
    return ch_t'(c * 32'h9E37_79B1) ^ ch_t'(c >> 3);
  endfunction

  assign trg = ch_t'(cyc);
  assign cap = cap_of(cyc);

  // memory model and observers
  mdata_t mem[int unsigned];
  int writes, zero_writes, trig_cyc, reset_cyc, clear_cycles;
  logic [3:0] flags;
  logic match_prev;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (mem_we) begin
      writes <= writes + 1;
      if (state == ST_CLEAR) zero_writes <= zero_writes + 1;
    end
    if (state == ST_CLEAR) clear_cycles <= clear_cycles + 1;
    if (trigger) trig_cyc <= int'(cyc);
    if (reset_reg) begin reset_cyc <= int'(cyc); flags <= finish_set; end
  end

  always @(posedge clk)
    if (mem_we) mem[int'(mem_addr)] = mem_wdata;

  // independent trigger reference, checked every cycle of Trigger Search
  logic exp_match, exp_hit;
  always_comb begin
    exp_match = ((trg & cfg.trig_val_b) == (cfg.trig_val_a & cfg.trig_val_b));
    case (cfg.edge_trig[1:0])
      2'b00: exp_hit = exp_match;
      2'b01: exp_hit = exp_match & ~match_prev;
      2'b10: exp_hit = ~exp_match & match_prev;
      default: exp_hit = exp_match ^ match_prev;
    endcase
  end
  always_ff @(posedge clk) begin
    match_prev <= exp_match;
    if (rst_n && state == ST_TRIG && cfg.operation == 4'b0001) begin
      checks++;
      if (trigger !== exp_hit) begin
        failures++;
        $display("FAIL trigger at cyc %0d: got %0b expected %0b", cyc, trigger, exp_hit);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic setup(input int base, input int size, input int rounds,
                       input logic [31:0] tva, input logic [31:0] tvb, input logic [3:0] edg,
                       input logic [31:0] sva = 0, input logic [31:0] svb = 0);
    @(negedge clk);
    cfg = '0;
    cfg.store_addr = maddr_t'(base); cfg.mem_size = maddr_t'(size);
    cfg.round_no = 4'(rounds);
    cfg.trig_val_a = tva; cfg.trig_val_b = tvb; cfg.edge_trig = edg;
    cfg.store_val_a = sva; cfg.store_val_b = svb;
    mem.delete();
    for (int i = base - 2; i < base + size + 2; i++) mem[i] = 32'hDEAD_BEEF;
    writes = 0; zero_writes = 0; clear_cycles = 0; trig_cyc = -1; reset_cyc = -1; flags = 0;
  endtask

  task automatic start();
    @(negedge clk);
    cfg.operation = 4'b0001;
  endtask

  // wait for ResetReg; then clear the registers as mole_registers would
  task automatic wait_finish();
    while (!reset_reg) @(negedge clk);
    @(negedge clk);
    cfg = '0;
    check("back in INI", state, ST_INI);
  endtask

  // words of a plain capture, possibly after several rounds
  task automatic check_plain(input int base, input int size, input int rounds);
    int t0 = trig_cyc + (rounds - 1) * size;
    for (int i = 0; i < size; i++)
      check($sformatf("word %0d", i), mem[base + i], cap_of(t0 + i));
    check("words before area untouched", mem[base - 1], 32'hDEAD_BEEF);
    check("words after area untouched", mem[base + size], 32'hDEAD_BEEF);
  endtask

  int base, size, t, p, r, k, x;
  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. level trigger on an exact value, one round
    base = 'h40000; size = 16;
    setup(base, size, 1, 300, 32'hFFFF_FFFF, 4'b0000);
    start();
    while (state != ST_TRIG) @(negedge clk);
    check("clear writes", zero_writes, size);
    check("clear cycles", clear_cycles, size + 1);
    for (int i = 0; i < size; i++) check("cleared", mem[base + i], 0);
    wait_finish();
    check("trigger cycle", trig_cyc, 300);
    check_plain(base, size, 1);
    check("store latency", reset_cyc - trig_cyc, size + 2);
    check("flags full", flags, 4'b0011);
    check("total writes", writes, 2 * size);

    // 2. positive edge on bit 4, three rounds over a 5-word area
    base = 'h100; size = 5;
    setup(base, size, 3, 32'h10, 32'h10, 4'b0001);
    start();
    wait_finish();
    check("posedge trigger position", trig_cyc % 32, 16);
    check_plain(base, size, 3);
    check("round latency", reset_cyc - trig_cyc, 3 * size + 2);
    check("flags rounds", flags, 4'b0011);

    // 3. negative edge on bit 4
    base = 'h200; size = 7;
    setup(base, size, 0, 32'h10, 32'h10, 4'b0010);
    start();
    wait_finish();
    check("negedge trigger position", trig_cyc % 32, 0);
    check_plain(base, size, 1);

    // 4. store qualifier: keep samples whose bit 0 is 1
    base = 'h300; size = 10;
    setup(base, size, 1, 0, 0, 4'b0000, 32'h1, 32'h1);
    start();
    wait_finish();
    k = 0;
    for (int c = trig_cyc; k < size; c++)
      if (cap_of(c) & 1) begin
        check($sformatf("qualified word %0d", k), mem[base + k], cap_of(c));
        k++;
      end

    // 5. pause and resume
    base = 'h400; size = 12;
    setup(base, size, 1, 0, 0, 4'b0000);
    start();
    while (state != ST_STORE) @(negedge clk);
    repeat (4) @(negedge clk);
    p = int'(cyc); cfg.operation = 4'b0100;       // pause from cycle p
    repeat (2) @(negedge clk);
    check("paused", state, ST_PAUSE);
    repeat (5) @(negedge clk);
    r = int'(cyc); cfg.operation = 4'b1000;       // resume from cycle r
    wait_finish();
    k = p - 1 - trig_cyc;
    for (int i = 0; i < k; i++)
      check($sformatf("before pause %0d", i), mem[base + i], cap_of(trig_cyc + i));
    for (int i = k; i < size; i++)
      check($sformatf("after resume %0d", i), mem[base + i], cap_of(r + i - k));
    check("flags pause", flags, 4'b0011);

    // 6. stop during Trigger Search returns to INI without finishing
    setup('h500, 4, 1, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 4'b0000);
    start();
    repeat (20) @(negedge clk);
    check("searching", state, ST_TRIG);
    cfg.operation = 4'b0010;
    @(negedge clk);
    check("stop to INI", state, ST_INI);
    repeat (3) @(negedge clk);
    check("no ResetReg", reset_cyc, -1);

    // 7. stop during Store Search finishes with the stopped flag
    base = 'h600; size = 50;
    setup(base, size, 1, 0, 0, 4'b0000);
    start();
    while (state != ST_STORE) @(negedge clk);
    repeat (6) @(negedge clk);
    x = int'(cyc); cfg.operation = 4'b0010;
    wait_finish();
    check("flags stopped", flags, 4'b0101);
    for (int i = 0; i < x - 1 - trig_cyc; i++)
      check("stop word", mem[base + i], cap_of(trig_cyc + i));
    check("word after stop still cleared", mem[base + x - 1 - trig_cyc], 0);

    // 8. stop during Pause
    setup('h700, 50, 1, 0, 0, 4'b0000);
    start();
    while (state != ST_STORE) @(negedge clk);
    cfg.operation = 4'b0100;
    repeat (3) @(negedge clk);
    cfg.operation = 4'b0010;
    wait_finish();
    check("flags stop in pause", flags, 4'b0101);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
