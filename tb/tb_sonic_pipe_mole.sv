// tb_sonic_pipe_mole -- end-to-end test of one PIPE's debug path at full size.
//
// The testbench plays three parts: the host (programs the mole over the
// PIPE bus and polls Finish_REG), the user design (drives the four probe
// ports and uses MemPortA at the same time as the mole captures), and the
// PIPE memory (pm_sram_model, two banks of 2M 32-bit words). Captured data
// is read back through MemPortA and compared with samples worked out here.
//
// Probes (cyc = PIPE clock count): P1 = cyc mod 4096, P2 = cyc*3,
// P3 = cyc*5 + 0x1000, P4 = cyc ^ (cyc >> 2).
// Run 1 uses the configuration of the published screen shot: trigger on
// P1 == 0x00000080, capture P3, store address 0x40000, memory size 0x1000,
// one round, while the user design writes bank 0 every cycle.
// Run 2: positive-edge trigger on P2 bit 3, capture P4 with a store
// qualifier (bit 0 = 1), a pause and a resume, three rounds over 64 words.
// Run 3: stop during trigger search. Run 4: negative-edge trigger, stop
// during store search. Every mechanism is counted and must occur.
module tb_sonic_pipe_mole;
  import sonic_pkg::*;

  logic clk2x = 0, rst_n = 0, clk;
  logic iPBSel = 0, iPBWrite = 0;
  logic [PB_ADDR_W-1:0] iPBAd = '0;
  logic [PB_DATA_W-1:0] iPBData = '0, oPBData;
  ch_t [N_PORTS-1:0] probe;
  pm_req_t mem_a, pm;
  mdata_t rdata_a, pm_rdata;
  logic [3:0] mode;
  mole_state_e state;
  logic trigger;
  maddr_t addr_cnt;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  sonic_pipe_mole dut (
    .clk2x, .rst_n, .oClk(clk),
    .iPBSel, .iPBWrite, .iPBAd, .iPBData, .oPBData,
    .iProbe(probe), .iMemA(mem_a), .oMemARdata(rdata_a), .iMoleBank(1'b1),
    .oPm(pm), .iPmRdata(pm_rdata),
    .oMoleMode(mode), .oMoleState(state), .oMoleTrigger(trigger), .oMoleAddrCnt(addr_cnt));

  pm_sram_model sram (.clk2x, .iPm(pm), .oRdata(pm_rdata));

  always #5 clk2x = !clk2x;

  function automatic ch_t p1(int unsigned c); return ch_t'(c % 4096);          endfunction
  function automatic ch_t p2(int unsigned c); return ch_t'(c * 3);             endfunction
  function automatic ch_t p3(int unsigned c); return ch_t'(c * 5 + 'h1000);    endfunction
  function automatic ch_t p4(int unsigned c); return ch_t'(c ^ (c >> 2));      endfunction
  assign probe[0] = p1(cyc);
  assign probe[1] = p2(cyc);
  assign probe[2] = p3(cyc);
  assign probe[3] = p4(cyc);

  // ---------------------------------------------------- mechanism counters
  int n_clear, n_trig_level, n_trig_pos, n_trig_neg, n_qual_skip, n_pause,
      n_resume, n_stop_trig, n_stop_store, n_full, n_round_wrap, n_both_ports,
      n_user_writes;

  // ------------------------------------------------------ MemPortA driver
  logic   user_on = 0;
  pm_req_t a_reqs[$];
  logic   issued_rd[$];
  mdata_t rb_data[$];
  mdata_t bank0_ref[int unsigned];
  int     trig_cyc = -1;
  mole_state_e prev_state = ST_INI;

  always @(posedge clk) begin
    pm_req_t r;
    cyc <= cyc + 1;
    if (issued_rd.size() >= 2 && issued_rd.pop_front()) rb_data.push_back(rdata_a);
    if (a_reqs.size() != 0) begin
      r = a_reqs.pop_front();
      issued_rd.push_back(1'b1);
    end else if (user_on) begin
      r = '{we: 1'b1, bank: 1'b0, addr: maddr_t'(cyc % 256), wdata: cyc * 13};
      bank0_ref[cyc % 256] = cyc * 13;
      n_user_writes++;
      issued_rd.push_back(1'b0);
    end else begin
      r = '0;
      issued_rd.push_back(1'b0);
    end
    mem_a <= r;
    if (trigger) trig_cyc = int'(cyc);
    if (state == ST_CLEAR) n_clear++;
    if (prev_state == ST_STORE && state == ST_PAUSE) n_pause++;
    if (prev_state == ST_PAUSE && state == ST_STORE) n_resume++;
    if (prev_state == ST_TRIG && state == ST_INI) n_stop_trig++;
    prev_state <= state;
  end

  // both ports writing in one PIPE cycle, seen on the memory side
  logic a_slot_we;
  always @(posedge clk2x) begin
    if (clk) a_slot_we <= pm.we;            // request issued at mid-cycle: port A
    else if (pm.we && a_slot_we) n_both_ports++;
  end

  initial begin
    repeat (400000) @(posedge clk2x);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host side
  task automatic pb_write(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk);
    iPBSel = 1; iPBWrite = 1; iPBAd = a; iPBData = d;
    @(negedge clk);
    iPBSel = 0; iPBWrite = 0;
  endtask

  task automatic pb_read(input logic [11:0] a, output logic [63:0] d);
    @(negedge clk);
    iPBSel = 1; iPBWrite = 0; iPBAd = a;
    #1 d = oPBData;
    @(negedge clk);
    iPBSel = 0;
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic configure(input int tsel, input int csel, input logic [31:0] tva,
                           input logic [31:0] tvb, input logic [3:0] edg,
                           input logic [31:0] sva, input logic [31:0] svb,
                           input int base, input int size, input int rounds);
    pb_write(A_MODE, 1'b0);          // embedded mode
    pb_write(A_SEL_TRG_CH, tsel);
    pb_write(A_SEL_OUT_CH, csel);
    pb_write(A_TRIG_VAL_A, tva);
    pb_write(A_TRIG_VAL_B, tvb);
    pb_write(A_EDGE_TRIG, edg);
    pb_write(A_STORE_VAL_A, sva);
    pb_write(A_STORE_VAL_B, svb);
    pb_write(A_STORE_ADDR, base);
    pb_write(A_MEM_SIZE, size);
    pb_write(A_ROUND_NO, rounds);
  endtask

  task automatic wait_finish(input logic [3:0] exp_flags);
    logic [63:0] r;
    int polls = 0;
    do begin pb_read(A_FINISH, r); polls++; end while (r == 0 && polls < 20000);
    check("finish flags", r, 64'(exp_flags));
    pb_read(A_OPERATION, r);
    check("operation cleared", r, 0);
    pb_read(A_MEM_SIZE, r);
    check("mem size cleared", r, 0);
    pb_write(A_FINISH, 0);
  endtask

  // read n words of a bank through MemPortA (the area may wrap)
  task automatic read_back(input logic bank, input int base, input int n);
    rb_data.delete();
    for (int i = 0; i < n; i++)
      a_reqs.push_back('{we: 1'b0, bank: bank, addr: maddr_t'(base + i), wdata: '0});
    while (rb_data.size() < n) @(posedge clk);
  endtask

  int base, size, rounds, p, q, k, c, n_words;
  logic [63:0] r;
  mdata_t list[$];
  initial begin
    repeat (4) @(posedge clk2x);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // ---- run 1: the screen-shot configuration, user design active
    base = 'h40000; size = 'h1000;
    configure(0, 2, 32'h0000_0080, 32'hFFFF_FFFF, 4'b0000, 0, 0, base, size, 1);
    user_on = 1;
    pb_write(A_OPERATION, 1 << OP_START);
    wait_finish(4'b0011);
    user_on = 0;
    n_trig_level++; n_full++;
    check("run1 trigger on P1 == 0x80", p1(trig_cyc), 'h80);
    read_back(1'b1, base, size);
    for (int i = 0; i < size; i++)
      check($sformatf("run1 word %0d", i), rb_data[i], p3(trig_cyc + i));
    read_back(1'b0, 0, 256);
    for (int i = 0; i < 256; i++)
      check($sformatf("user bank0 word %0d", i), rb_data[i], bank0_ref[i]);

    // ---- run 2: posedge trigger, store qualifier, pause/resume, 3 rounds
    base = 'h1F_FFE0; size = 64; rounds = 3;   // area wraps past the top
    configure(1, 3, 32'h8, 32'h8, 4'(1 << EDGE_POS), 32'h1, 32'h1, base, size, rounds);
    trig_cyc = -1;
    pb_write(A_OPERATION, 1 << OP_START);
    while (trig_cyc < 0) @(negedge clk);
    repeat (20) @(negedge clk);
    @(negedge clk); iPBSel = 1; iPBWrite = 1; iPBAd = A_OPERATION; iPBData = 1 << OP_PAUSE;
    p = int'(cyc) + 1;            // first cycle the controller sees Pause
    @(negedge clk); iPBSel = 0; iPBWrite = 0;
    repeat (30) @(negedge clk);
    pb_read(A_MODE, r);
    check("state reported as Pause", r[7:4], ST_PAUSE);
    @(negedge clk); iPBSel = 1; iPBWrite = 1; iPBAd = A_OPERATION; iPBData = 1 << OP_RESUME;
    q = int'(cyc) + 1;            // first cycle the controller sees Resume
    @(negedge clk); iPBSel = 0; iPBWrite = 0;
    wait_finish(4'b0011);
    n_trig_pos++; n_full++; n_round_wrap += rounds - 1;
    check("run2 posedge of P2 bit 3", {p2(trig_cyc)[3], p2(trig_cyc - 1)[3]}, 2'b10);
    // samples offered for storing: trig..p-2, then q onwards
    list.delete();
    c = trig_cyc;
    while (list.size() < size * rounds) begin
      if (c == p - 1) c = q;
      if (p4(c) & 1) list.push_back(p4(c)); else n_qual_skip++;
      c++;
    end
    read_back(1'b1, base, size);
    for (int i = 0; i < size; i++)
      check($sformatf("run2 word %0d", i), rb_data[i], list[(rounds - 1) * size + i]);

    // ---- run 3: stop while searching for a trigger that never comes
    configure(0, 0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 4'b0000, 0, 0, 'h100, 16, 1);
    pb_write(A_OPERATION, 1 << OP_START);
    repeat (50) @(negedge clk);
    pb_read(A_MODE, r);
    check("state reported as Trigger Search", r[7:4], ST_TRIG);
    pb_write(A_OPERATION, 1 << OP_STOP);
    repeat (3) @(negedge clk);
    pb_read(A_MODE, r);
    check("back in INI", r[7:4], ST_INI);
    pb_read(A_FINISH, r);
    check("no finish flags after stop in search", r, 0);
    pb_read(A_MEM_SIZE, r);
    check("registers kept after stop in search", r, 16);

    // ---- run 4: negedge trigger on P1 bit 6, stop during store search
    base = 'h8000; size = 'h800;
    configure(0, 1, 32'h40, 32'h40, 4'(1 << EDGE_NEG), 0, 0, base, size, 1);
    trig_cyc = -1;
    pb_write(A_OPERATION, 1 << OP_START);
    while (trig_cyc < 0) @(negedge clk);
    repeat (100) @(negedge clk);
    @(negedge clk); iPBSel = 1; iPBWrite = 1; iPBAd = A_OPERATION; iPBData = 1 << OP_STOP;
    p = int'(cyc) + 1;
    @(negedge clk); iPBSel = 0; iPBWrite = 0;
    wait_finish(4'b0101);
    n_trig_neg++; n_stop_store++;
    check("run4 negedge of P1 bit 6", {p1(trig_cyc)[6], p1(trig_cyc - 1)[6]}, 2'b01);
    k = p - 1 - trig_cyc;          // words stored before the stop
    read_back(1'b1, base, k + 4);
    for (int i = 0; i < k; i++)
      check($sformatf("run4 word %0d", i), rb_data[i], p2(trig_cyc + i));
    for (int i = k; i < k + 4; i++)
      check($sformatf("run4 cleared word %0d", i), rb_data[i], 0);

    // ---- every mechanism must have happened
    $display("clear=%0d level=%0d pos=%0d neg=%0d qual_skip=%0d pause=%0d resume=%0d",
             n_clear, n_trig_level, n_trig_pos, n_trig_neg, n_qual_skip, n_pause, n_resume);
    $display("stop_trig=%0d stop_store=%0d full=%0d round_wrap=%0d both_ports=%0d user_writes=%0d",
             n_stop_trig, n_stop_store, n_full, n_round_wrap, n_both_ports, n_user_writes);
    check("mechanism clear mem",      n_clear > 0, 1);
    check("mechanism level trigger",  n_trig_level > 0, 1);
    check("mechanism pos edge",       n_trig_pos > 0, 1);
    check("mechanism neg edge",       n_trig_neg > 0, 1);
    check("mechanism store qualifier", n_qual_skip > 0, 1);
    check("mechanism pause",          n_pause > 0, 1);
    check("mechanism resume",         n_resume > 0, 1);
    check("mechanism stop in search", n_stop_trig > 0, 1);
    check("mechanism stop in store",  n_stop_store > 0, 1);
    check("mechanism memory full",    n_full > 0, 1);
    check("mechanism round wrap",     n_round_wrap > 0, 1);
    check("mechanism shared memory",  n_both_ports > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
