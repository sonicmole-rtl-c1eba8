// tb_mole -- self-checking test of the complete mole, driven as the host
// drives it: over the PIPE bus registers only.
//
// The probe ports carry distinct functions of the cycle number (P1 = cycle,
// P2 = cycle*3, P3 = cycle*7+1, P4 = ~cycle), so a stored word shows both
// which port was captured and in which cycle. Run 1 triggers on P2 and
// captures P3; run 2 triggers on a positive edge of P4 bit 5, captures P1,
// is paused and resumed over the bus, and fills its area twice. After each
// run the test polls Finish_REG, checks that the other registers were
// cleared, and compares the MemPortB writes with the expected samples.
module tb_mole;
  import sonic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic iPBSel = 0, iPBWrite = 0;
  logic [PB_ADDR_W-1:0] iPBAd = '0;
  logic [PB_DATA_W-1:0] iPBData = '0, oPBData;
  ch_t [N_PORTS-1:0] probe;
  pm_req_t memb;
  logic [3:0] mode;
  mole_state_e state;
  logic trigger;
  maddr_t addr_cnt;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  mole dut (.clk, .rst_n, .iPBSel, .iPBWrite, .iPBAd, .iPBData, .oPBData,
            .iProbe(probe), .iBank(1'b1), .oMemB(memb), .oMode(mode),
            .oState(state), .oTrigger(trigger), .oAddrCnt(addr_cnt));

  always #5 clk = !clk;

  assign probe[0] = ch_t'(cyc);
  assign probe[1] = ch_t'(cyc * 3);
  assign probe[2] = ch_t'(cyc * 7 + 1);
  assign probe[3] = ~ch_t'(cyc);

  mdata_t mem[int unsigned];
  int trig_cyc, bank_errs;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (memb.we) begin
      mem[int'(memb.addr)] = memb.wdata;
      if (memb.bank !== 1'b1) bank_errs++;
    end
    if (trigger) trig_cyc = int'(cyc);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wait_finish(input logic [3:0] exp_flags);
    logic [63:0] r;
    int polls = 0;
    do begin pb_read(A_FINISH, r); polls++; end while (r == 0 && polls < 5000);
    check("finish flags", r, 64'(exp_flags));
    for (int a = 0; a < 12; a++) begin
      pb_read(12'(a * 8), r);
      check($sformatf("reg %0h cleared", a * 8), r, 0);
    end
    pb_write(A_FINISH, 0);
  endtask

  logic [63:0] r;
  int base, size, p, q, k, n, c;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // run 1: trigger P2 == 600 (level), capture P3, 40 words
    base = 'h2000; size = 40;
    pb_write(A_MODE, 1);
    pb_read(A_MODE, r);
    check("mode readback", r, 1);
    check("mode output", mode, 1);
    pb_write(A_SEL_TRG_CH, 1);
    pb_write(A_SEL_OUT_CH, 2);
    pb_write(A_TRIG_VAL_A, 600);
    pb_write(A_TRIG_VAL_B, 32'hFFFF_FFFF);
    pb_write(A_EDGE_TRIG, 0);
    pb_write(A_STORE_ADDR, base);
    pb_write(A_MEM_SIZE, size);
    pb_write(A_ROUND_NO, 1);
    pb_write(A_OPERATION, 1 << OP_START);
    repeat (size + 3) @(negedge clk);
    pb_read(A_MODE, r);
    check("state reported while searching", r[7:4], ST_TRIG);
    wait_finish(4'b0011);
    check("trigger cycle", trig_cyc, 200);
    for (int i = 0; i < size; i++)
      check($sformatf("run1 word %0d", i), mem[base + i], ch_t'((trig_cyc + i) * 7 + 1));

    // run 2: positive edge of P4 bit 5 (P4 = ~cycle), capture P1,
    // pause / resume, two rounds over 24 words
    base = 'h1F_FFF0; size = 24;     // the area wraps past the top address
    pb_write(A_SEL_TRG_CH, 3);
    pb_write(A_SEL_OUT_CH, 0);
    pb_write(A_TRIG_VAL_A, 32'h20);
    pb_write(A_TRIG_VAL_B, 32'h20);
    pb_write(A_EDGE_TRIG, 1 << EDGE_POS);
    pb_write(A_STORE_ADDR, base);
    pb_write(A_MEM_SIZE, size);
    pb_write(A_ROUND_NO, 2);
    trig_cyc = -1;
    pb_write(A_OPERATION, 1 << OP_START);
    while (trig_cyc < 0) @(negedge clk);
    repeat (5) @(negedge clk);
    // the write takes effect at the edge ending cycle p: pause seen in p+1
    @(negedge clk); iPBSel = 1; iPBWrite = 1; iPBAd = A_OPERATION; iPBData = 1 << OP_PAUSE;
    p = int'(cyc) + 1;
    @(negedge clk); iPBSel = 0; iPBWrite = 0;
    repeat (6) @(negedge clk);
    check("paused", state, ST_PAUSE);
    @(negedge clk); iPBSel = 1; iPBWrite = 1; iPBAd = A_OPERATION; iPBData = 1 << OP_RESUME;
    q = int'(cyc) + 1;
    @(negedge clk); iPBSel = 0; iPBWrite = 0;
    wait_finish(4'b0011);
    check("posedge trigger on ~cycle bit 5", trig_cyc % 64, 0);
    // samples stored: trig..p-2, then q, q+1, ...; 48 in all, last 24 remain
    k = p - 1 - trig_cyc;
    for (int i = 0; i < size; i++) begin
      n = size + i;       // index of the stored sample kept in word i
      c = (n < k) ? trig_cyc + n : q + n - k;
      check($sformatf("run2 word %0d", i), mem[(base + i) % (1 << 21)], c);
    end
    check("bank", bank_errs, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
