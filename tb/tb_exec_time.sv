// tb_exec_time -- the mole used with a counter to measure how long a task
// inside the PIPE takes.
//
// The user design raises 'busy' while a task runs. Probe port P1 carries
// {busy, 31-bit free-running cycle counter}. The mole triggers on the
// positive edge of bit 31 and stores only samples with bit 31 set, so the
// store area (cleared beforehand) ends up holding one word per busy cycle.
// When the task is over the host stops the capture, reads the area back
// through MemPortA and computes the execution time from the stored counter
// values; the testbench compares it with the task length it generated.
// Two tasks of different lengths run one after the other; only the first
// is inside the capture.
module tb_exec_time;
  import sonic_pkg::*;

  localparam int TASK_CYCLES = 137;
  localparam int AREA        = 512;

  logic clk2x = 0, rst_n = 0, clk;
  logic iPBSel = 0, iPBWrite = 0;
  logic [PB_ADDR_W-1:0] iPBAd = '0;
  logic [PB_DATA_W-1:0] iPBData = '0, oPBData;
  ch_t [N_PORTS-1:0] probe;
  pm_req_t mem_a = '0, pm;
  mdata_t rdata_a, pm_rdata;
  logic [3:0] mode;
  mole_state_e state;
  logic trigger;
  maddr_t addr_cnt;
  int checks = 0, failures = 0;

  sonic_pipe_mole dut (
    .clk2x, .rst_n, .oClk(clk),
    .iPBSel, .iPBWrite, .iPBAd, .iPBData, .oPBData,
    .iProbe(probe), .iMemA(mem_a), .oMemARdata(rdata_a), .iMoleBank(1'b1),
    .oPm(pm), .iPmRdata(pm_rdata),
    .oMoleMode(mode), .oMoleState(state), .oMoleTrigger(trigger), .oMoleAddrCnt(addr_cnt));

  pm_sram_model sram (.clk2x, .iPm(pm), .oRdata(pm_rdata));

  always #5 clk2x = !clk2x;

  // user design: a counter and a task that runs for a set number of cycles
  logic [30:0] counter = '0;
  logic        busy = 1'b0;
  int          run_len = 0, run_left = 0;
  always @(posedge clk) begin
    counter <= counter + 1'b1;
    if (run_left > 0) begin
      busy <= 1'b1;
      run_left <= run_left - 1;
    end else begin
      busy <= 1'b0;
    end
  end
  assign probe[0] = {busy, counter};
  assign probe[1] = '0;
  assign probe[2] = '0;
  assign probe[3] = '0;

  initial begin
    repeat (200000) @(posedge clk2x);
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
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [63:0] r;
  mdata_t words[AREA];
  int stored, first, last;
  initial begin
    repeat (4) @(posedge clk2x);
    rst_n = 1;
    repeat (3) @(posedge clk);
    pb_write(A_SEL_TRG_CH, 0);
    pb_write(A_SEL_OUT_CH, 0);
    pb_write(A_TRIG_VAL_A, 32'h8000_0000);
    pb_write(A_TRIG_VAL_B, 32'h8000_0000);
    pb_write(A_EDGE_TRIG, 1 << EDGE_POS);
    pb_write(A_STORE_VAL_A, 32'h8000_0000);
    pb_write(A_STORE_VAL_B, 32'h8000_0000);
    pb_write(A_STORE_ADDR, 'h10000);
    pb_write(A_MEM_SIZE, AREA);
    pb_write(A_ROUND_NO, 1);
    pb_write(A_OPERATION, 1 << OP_START);
    // wait for the mole to be armed, then start the task
    do pb_read(A_MODE, r); while (r[7:4] != ST_TRIG);
    repeat (10) @(negedge clk);
    run_left = TASK_CYCLES;
    while (run_left > 0 || busy) @(negedge clk);
    repeat (20) @(negedge clk);
    pb_write(A_OPERATION, 1 << OP_STOP);
    do pb_read(A_FINISH, r); while (r == 0);
    check("finish flags (stopped)", r, 5);
    // a second, longer task after the capture must not show up
    run_left = 3 * TASK_CYCLES;
    // read the area back through MemPortA (read latency 2 PIPE clocks)
    for (int i = 0; i < AREA + 2; i++) begin
      @(posedge clk);
      if (i >= 2) words[i - 2] = rdata_a;
      mem_a <= '{we: 1'b0, bank: 1'b1, addr: maddr_t'('h10000 + i), wdata: '0};
    end
    stored = 0; first = -1; last = -1;
    for (int i = 0; i < AREA; i++)
      if (words[i][31]) begin
        stored++;
        if (first < 0) first = int'(words[i][30:0]);
        last = int'(words[i][30:0]);
      end
    $display("measured execution time: %0d cycles (%0d samples)", last - first + 1, stored);
    check("busy samples stored", stored, TASK_CYCLES);
    check("execution time from counter", last - first + 1, TASK_CYCLES);
    check("samples are contiguous", last - first, stored - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
