// tb_mole_registers -- self-checking test of the mole register file.
// Writes random values to all 13 registers over the PIPE bus and reads them
// back (checking width truncation), checks that unselected writes and
// unmapped addresses have no effect, that Mode_REG reads return the
// controller state in bits [7:4], that finish flags OR into Finish_REG and
// that the controller's ResetReg pulse clears everything but the new flags.
module tb_mole_registers;
  import sonic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic iPBSel = 0, iPBWrite = 0;
  logic [PB_ADDR_W-1:0] iPBAd = '0;
  logic [PB_DATA_W-1:0] iPBData = '0, oPBData;
  mole_cfg_t cfg;
  logic iResetReg = 0;
  logic [3:0] iFinishSet = '0;
  mole_state_e iState = ST_INI;
  int checks = 0, failures = 0;

  mole_registers dut (.*, .oCfg(cfg));

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register widths in address order
  int widths[13] = '{4, 4, 4, 32, 32, 21, 32, 32, 21, 4, 4, 4, 4};
  logic [63:0] shadow[13];

  task automatic pb_write(input logic [11:0] a, input logic [63:0] d, input logic sel = 1);
    @(negedge clk);
    iPBSel = sel; iPBWrite = 1; iPBAd = a; iPBData = d;
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

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [63:0] r, v;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values
    for (int i = 0; i < 13; i++) begin
      pb_read(12'(i * 8), r);
      check($sformatf("reset reg %0d", i), r, 64'h0);
    end
    // write / read back, twice with fresh random data
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < 13; i++) begin
        v = {$urandom, $urandom};
        shadow[i] = v & ((64'h1 << widths[i]) - 1);
        // low address bits are ignored
        pb_write(12'(i * 8 + (pass % 8)), v);
      end
      for (int i = 0; i < 13; i++) begin
        pb_read(12'(i * 8), r);
        if (i == 0) check("mode", r, shadow[0]);   // iState = ST_INI = 0
        else check($sformatf("reg %0d", i), r, shadow[i]);
      end
    end
    // struct fields carry the same values
    check("cfg.trig_val_a", 64'(cfg.trig_val_a), shadow[3]);
    check("cfg.store_addr", 64'(cfg.store_addr), shadow[5]);
    check("cfg.mem_size",   64'(cfg.mem_size),   shadow[8]);
    check("cfg.sel_trg_ch", 64'(cfg.sel_trg_ch), shadow[11]);
    // write without select is ignored
    pb_write(12'h018, 64'h1234_5678, 0);
    pb_read(12'h018, r);
    check("unselected write", r, shadow[3]);
    // unmapped address reads zero and writes change nothing
    pb_write(12'h068, 64'hffff_ffff);
    pb_read(12'h068, r);
    check("unmapped read", r, 64'h0);
    pb_read(12'h100, r);
    check("unmapped read 2", r, 64'h0);
    // Mode_REG read reports the state in bits [7:4]
    iState = ST_STORE;
    pb_read(12'h000, r);
    check("mode with state", r, shadow[0] | (64'(ST_STORE) << 4));
    iState = ST_INI;
    // finish flags OR in
    pb_write(12'h060, 64'h0);
    @(negedge clk); iFinishSet = 4'b0100;
    @(negedge clk); iFinishSet = 4'b0001;
    @(negedge clk); iFinishSet = 4'b0000;
    pb_read(12'h060, r);
    check("finish or", r, 64'h5);
    // ResetReg clears all and sets the new flags
    @(negedge clk); iResetReg = 1; iFinishSet = 4'b0011;
    @(negedge clk); iResetReg = 0; iFinishSet = 4'b0000;
    for (int i = 0; i < 12; i++) begin
      pb_read(12'(i * 8), r);
      check($sformatf("after ResetReg reg %0d", i), r, 64'h0);
    end
    pb_read(12'h060, r);
    check("after ResetReg finish", r, 64'h3);
    check("cfg all clear", 64'(cfg.operation | cfg.mode), 64'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
