// tb_pm_port_mux -- self-checking test of the PIPE memory port multiplexer.
// Both ports issue a random read or write every PIPE clock to a small
// address range (so that they often hit the same words) in both banks.
// A reference memory applies, in each PIPE cycle, port A's request and then
// port B's; read data is expected on the port two PIPE cycles after the
// request. Also checks that the PIPE clock is clk2x divided by two.
module tb_pm_port_mux;
  import sonic_pkg::*;

  logic clk2x = 0, rst_n = 0, clk;
  pm_req_t req_a, req_b, pm;
  mdata_t rdata_a, rdata_b, pm_rdata;
  int checks = 0, failures = 0;

  pm_port_mux dut (.clk2x, .rst_n, .oClk(clk), .iReqA(req_a), .oRdataA(rdata_a),
                   .iReqB(req_b), .oRdataB(rdata_b), .oPm(pm), .iPmRdata(pm_rdata));
  pm_sram_model #(.AW(6)) sram (.clk2x, .iPm(pm), .oRdata(pm_rdata));

  always #5 clk2x = !clk2x;

  initial begin
    repeat (20000) @(posedge clk2x);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mdata_t ref_mem [2][64];
  mdata_t exp_a[$], exp_b[$];   // expected read data, per cycle
  logic   chk_a[$], chk_b[$];
  int     n_clk2x, n_clk, overlap;
  mdata_t e;

  always @(posedge clk2x) n_clk2x++;

  function automatic pm_req_t rand_req();
    pm_req_t r;
    r.we    = 1'($urandom);
    r.bank  = 1'($urandom);
    r.addr  = maddr_t'($urandom % 8);
    r.wdata = $urandom;
    return r;
  endfunction

  // apply one port's request to the reference; returns read data
  function automatic mdata_t ref_apply(input pm_req_t r);
    mdata_t d = ref_mem[r.bank][r.addr[5:0]];
    if (r.we) ref_mem[r.bank][r.addr[5:0]] = r.wdata;
    return d;
  endfunction

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < 64; i++) ref_mem[b][i] = '0;
    req_a = '0; req_b = '0;
    repeat (4) @(posedge clk2x);
    rst_n = 1;
    repeat (2) @(posedge clk);
    n_clk2x = 0;
    for (int n = 0; n < 2000; n++) begin
      // data now on the ports answers the requests of two cycles ago
      if (chk_a.size() >= 2) begin
        e = exp_a.pop_front();
        if (chk_a.pop_front()) begin
          checks++;
          if (rdata_a !== e) begin failures++; $display("FAIL A read %0d: %h vs %h", n, rdata_a, e); end
        end
      end
      if (chk_b.size() >= 2) begin
        e = exp_b.pop_front();
        if (chk_b.pop_front()) begin
          checks++;
          if (rdata_b !== e) begin failures++; $display("FAIL B read %0d: %h vs %h", n, rdata_b, e); end
        end
      end
      req_a <= rand_req();
      req_b <= rand_req();
      #0;
      @(negedge clk2x);
      if (req_a.bank == req_b.bank && req_a.addr == req_b.addr) overlap++;
      exp_a.push_back(ref_apply(req_a)); chk_a.push_back(!req_a.we);
      exp_b.push_back(ref_apply(req_b)); chk_b.push_back(!req_b.we);
      @(posedge clk);
      n_clk++;
    end
    checks++;
    if (n_clk2x != 2 * n_clk) begin
      failures++;
      $display("FAIL clock ratio %0d clk2x edges for %0d PIPE clocks", n_clk2x, n_clk);
    end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no same-word accesses"); end
    $display("same-word requests from both ports: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
