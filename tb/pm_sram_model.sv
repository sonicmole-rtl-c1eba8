// pm_sram_model -- behavioural model of the PIPE memory: two banks of
// synchronous SRAM, 32-bit words, on one interface clocked at clk2x.
// A write stores wdata at {bank, addr}; every request (read or write)
// returns the word at {bank, addr} on rdata after the clock edge, i.e. one
// clk2x cycle of read latency (for a write, the old contents). The model
// starts with all words zero. AW sets the address bits kept per bank.
module pm_sram_model
  import sonic_pkg::*;
#(
  parameter int unsigned AW = MEM_ADDR_W
) (
  input  logic    clk2x,
  input  pm_req_t iPm,
  output mdata_t  oRdata
);
  mdata_t mem [2][2**AW];

  initial begin
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 2**AW; i++) mem[b][i] = '0;
    oRdata = '0;
  end

  always @(posedge clk2x) begin
    oRdata <= mem[iPm.bank][iPm.addr[AW-1:0]];
    if (iPm.we) mem[iPm.bank][iPm.addr[AW-1:0]] <= iPm.wdata;
  end
endmodule
