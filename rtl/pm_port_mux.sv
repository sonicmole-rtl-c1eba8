// pm_port_mux -- the port multiplexer (Mx) of the PIPE memory controller.
//
// A PIPE has two memory ports, MemPortA (the user design) and MemPortB (the
// mole, or the user design when no mole is fitted), both running at the PIPE
// clock, and one synchronous SRAM interface to the PIPE memory banks running
// at twice that clock (66 MHz ports, 133 MHz memory in the published
// system). Each port may issue one request (read or write) every PIPE clock;
// the multiplexer gives port A the memory slot in the middle of the PIPE
// clock period and port B the slot at its end, so neither port ever waits.
// This module also divides clk2x by two to make the PIPE clock (oClk) so the
// two are phase-locked; that is this design's way of providing the 2:1 clock
// pair. The divider has no reset: it runs from power-up, and which clk2x
// edge becomes the first PIPE clock edge does not matter.
//
// Timing (n = PIPE clock cycle in which a port presents its request):
//   port A request goes to the memory at the clk2x edge half way through n,
//   port B request at the clk2x edge that ends n;
//   the memory (registered read, one clk2x cycle) returns the data, and both
//   oRdataA and oRdataB hold it throughout cycle n+2 (read latency 2).
//   If both ports write the same word in the same cycle, port B's write is
//   the one that remains.
// The memory side: oPm is registered on clk2x; iPmRdata must be the data of
// the request presented at the previous clk2x edge.
module pm_port_mux
  import sonic_pkg::*;
(
  input  logic    clk2x,
  input  logic    rst_n,
  output logic    oClk,       // PIPE clock, clk2x / 2
  // PIPE clock side
  input  pm_req_t iReqA,
  output mdata_t  oRdataA,
  input  pm_req_t iReqB,
  output mdata_t  oRdataB,
  // PIPE memory side (clk2x)
  output pm_req_t oPm,
  input  mdata_t  iPmRdata
);

  logic   clk_q;      // 1 while the PIPE clock is high
  mdata_t hold_a;

  // The divider runs during reset too, so that logic on the PIPE clock
  // sees clock edges while its reset is applied.
  always_ff @(posedge clk2x) clk_q <= !clk_q;

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      oPm     <= '0;
      hold_a  <= '0;
      oRdataA <= '0;
      oRdataB <= '0;
    end else begin
      if (clk_q) begin
        // middle of the PIPE cycle: port A's slot; collect the data of the
        // port A read issued one PIPE cycle earlier
        oPm    <= iReqA;
        hold_a <= iPmRdata;
      end else begin
        // end of the PIPE cycle (PIPE clock rises now): port B's slot; the
        // data now on the bus answers port B's previous request
        oPm     <= iReqB;
        oRdataB <= iPmRdata;
        oRdataA <= hold_a;
      end
    end
  end

  assign oClk = clk_q;

endmodule
