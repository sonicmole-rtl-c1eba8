// mole_mux4 -- 4:1 probe port multiplexer of the mole (moleMultiplexers).
//
// The mole has two of these, both fed by the four probe ports P1..P4: one
// picks the trigger port, the other the capture port. Each is a purely
// combinational W-bit 4:1 multiplexer; iSel = 0..3 selects P1..P4. The
// selection comes from the 4-bit SelTrgCH / SelOutCH registers, of which
// this design uses the two low bits as a binary port number.
module mole_mux4 #(
  parameter int unsigned W = 32   // channels per port
) (
  input  logic [3:0][W-1:0] iPorts,  // iPorts[0] = P1 ... iPorts[3] = P4
  input  logic [1:0]        iSel,
  output logic [W-1:0]      oData
);

  always_comb begin
    unique case (iSel)
      2'd0: oData = iPorts[0];
      2'd1: oData = iPorts[1];
      2'd2: oData = iPorts[2];
      default: oData = iPorts[3];
    endcase
  end

endmodule
