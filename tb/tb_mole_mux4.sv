// tb_mole_mux4 -- self-checking test of the 4:1 probe port multiplexer.
// Drives random data on the four ports and checks, for every select value,
// that the output equals the selected port. Combinational: no clock needed
// beyond a small time step between vectors.
module tb_mole_mux4;
  localparam int W = 32;
  logic [3:0][W-1:0] ports;
  logic [1:0]        sel;
  logic [W-1:0]      data;
  int checks = 0, failures = 0;

  mole_mux4 dut (.iPorts(ports), .iSel(sel), .oData(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < 4; p++) ports[p] = $urandom;
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (data !== ports[s]) begin
          failures++;
          $display("FAIL sel=%0d got %h expected %h", s, data, ports[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
