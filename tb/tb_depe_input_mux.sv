// tb_depe_input_mux: self-checking test of the Data RAM write-data selector.
// For random data on d0..d3 it checks that each select code passes the
// expected input: 0 the ALU feedback d0, 1..3 the external inputs d1..d3.
module tb_depe_input_mux;
  import depe_pkg::*;

  logic [31:0] d [4];
  logic [31:0] y;
  insel_e      sel;
  int checks = 0, failures = 0;

  depe_input_mux dut (.sel, .d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int k = 0; k < 4; k++) d[k] = $urandom;
      sel = insel_e'(i % 4);
      #1;
      checks++;
      if (y !== d[i % 4]) begin
        failures++;
        $display("FAIL sel=%0d y=%h exp=%h", i % 4, y, d[i % 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
