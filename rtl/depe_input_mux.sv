// depe_input_mux: write-data selector in front of the DEPE Data RAM.
//
// Combinational 4:1 multiplexer. Input_sel = 0 picks d0, the ALU result fed
// back from the datapath output (a compute word); 1..3 pick the external
// inputs d1..d3 (a store word, din[i] -> dram[j]). The four inputs and the
// feedback path follow the architecture diagram; the encoding is this
// design's choice (depe_pkg::insel_e).
module depe_input_mux
  import depe_pkg::*;
#(
  parameter int unsigned W = DEPE_DATA_W
) (
  input  insel_e        sel,
  input  logic [W-1:0]  d0,
  input  logic [W-1:0]  d1,
  input  logic [W-1:0]  d2,
  input  logic [W-1:0]  d3,
  output logic [W-1:0]  y
);

  always_comb begin
    unique case (sel)
      SEL_D1:  y = d1;
      SEL_D2:  y = d2;
      SEL_D3:  y = d3;
      default: y = d0;
    endcase
  end

endmodule
