// depe_inst_ram: instruction RAM of the DEPE, holding control words.
//
// A simple dual-port RAM: one synchronous read port addressed by the program
// counter (rd_data is registered and appears the clock after rd_addr, and
// holds while rd_en is low), and one write port through which a host loads
// the compiled control words. The document states only that the control
// words are stored in an instruction RAM whose size the compiler chooses; the
// default depth of 2048 words (two 32-Kbit FPGA block RAMs) is this design's
// choice, sized for the largest program the document's performance figures
// imply (about 1,900 words per time step).
module depe_inst_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
