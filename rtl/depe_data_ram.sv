// depe_data_ram: Data RAM of the DEPE, used as its register file.
//
// Holds the model's constants, state variables and temporaries. Two read
// ports (A and B) supply the two ALU operands of a compute word and one write
// port stores the result or an external input. Reads are synchronous: the
// data appears the clock after the address, which maps on FPGA block RAM as
// well as on distributed RAM. A read of the address being written in the
// same clock returns the old contents; the DEPE core bypasses that case.
//
// The document calls the Data RAM a dual-port RAM serving as a register file
// with a size chosen per model (64, 128 or 512 words; 512 at most). Two read
// ports plus a separate write port, the synchronous read and the
// read-before-write behaviour are this design's choices.
module depe_data_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra_addr,
  output logic [W-1:0]  ra_data,
  input  logic [AW-1:0] rb_addr,
  output logic [W-1:0]  rb_data,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
