// depe_pc: program counter of the DEPE.
//
// The DEPE program is the straight-line code of one solver time step; there
// are no branches. While run is high the counter advances by one each clock
// and, after presenting the last word (prog_last), returns to 0 so the next
// time step starts without a gap. last is high in the cycle the last word's
// address is presented. When run is low the counter holds; restart returns
// it to 0 (synchronous), as does the active-low reset.
//
// The document shows a PC feeding the instruction RAM and states that branch
// instructions are not needed; the wrap-around at a programmable last address
// and the restart input are this design's choices.
module depe_pc #(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          restart,
  input  logic [AW-1:0] prog_last,
  output logic [AW-1:0] pc,
  output logic          last
);

  assign last = (pc == prog_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            pc <= '0;
    else if (restart)      pc <= '0;
    else if (run) begin
      if (last)            pc <= '0;
      else                 pc <= pc + 1'b1;
    end
  end

endmodule
