// depe: differential equation processing element (top).
//
// A small programmable processor for solving ordinary differential equations
// with fixed-point arithmetic. It has no instruction set: the instruction RAM
// holds datapath control words (see depe_pkg::cw_t), one of which is executed
// per clock. A compute word reads two Data RAM words, combines them in the
// ALU (add, subtract or fixed-point multiply) and writes the result back to
// the Data RAM; a store word copies one of the external inputs d1..d3 into
// the Data RAM. The compiled program is the straight-line code of one solver
// time step (Euler, RK2 or RK4); the program counter wraps after the last
// word, so the element steps the model forever at a rate of one time step
// every prog_last+1 clocks.
//
// Pipeline (one word per clock, three stages):
//   F  the PC addresses the instruction RAM; the word is registered there.
//   R  the word's read addresses go to the Data RAM; operands are registered.
//   X  the ALU computes; the input mux picks the ALU result (d0) or d1..d3,
//      and the Data RAM is written at the end of the clock.
// A word in R reads the Data RAM in the same clock that the word ahead of it,
// in X, writes it, and would get the old value. A registered bypass catches
// this: when the X-stage write address equals an R-stage read address, the
// written value replaces the RAM output in the next clock. So a program may
// use a result in the very next word, as the compiled code does, and needs
// no padding. Words two or more apart see the RAM contents directly.
//
// Host side (used only while run is low): imem_we/imem_addr/imem_wdata load
// control words; dram_we/dram_addr/dram_wdata preset constants and initial
// values; dram_raddr reads a Data RAM word, returned on dram_rdata one clock
// later. prog_last is the address of the program's last word. Raising run
// starts fetching at the current PC; restart returns the PC to 0.
//
// Outputs: dout is the result of the latest compute word (the ALU output the
// architecture diagram brings out), with dout_valid high for one clock when
// it changes; step_done pulses as the last word of a time step writes back;
// busy is high while words are in the pipeline.
//
// From the document: the control-word-driven datapath with PC, instruction
// RAM, dual-read Data RAM as register file, ALU with adder/subtractor and
// multiplier, the input mux over d0..d3, one output port, one word per clock,
// the two word types and the 32-bit word with 512-word Data RAM limit.
// This design's own choices: the three-stage split, the bypass, the bit
// layout and encodings, the Q15.16 data format, the 2048-word instruction
// RAM, and the host load/read ports.
module depe
  import depe_pkg::*;
#(
  parameter int unsigned DRAM_DEPTH = 512,
  parameter int unsigned IMEM_DEPTH = 2048,
  parameter int unsigned W          = DEPE_DATA_W,
  parameter int unsigned FRAC_W     = DEPE_FRAC_W,
  localparam int unsigned DAW       = $clog2(DRAM_DEPTH),
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // control
  input  logic           run,
  input  logic           restart,
  input  logic [IAW-1:0] prog_last,
  output logic           busy,
  output logic           step_done,
  // instruction RAM load
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_addr,
  input  logic [CW_W-1:0] imem_wdata,
  // Data RAM host access
  input  logic           dram_we,
  input  logic [DAW-1:0] dram_addr,
  input  logic [W-1:0]   dram_wdata,
  input  logic [DAW-1:0] dram_raddr,
  output logic [W-1:0]   dram_rdata,
  // external inputs and output
  input  logic [W-1:0]   d1,
  input  logic [W-1:0]   d2,
  input  logic [W-1:0]   d3,
  output logic [W-1:0]   dout,
  output logic           dout_valid
);

  // ---------------------------------------------------------------- F stage
  logic [IAW-1:0] pc;
  logic           pc_last;
  logic [CW_W-1:0] imem_rdata;

  depe_pc #(.DEPTH(IMEM_DEPTH)) u_pc (
    .clk, .rst_n, .run, .restart, .prog_last,
    .pc, .last(pc_last)
  );

  depe_inst_ram #(.DEPTH(IMEM_DEPTH), .W(CW_W)) u_imem (
    .clk,
    .rd_en  (run),
    .rd_addr(pc),
    .rd_data(imem_rdata),
    .wr_en  (imem_we),
    .wr_addr(imem_addr),
    .wr_data(imem_wdata)
  );

  // ---------------------------------------------------------------- R stage
  cw_t  cw_r;
  logic v_r, last_r;

  assign cw_r = cw_t'(imem_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r    <= 1'b0;
      last_r <= 1'b0;
    end else begin
      v_r    <= run;
      last_r <= run && pc_last;
    end
  end

  // ---------------------------------------------------------------- X stage
  cw_t          cw_x;
  logic         v_x, last_x;
  logic         byp_a, byp_b;
  logic [W-1:0] byp_data;
  logic [W-1:0] ra_data, rb_data;
  logic [W-1:0] op_a, op_b, alu_y, wdata;
  logic         x_we;

  assign x_we = v_x && cw_x.we;

  // Data RAM port A is shared with the host read port while idle
  logic [DAW-1:0] ra_addr, rb_addr, w_addr;
  logic           w_en;
  logic [W-1:0]   w_data;

  assign ra_addr = v_r ? cw_r.addr_a[DAW-1:0] : dram_raddr;
  assign rb_addr = cw_r.addr_b[DAW-1:0];
  assign w_en    = x_we || dram_we;
  assign w_addr  = x_we ? cw_x.addr_w[DAW-1:0] : dram_addr;
  assign w_data  = x_we ? wdata : dram_wdata;

  depe_data_ram #(.DEPTH(DRAM_DEPTH), .W(W)) u_dram (
    .clk,
    .ra_addr, .ra_data,
    .rb_addr, .rb_data,
    .we   (w_en),
    .waddr(w_addr),
    .wdata(w_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_x      <= 1'b0;
      last_x   <= 1'b0;
      cw_x     <= cw_t'('0);
      byp_a    <= 1'b0;
      byp_b    <= 1'b0;
      byp_data <= '0;
    end else begin
      v_x      <= v_r;
      last_x   <= last_r;
      cw_x     <= cw_r;
      byp_a    <= v_r && x_we && (cw_x.addr_w[DAW-1:0] == cw_r.addr_a[DAW-1:0]);
      byp_b    <= v_r && x_we && (cw_x.addr_w[DAW-1:0] == cw_r.addr_b[DAW-1:0]);
      byp_data <= wdata;
    end
  end

  assign op_a = byp_a ? byp_data : ra_data;
  assign op_b = byp_b ? byp_data : rb_data;

  depe_alu #(.W(W), .FRAC_W(FRAC_W)) u_alu (
    .op(cw_x.op_sel), .a(op_a), .b(op_b), .y(alu_y)
  );

  depe_input_mux #(.W(W)) u_imux (
    .sel(cw_x.input_sel), .d0(alu_y), .d1, .d2, .d3, .y(wdata)
  );

  // ---------------------------------------------------------------- outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      step_done  <= 1'b0;
    end else begin
      dout_valid <= x_we && (cw_x.input_sel == SEL_ALU);
      if (x_we && (cw_x.input_sel == SEL_ALU)) dout <= alu_y;
      step_done  <= v_x && last_x;
    end
  end

  assign dram_rdata = ra_data;
  assign busy       = v_r || v_x;

  // ---------------------------------------------------------------- checks
  initial begin
    assert (DRAM_DEPTH <= (1 << CW_ADDR_W))
      else $error("DRAM_DEPTH exceeds the control word's address range");
  end

  // The host may write the Data RAM only while no word is writing it
  a_host_write_idle: assert property (@(posedge clk) disable iff (!rst_n)
    dram_we |-> !x_we);
  // The host may load the instruction RAM only while stopped
  a_imem_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    imem_we |-> !run);

endmodule
