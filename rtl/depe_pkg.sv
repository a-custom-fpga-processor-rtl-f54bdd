// depe_pkg: types and constants shared by the DEPE (differential equation
// processing element) modules.
//
// A DEPE has no instruction set: every 32-bit word in its instruction RAM is a
// datapath control word whose fields drive the Data RAM addresses, the write
// enable, the ALU operation select and the write-data input select directly.
// Two kinds of word are used:
//   compute : dram[addr_w] = dram[addr_a] <op> dram[addr_b]   (input_sel = ALU)
//   store   : dram[addr_w] = d<input_sel>                      (input_sel = 1..3)
// A word with we = 0 does nothing (a no-op used to pad a program).
//
// The field names (We, Addr_w, Addr_r, Op_sel, Input_sel) and the three
// external inputs d1..d3 plus the fed-back ALU result d0 follow the
// architecture diagram of the design. The document bounds the control word at
// 32 bits with a 512-word Data RAM, i.e. three 9-bit addresses; the order of
// the fields, the 2-bit encodings and the 32-bit data word with 16 fraction
// bits are this design's own choices.
package depe_pkg;

  // Control-word format
  localparam int unsigned CW_W      = 32;
  localparam int unsigned CW_ADDR_W = 9;     // 512-word Data RAM maximum

  // ALU operation select (Op_sel)
  typedef enum logic [1:0] {
    OP_ADD = 2'b00,   // a + b
    OP_SUB = 2'b01,   // a - b
    OP_MUL = 2'b10,   // (a * b) >>> FRAC_W  (fixed-point multiply)
    OP_RSV = 2'b11    // reserved, behaves as OP_ADD
  } op_e;

  // Write-data select (Input_sel): d0 is the ALU result, d1..d3 the inputs
  typedef enum logic [1:0] {
    SEL_ALU = 2'b00,
    SEL_D1  = 2'b01,
    SEL_D2  = 2'b10,
    SEL_D3  = 2'b11
  } insel_e;

  // One control word, bit 31 first
  typedef struct packed {
    logic                 we;         // [31]    Data RAM write enable
    insel_e               input_sel;  // [30:29] write-data source
    op_e                  op_sel;     // [28:27] ALU operation
    logic [CW_ADDR_W-1:0] addr_w;     // [26:18] write address
    logic [CW_ADDR_W-1:0] addr_a;     // [17:9]  read address, port A
    logic [CW_ADDR_W-1:0] addr_b;     // [8:0]   read address, port B
  } cw_t;

  // Default data format: signed two's complement, Q15.16
  localparam int unsigned DEPE_DATA_W = 32;
  localparam int unsigned DEPE_FRAC_W = 16;

  // Helpers that assemble control words (used by testbenches and loaders)
  function automatic cw_t cw_compute(op_e op, logic [CW_ADDR_W-1:0] a,
                                     logic [CW_ADDR_W-1:0] b,
                                     logic [CW_ADDR_W-1:0] w);
    cw_t c;
    c.we        = 1'b1;
    c.input_sel = SEL_ALU;
    c.op_sel    = op;
    c.addr_w    = w;
    c.addr_a    = a;
    c.addr_b    = b;
    return c;
  endfunction

  function automatic cw_t cw_store(insel_e port, logic [CW_ADDR_W-1:0] w);
    cw_t c;
    c.we        = 1'b1;
    c.input_sel = port;
    c.op_sel    = OP_ADD;
    c.addr_w    = w;
    c.addr_a    = '0;
    c.addr_b    = '0;
    return c;
  endfunction

  function automatic cw_t cw_nop();
    return cw_t'('0);
  endfunction

endpackage
