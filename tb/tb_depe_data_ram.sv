// tb_depe_data_ram: self-checking test of the DEPE Data RAM.
// Fills the 512 words at the default depth, then for many clocks issues a
// random write together with two random reads, checking both read ports
// against a shadow copy kept here, one clock after the address. Reads of
// the address being written in that clock must return the old word.
module tb_depe_data_ram;
  localparam int DEPTH = 512;
  logic clk = 0;
  logic we = 0;
  logic [8:0] ra_addr = '0, rb_addr = '0, waddr = '0;
  logic [31:0] ra_data, rb_data, wdata = '0;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0, same_addr = 0;

  depe_data_ram dut (.clk, .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_a, exp_b;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom;
      @(negedge clk);
      we = 1; waddr = 9'(i); wdata = shadow[i];
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ra_addr = 9'($urandom);
      rb_addr = (i % 3 == 0) ? ra_addr : 9'($urandom);
      we      = 1'($urandom);
      waddr   = (i % 4 == 0) ? ra_addr : 9'($urandom);
      wdata   = $urandom;
      exp_a   = shadow[ra_addr];
      exp_b   = shadow[rb_addr];
      if (we && waddr == ra_addr) same_addr++;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks += 2;
      if (ra_data !== exp_a) begin failures++; $display("FAIL port A addr %0d", ra_addr); end
      if (rb_data !== exp_b) begin failures++; $display("FAIL port B addr %0d", rb_addr); end
    end
    checks++;
    if (same_addr == 0) begin failures++; $display("FAIL no read-during-write case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
