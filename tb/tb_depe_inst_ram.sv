// tb_depe_inst_ram: self-checking test of the DEPE instruction RAM.
// Loads random words through the write port into every location at the
// default depth, reads them back in random order and checks that each word
// appears exactly one clock after its address and holds while rd_en is low.
module tb_depe_inst_ram;
  localparam int DEPTH = 2048;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [10:0] rd_addr = '0, wr_addr = '0;
  logic [31:0] rd_data, wr_data = '0;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  depe_inst_ram dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom;
      @(negedge clk);
      wr_en = 1; wr_addr = 11'(i); wr_data = shadow[i];
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 11'($urandom);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== shadow[rd_addr]) begin
        failures++;
        $display("FAIL addr %0d: %h exp %h", rd_addr, rd_data, shadow[rd_addr]);
      end
      held = rd_data;
      rd_addr = rd_addr + 1'b1;
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin
        failures++;
        $display("FAIL read data changed while rd_en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
