// tb_depe_dram_sizes: the DEPE with its smaller Data RAM sizes.
//
// The element is meant to be sized per model; besides the default 512 words,
// 64- and 128-word Data RAMs (distributed-RAM sized) are typical. This test
// builds one element with DRAM_DEPTH = 64 and one with 128, places the RC lung
// variables at the top of each address space, and runs the same Euler program
// (store Pmouth, V/Com, Pmouth - V/Com, times dt, add to V) on both for 128
// steps of h = 1/64. For each it checks the volume against the closed form
// V(t) = P*Com + (V0 - P*Com) * exp(-t/Com), bit-exact agreement with a
// sequential evaluation of the same fixed-point operations done here, and
// that step_done arrives once per 5 clocks.
module tb_depe_dram_sizes;
  import depe_pkg::*;

  localparam int Q = 65536;
  localparam int STEPS = 128;
  localparam real COM = 2.0, P = 1.0, V0 = 0.5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shared stimulus for both elements
  logic        run = 0, restart = 0;
  logic [10:0] prog_last = 11'd4;
  logic        imem_we = 0;
  logic [10:0] imem_addr = '0;
  logic [31:0] imem_wdata [2];
  logic        dram_we = 0;
  logic [6:0]  dram_addr [2];
  logic [31:0] dram_wdata = '0;
  logic [6:0]  dram_raddr [2];
  logic [31:0] d2 = 32'(int'(P * Q));

  logic        busy [2], step_done [2], dout_valid [2];
  logic [31:0] dram_rdata [2], dout [2];

  depe #(.DRAM_DEPTH(64)) dut64 (
    .clk, .rst_n, .run, .restart, .prog_last, .busy(busy[0]), .step_done(step_done[0]),
    .imem_we, .imem_addr, .imem_wdata(imem_wdata[0]),
    .dram_we, .dram_addr(dram_addr[0][5:0]), .dram_wdata, .dram_raddr(dram_raddr[0][5:0]),
    .dram_rdata(dram_rdata[0]), .d1('0), .d2, .d3('0), .dout(dout[0]), .dout_valid(dout_valid[0])
  );

  depe #(.DRAM_DEPTH(128)) dut128 (
    .clk, .rst_n, .run, .restart, .prog_last, .busy(busy[1]), .step_done(step_done[1]),
    .imem_we, .imem_addr, .imem_wdata(imem_wdata[1]),
    .dram_we, .dram_addr(dram_addr[1]), .dram_wdata, .dram_raddr(dram_raddr[1]),
    .dram_rdata(dram_rdata[1]), .d1('0), .d2, .d3('0), .dout(dout[1]), .dout_valid(dout_valid[1])
  );

  int pulses [2] = '{0, 0};
  int last_pulse [2] = '{-1, -1};
  int bad_gap [2] = '{0, 0};
  int cycle = 0;
  always @(posedge clk) begin
    cycle++;
    for (int k = 0; k < 2; k++)
      if (step_done[k]) begin
        if (last_pulse[k] >= 0 && cycle - last_pulse[k] != 5) bad_gap[k]++;
        last_pulse[k] = cycle;
        pulses[k]++;
      end
  end

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    longint p = longint'(signed'(a)) * longint'(signed'(b));
    return 32'(p >>> 16);
  endfunction

  initial begin
    int top [2] = '{64, 128};
    int aV [2], aK [2], aP [2], aT [2], aH [2];
    cw_t prog [2][5];
    logic [31:0] v_ref, k, h, v;
    real got, want;

    for (int e = 0; e < 2; e++) begin
      aV[e] = top[e] - 1; aK[e] = top[e] - 2; aP[e] = top[e] - 3;
      aT[e] = top[e] - 4; aH[e] = top[e] - 5;
      prog[e][0] = cw_store(SEL_D2, 9'(aP[e]));
      prog[e][1] = cw_compute(OP_MUL, 9'(aV[e]), 9'(aK[e]), 9'(aT[e]));
      prog[e][2] = cw_compute(OP_SUB, 9'(aP[e]), 9'(aT[e]), 9'(aT[e]));
      prog[e][3] = cw_compute(OP_MUL, 9'(aT[e]), 9'(aH[e]), 9'(aT[e]));
      prog[e][4] = cw_compute(OP_ADD, 9'(aV[e]), 9'(aT[e]), 9'(aV[e]));
    end
    k = 32'(int'(Q / COM));
    h = 32'(Q / 64);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 11'(i);
      imem_wdata[0] = prog[0][i]; imem_wdata[1] = prog[1][i];
    end
    @(negedge clk) imem_we = 0;
    // constants, written to both elements at once
    for (int j = 0; j < 3; j++) begin
      @(negedge clk);
      dram_we = 1;
      dram_addr[0] = 7'(j == 0 ? aV[0] : j == 1 ? aK[0] : aH[0]);
      dram_addr[1] = 7'(j == 0 ? aV[1] : j == 1 ? aK[1] : aH[1]);
      dram_wdata = (j == 0) ? 32'(int'(V0 * Q)) : (j == 1) ? k : h;
    end
    @(negedge clk) dram_we = 0;

    @(negedge clk) restart = 1;
    @(negedge clk) begin restart = 0; run = 1; end
    repeat (STEPS * 5) @(posedge clk);
    #1 run = 0;
    repeat (5) @(posedge clk);

    // sequential reference of the same fixed-point operations
    v_ref = 32'(int'(V0 * Q));
    for (int s = 0; s < STEPS; s++) v_ref = v_ref + fmul(d2 - fmul(v_ref, k), h);
    want = P * COM + (V0 - P * COM) * $exp(-(STEPS / 64.0) / COM);

    for (int e = 0; e < 2; e++) begin
      @(negedge clk) begin dram_raddr[0] = 7'(aV[0]); dram_raddr[1] = 7'(aV[1]); end
      @(negedge clk) v = dram_rdata[e];
      got = real'(signed'(v)) / Q;
      checks += 4;
      if (v !== v_ref) begin failures++; $display("FAIL %0d words: V %h, expected %h", top[e], v, v_ref); end
      if (got - want > 0.01 || want - got > 0.01) begin
        failures++; $display("FAIL %0d words: V = %f, closed form %f", top[e], got, want);
      end
      if (pulses[e] != STEPS) begin failures++; $display("FAIL %0d words: %0d step pulses", top[e], pulses[e]); end
      if (bad_gap[e] != 0) begin failures++; $display("FAIL %0d words: step period not 5", top[e]); end
      $display("%0d-word Data RAM: V(%0.1f) = %f, closed form %f", top[e], STEPS / 64.0, got, want);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
