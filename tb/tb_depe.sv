// tb_depe: end-to-end test of the DEPE at its default parameters.
//
// It hand-assembles the control words a model compiler would produce for the
// single-compartment RC lung model, dV/dt = Pmouth - V/Com (R = 1), loads them
// through the host port, presets constants and the initial volume, and lets
// the element step the model. Three programs are run in turn:
//   1. Euler: the five words store/mul/sub/mul/add of the compiled example,
//      where each word but the first uses the result of the word before it
//      (exercising the bypass on port A and on port B).
//   2. The same Euler step followed by words that exercise the remaining
//      paths: a no-op, stores from d1 and d3, and a word whose two operands
//      both come from the word before.
//   3. A second-order Runge-Kutta step (Ralston: k2 at 2/3 of the step,
//      weights 1/4 and 3/4), to show a program change.
// Expected values come from two sources kept here: a sequential interpreter
// of the control words over a copy of the Data RAM (checked after every run,
// all 512 words), and the closed-form solution
// V(t) = P*Com + (V0 - P*Com) * exp(-t/Com), which the integrated volume must
// follow within the method's error. It also checks the time-step rate: one
// step_done pulse every program length clocks, and exactly one per step.
// Each mechanism (store from each input, each ALU operation, bypass on each
// port, no-op, program wrap, host read/write, program reload) is counted, and
// one that never happened counts as a failure.
module tb_depe;
  import depe_pkg::*;

  localparam int DRAM_DEPTH = 512;
  localparam int Q = 65536;                 // 1.0 in Q15.16

  logic        clk = 0, rst_n = 0;
  logic        run = 0, restart = 0;
  logic [10:0] prog_last = '0;
  logic        busy, step_done;
  logic        imem_we = 0;
  logic [10:0] imem_addr = '0;
  logic [31:0] imem_wdata = '0;
  logic        dram_we = 0;
  logic [8:0]  dram_addr = '0, dram_raddr = '0;
  logic [31:0] dram_wdata = '0, dram_rdata;
  logic [31:0] d1 = '0, d2 = '0, d3 = '0;
  logic [31:0] dout;
  logic        dout_valid;

  depe dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_store[4];
  int n_op[4];
  int n_byp_a = 0, n_byp_b = 0, n_nop = 0, n_wrap = 0;
  int n_host_wr = 0, n_host_rd = 0, n_reload = 0, n_dout = 0;

  // reference copy of the Data RAM and the loaded program
  logic [31:0] ref_mem [DRAM_DEPTH];
  cw_t         prog [$];

  // ---------------------------------------------------------------- helpers
  task automatic fail(string msg);
    failures++;
    $display("FAIL (cycle %0d): %s", cycle, msg);
  endtask

  task automatic host_write(int addr, logic [31:0] v);
    @(negedge clk);
    dram_we = 1; dram_addr = 9'(addr); dram_wdata = v;
    @(negedge clk);
    dram_we = 0;
    ref_mem[addr] = v;
    n_host_wr++;
  endtask

  task automatic host_read(int addr, output logic [31:0] v);
    @(negedge clk);
    dram_raddr = 9'(addr);
    @(negedge clk);
    v = dram_rdata;
    n_host_rd++;
  endtask

  task automatic load_program();
    foreach (prog[i]) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 11'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    prog_last = 11'(prog.size() - 1);
    n_reload++;
  endtask

  // sequential meaning of one control word
  function automatic logic [31:0] alu_ref(op_e op, logic [31:0] a, logic [31:0] b);
    longint p;
    case (op)
      OP_SUB: return a - b;
      OP_MUL: begin
        p = longint'(signed'(a)) * longint'(signed'(b));
        return 32'(p >>> 16);
      end
      default: return a + b;
    endcase
  endfunction

  task automatic interpret_step();
    logic [31:0] r;
    foreach (prog[i]) begin
      cw_t c = prog[i];
      if (!c.we) continue;
      case (c.input_sel)
        SEL_D1:  r = d1;
        SEL_D2:  r = d2;
        SEL_D3:  r = d3;
        default: r = alu_ref(c.op_sel, ref_mem[c.addr_a], ref_mem[c.addr_b]);
      endcase
      ref_mem[c.addr_w] = r;
    end
  endtask

  // static census of what one pass of the program exercises
  task automatic census(int steps);
    for (int s = 0; s < steps; s++) begin
      foreach (prog[i]) begin
        cw_t c = prog[i];
        if (!c.we) begin n_nop++; continue; end
        n_store[c.input_sel]++;
        if (c.input_sel == SEL_ALU) n_op[c.op_sel]++;
        // the word executed just before this one in the pipeline
        if (i > 0 || s > 0) begin
          cw_t p = prog[(i == 0) ? prog.size() - 1 : i - 1];
          if (p.we && c.input_sel == SEL_ALU && p.addr_w == c.addr_a) n_byp_a++;
          if (p.we && c.input_sel == SEL_ALU && p.addr_w == c.addr_b) n_byp_b++;
        end
      end
      if (s > 0) n_wrap++;
    end
  endtask

  // run the loaded program for a whole number of steps from PC 0
  task automatic run_steps(int steps);
    int L = prog.size();
    int pulses = 0, first = -1, last = -1, bad_gap = 0, t0;
    int douts_seen = 0;
    @(negedge clk);
    restart = 1;
    @(negedge clk);
    restart = 0;
    run = 1;
    t0 = cycle;
    fork
      begin
        repeat (steps * L) @(posedge clk);
        #1 run = 0;
      end
      begin
        // watch step_done until the pipeline has drained
        while (run || busy || (cycle - t0) < steps * L + 4) begin
          @(posedge clk); #1;
          if (dout_valid) douts_seen++;
          if (step_done) begin
            if (last >= 0 && cycle - last != L) bad_gap++;
            if (first < 0) first = cycle;
            last = cycle;
            pulses++;
          end
        end
      end
    join
    for (int s = 0; s < steps; s++) interpret_step();
    census(steps);
    n_dout += douts_seen;
    checks++;
    if (pulses != steps) fail($sformatf("%0d step_done pulses for %0d steps", pulses, steps));
    checks++;
    if (bad_gap != 0) fail($sformatf("step period differs from %0d clocks", L));
    checks++;
    // the first step's last word writes back three clocks after it is fetched
    if (first - t0 != L + 2) fail($sformatf("first step done after %0d clocks, expected %0d",
                                            first - t0, L + 2));
  endtask

  task automatic compare_all();
    logic [31:0] v;
    for (int a = 0; a < DRAM_DEPTH; a++) begin
      host_read(a, v);
      checks++;
      if (v !== ref_mem[a]) fail($sformatf("dram[%0d] = %h, expected %h", a, v, ref_mem[a]));
    end
  endtask

  // closed-form RC volume, in real numbers
  function automatic real v_exact(real t, real p, real com, real v0);
    return p * com + (v0 - p * com) * $exp(-t / com);
  endfunction

  task automatic check_volume(real t, real p, real com, real v0, real tol, string tag);
    logic [31:0] v;
    real got, want;
    host_read(0, v);
    got  = real'(signed'(v)) / Q;
    want = v_exact(t, p, com, v0);
    checks++;
    if (got - want > tol || want - got > tol)
      fail($sformatf("%s: V(%0.3f) = %0.5f, closed form %0.5f", tag, t, got, want));
    else
      $display("%s: V(%0.3f) = %0.5f, closed form %0.5f", tag, t, got, want);
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- test
  // Data RAM layout: 0 V, 1 1/Com, 2 Pmouth, 3 temp, 4 dt,
  //                  5..9 scratch, 10 zero, 11 V_0, 12 k1, 13 k2, 14 incr,
  //                  15 2/3*dt, 16 1/4
  localparam real COM = 2.0, P = 1.0, V0 = 0.5;

  initial begin
    foreach (n_store[i]) begin n_store[i] = 0; n_op[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // clear the Data RAM, then preset constants and the initial value
    for (int a = 0; a < DRAM_DEPTH; a++) host_write(a, 32'($urandom));
    host_write(0, 32'(int'(V0 * Q)));
    host_write(1, 32'(int'(Q / COM)));
    host_write(4, 32'(Q / 64));          // dt = 1/64
    host_write(10, 32'd0);
    host_write(15, 32'(Q / 96));         // 2/3 * dt
    host_write(16, 32'(Q / 4));
    d2 = 32'(int'(P * Q));               // mouth pressure
    d1 = 32'h0000_3000;
    d3 = 32'hFFFF_A000;

    // 1. Euler step, as compiled for the RC lung
    prog = {};
    prog.push_back(cw_store(SEL_D2, 2));           // Pmouth      -> ram[2]
    prog.push_back(cw_compute(OP_MUL, 0, 1, 3));   // V * (1/Com) -> ram[3]
    prog.push_back(cw_compute(OP_SUB, 2, 3, 3));   // P - V/Com   -> ram[3]
    prog.push_back(cw_compute(OP_MUL, 3, 4, 3));   // * dt        -> ram[3]
    prog.push_back(cw_compute(OP_ADD, 0, 3, 0));   // V + ...     -> ram[0]
    load_program();
    run_steps(64);                                 // t = 1.0
    compare_all();
    check_volume(1.0, P, COM, V0, 0.01, "Euler");

    // 2. Euler plus the remaining paths
    prog.push_back(cw_nop());
    prog.push_back(cw_store(SEL_D1, 5));
    prog.push_back(cw_store(SEL_D3, 6));
    prog.push_back(cw_compute(OP_ADD, 5, 6, 7));
    prog.push_back(cw_compute(OP_MUL, 7, 7, 8));   // both operands bypassed
    prog.push_back(cw_compute(OP_SUB, 8, 0, 9));
    prog.push_back(cw_compute(OP_RSV, 9, 9, 9));   // reserved code adds
    load_program();
    run_steps(64);                                 // t = 2.0
    compare_all();
    check_volume(2.0, P, COM, V0, 0.01, "Euler+");
    checks++;
    if (dout !== ref_mem[9]) fail($sformatf("dout %h, expected %h", dout, ref_mem[9]));

    // 3. Ralston RK2 step
    prog = {};
    prog.push_back(cw_store(SEL_D2, 2));
    prog.push_back(cw_compute(OP_ADD, 0, 10, 11));  // V_0 = V + 0
    prog.push_back(cw_compute(OP_MUL, 0, 1, 3));    // V/Com
    prog.push_back(cw_compute(OP_SUB, 2, 3, 12));   // k1 = P - V/Com
    prog.push_back(cw_compute(OP_MUL, 12, 15, 3));  // k1 * 2/3 dt
    prog.push_back(cw_compute(OP_ADD, 11, 3, 0));   // V = V_0 + ...
    prog.push_back(cw_compute(OP_MUL, 0, 1, 3));    // V/Com
    prog.push_back(cw_compute(OP_SUB, 2, 3, 13));   // k2 = P - V/Com
    prog.push_back(cw_compute(OP_ADD, 12, 13, 14)); // k1 + k2
    prog.push_back(cw_compute(OP_ADD, 14, 13, 14)); //  + k2
    prog.push_back(cw_compute(OP_ADD, 14, 13, 14)); //  + k2
    prog.push_back(cw_compute(OP_MUL, 14, 16, 14)); //  * 1/4
    prog.push_back(cw_compute(OP_MUL, 14, 4, 14));  //  * dt
    prog.push_back(cw_compute(OP_ADD, 11, 14, 0));  // V = V_0 + incr
    load_program();
    run_steps(128);                                 // t = 4.0
    compare_all();
    check_volume(4.0, P, COM, V0, 0.005, "RK2");

    // every mechanism must have happened
    begin
      int seen [string];
      seen["store d1"]      = n_store[SEL_D1];
      seen["store d2"]      = n_store[SEL_D2];
      seen["store d3"]      = n_store[SEL_D3];
      seen["add"]           = n_op[OP_ADD];
      seen["sub"]           = n_op[OP_SUB];
      seen["mul_shift"]     = n_op[OP_MUL];
      seen["reserved op"]   = n_op[OP_RSV];
      seen["bypass port A"] = n_byp_a;
      seen["bypass port B"] = n_byp_b;
      seen["no-op"]         = n_nop;
      seen["program wrap"]  = n_wrap;
      seen["host write"]    = n_host_wr;
      seen["host read"]     = n_host_rd;
      seen["program load"]  = n_reload;
      seen["dout valid"]    = n_dout;
      foreach (seen[k]) begin
        $display("  %-14s %0d", k, seen[k]);
        checks++;
        if (seen[k] == 0) fail({"never exercised: ", k});
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
