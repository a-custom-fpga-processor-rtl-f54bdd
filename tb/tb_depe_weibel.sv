// tb_depe_weibel: the DEPE running RK4 on Weibel-style lung trees.
//
// A Weibel lung of G generations is a binary tree of 2^G - 1 airway branches;
// each branch carries two state variables, its air flow Q and its volume V,
// so G = 2 gives 6 ODEs and G = 4 gives 30. The branch equations used here are
// a lumped resistance/inertance/compliance ladder:
//   P_b    = V_b / C                          (pressure of branch b)
//   dQ_b/dt = (P_parent - P_b - R*Q_b) / I    (P_parent of the trachea = Pmouth)
//   dV_b/dt = Q_b - Q_2b - Q_2b+1             (children's flows leave it)
// with branches numbered 1 (trachea), children of b at 2b and 2b+1.
//
// The testbench contains a small compiler: it turns these equations and the
// classic fourth-order Runge-Kutta method into DEPE control words (compute
// and store words only, no branches), assigns Data RAM addresses, loads the
// words and constants, and runs the element at its default parameters for
// one simulated second with h = 1/256 s. It checks
//   - every Data RAM word against a sequential interpreter of the words
//     (bit exact),
//   - every state against an RK4 integration of the same equations in real
//     arithmetic (the fixed-point rounding error must stay small),
//   - the rate: one time step every program-length clocks,
//   - that program and data fit the default instruction and Data RAM.
// It prints the clocks per time step and the run time this means at the
// clock rates reported for the element, for comparison with its published
// figures for these two models.
module tb_depe_weibel;
  import depe_pkg::*;

  localparam int Q1 = 65536;                // 1.0 in Q15.16
  localparam int IMEM_DEPTH = 2048;
  localparam int DRAM_DEPTH = 512;
  localparam int STEPS = 256;               // h = 1/256 s, one second

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

  task automatic fail(string msg);
    failures++;
    $display("FAIL (cycle %0d): %s", cycle, msg);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- compiler
  cw_t         prog [$];
  logic [31:0] init_val [DRAM_DEPTH];
  bit          init_used [DRAM_DEPTH];
  int          next_addr;

  function automatic int alloc(logic [31:0] v = '0);
    int a = next_addr++;
    init_val[a]  = v;
    init_used[a] = 1;
    return a;
  endfunction

  task automatic emit(op_e op, int a, int b, int w);
    prog.push_back(cw_compute(op, 9'(a), 9'(b), 9'(w)));
  endtask

  // model constants (real) and their fixed-point images
  localparam real C_R = 1.0, C_I = 0.25, C_C = 1.0, PMOUTH = 0.5;
  localparam real H = 1.0 / STEPS;

  int nb;                      // branches
  int aV [16], aQ [16], aP [16];          // state and pressure addresses
  int aV0 [16], aQ0 [16], akV [16], akQ [16], acV [16], acQ [16];
  int a_zero, a_invc, a_r, a_invi, a_pm, a_h2, a_h, a_h6, a_t;

  // f(y) -> k, for the states currently in aV/aQ
  task automatic emit_deriv();
    for (int b = 1; b <= nb; b++) emit(OP_MUL, aV[b], a_invc, aP[b]);
    for (int b = 1; b <= nb; b++) begin
      int pp = (b == 1) ? a_pm : aP[b / 2];
      emit(OP_SUB, pp, aP[b], a_t);          // P_parent - P_b
      emit(OP_MUL, aQ[b], a_r, akQ[b]);      // R*Q_b
      emit(OP_SUB, a_t, akQ[b], a_t);
      emit(OP_MUL, a_t, a_invi, akQ[b]);     // dQ_b/dt
      if (2 * b + 1 <= nb) begin
        emit(OP_SUB, aQ[b], aQ[2 * b], a_t);
        emit(OP_SUB, a_t, aQ[2 * b + 1], akV[b]);
      end else begin
        emit(OP_ADD, aQ[b], a_zero, akV[b]);
      end
    end
  endtask

  // y = y0 + k * hstep, for every state
  task automatic emit_stage(int hstep);
    for (int b = 1; b <= nb; b++) begin
      emit(OP_MUL, akQ[b], hstep, a_t);
      emit(OP_ADD, aQ0[b], a_t, aQ[b]);
      emit(OP_MUL, akV[b], hstep, a_t);
      emit(OP_ADD, aV0[b], a_t, aV[b]);
    end
  endtask

  // acc (+)= weight * k, weight 1 or 2 (first = assign)
  task automatic emit_acc(int weight, bit first);
    for (int b = 1; b <= nb; b++) begin
      if (first) begin
        emit(OP_ADD, akQ[b], a_zero, acQ[b]);
        emit(OP_ADD, akV[b], a_zero, acV[b]);
      end else begin
        repeat (weight) begin
          emit(OP_ADD, acQ[b], akQ[b], acQ[b]);
          emit(OP_ADD, acV[b], akV[b], acV[b]);
        end
      end
    end
  endtask

  task automatic compile_weibel(int gens);
    prog = {};
    foreach (init_used[i]) init_used[i] = 0;
    next_addr = 0;
    nb = (1 << gens) - 1;
    a_zero = alloc(0);
    a_invc = alloc(32'(int'(Q1 / C_C)));
    a_r    = alloc(32'(int'(Q1 * C_R)));
    a_invi = alloc(32'(int'(Q1 / C_I)));
    a_h2   = alloc(32'(Q1 / (2 * STEPS)));
    a_h    = alloc(32'(Q1 / STEPS));
    a_h6   = alloc(32'(int'($floor(Q1 / (6.0 * STEPS) + 0.5))));
    a_pm   = alloc(0);
    a_t    = alloc(0);
    for (int b = 1; b <= nb; b++) begin
      aV[b] = alloc(0); aQ[b] = alloc(0); aP[b] = alloc(0);
      aV0[b] = alloc(0); aQ0[b] = alloc(0);
      akV[b] = alloc(0); akQ[b] = alloc(0);
      acV[b] = alloc(0); acQ[b] = alloc(0);
    end
    // one RK4 time step
    prog.push_back(cw_store(SEL_D2, 9'(a_pm)));      // sample Pmouth
    for (int b = 1; b <= nb; b++) begin
      emit(OP_ADD, aQ[b], a_zero, aQ0[b]);
      emit(OP_ADD, aV[b], a_zero, aV0[b]);
    end
    emit_deriv(); emit_acc(1, 1); emit_stage(a_h2);   // k1
    emit_deriv(); emit_acc(2, 0); emit_stage(a_h2);   // k2
    emit_deriv(); emit_acc(2, 0); emit_stage(a_h);    // k3
    emit_deriv(); emit_acc(1, 0);                     // k4
    for (int b = 1; b <= nb; b++) begin
      emit(OP_MUL, acQ[b], a_h6, a_t);
      emit(OP_ADD, aQ0[b], a_t, aQ[b]);
      emit(OP_MUL, acV[b], a_h6, a_t);
      emit(OP_ADD, aV0[b], a_t, aV[b]);
    end
  endtask

  // ---------------------------------------------------------------- references
  logic [31:0] ref_mem [DRAM_DEPTH];

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
    foreach (prog[i]) begin
      cw_t c = prog[i];
      logic [31:0] r;
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

  // real-number RK4 of the same equations; state x[0..nb-1] = Q, x[nb..] = V
  real xs [32];

  function automatic void deriv(input real x [32], output real k [32]);
    for (int b = 1; b <= nb; b++) begin
      real pb = x[nb + b - 1] / C_C;
      real pp = (b == 1) ? PMOUTH : x[nb + b / 2 - 1] / C_C;
      k[b - 1] = (pp - pb - C_R * x[b - 1]) / C_I;
      k[nb + b - 1] = x[b - 1];
      if (2 * b + 1 <= nb) k[nb + b - 1] = x[b - 1] - x[2 * b - 1] - x[2 * b];
    end
  endfunction

  task automatic real_rk4_step();
    real k1 [32], k2 [32], k3 [32], k4 [32], y [32];
    int n = 2 * nb;
    deriv(xs, k1);
    for (int i = 0; i < n; i++) y[i] = xs[i] + H / 2 * k1[i];
    deriv(y, k2);
    for (int i = 0; i < n; i++) y[i] = xs[i] + H / 2 * k2[i];
    deriv(y, k3);
    for (int i = 0; i < n; i++) y[i] = xs[i] + H * k3[i];
    deriv(y, k4);
    for (int i = 0; i < n; i++)
      xs[i] = xs[i] + H / 6 * (k1[i] + 2 * k2[i] + 2 * k3[i] + k4[i]);
  endtask

  // ---------------------------------------------------------------- one model
  task automatic run_model(int gens, string name, real paper_ms);
    int L, pulses = 0, last = -1, bad_gap = 0;
    real us_per_step, max_err = 0.0;
    logic [31:0] v;

    compile_weibel(gens);
    L = prog.size();
    $display("%s: %0d ODEs, %0d control words per step, %0d Data RAM words",
             name, 2 * nb, L, next_addr);
    checks++;
    if (L > IMEM_DEPTH || next_addr > DRAM_DEPTH) fail("program does not fit");

    // load program and data; every Data RAM word gets a defined value
    foreach (prog[i]) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 11'(i); imem_wdata = prog[i];
    end
    @(negedge clk) imem_we = 0;
    prog_last = 11'(L - 1);
    for (int a = 0; a < DRAM_DEPTH; a++) begin
      ref_mem[a] = init_used[a] ? init_val[a] : 32'($urandom);
      @(negedge clk);
      dram_we = 1; dram_addr = 9'(a); dram_wdata = ref_mem[a];
    end
    @(negedge clk) dram_we = 0;
    d2 = 32'(int'(PMOUTH * Q1));
    foreach (xs[i]) xs[i] = 0.0;

    // run STEPS time steps
    @(negedge clk) restart = 1;
    @(negedge clk) begin restart = 0; run = 1; end
    fork
      begin
        repeat (STEPS * L) @(posedge clk);
        #1 run = 0;
      end
      begin
        do begin
          @(posedge clk); #1;
          if (step_done) begin
            if (last >= 0 && cycle - last != L) bad_gap++;
            last = cycle;
            pulses++;
          end
        end while (run || busy);
      end
    join
    for (int s = 0; s < STEPS; s++) begin
      interpret_step();
      real_rk4_step();
    end
    checks += 2;
    if (pulses != STEPS) fail($sformatf("%0d step_done pulses for %0d steps", pulses, STEPS));
    if (bad_gap != 0) fail("time step period differs from the program length");

    // bit-exact comparison of the whole Data RAM
    for (int a = 0; a < DRAM_DEPTH; a++) begin
      @(negedge clk) dram_raddr = 9'(a);
      @(negedge clk) v = dram_rdata;
      checks++;
      if (v !== ref_mem[a]) fail($sformatf("%s dram[%0d] = %h, expected %h", name, a, v, ref_mem[a]));
    end
    // states against real arithmetic
    for (int b = 1; b <= nb; b++) begin
      real gq = real'(signed'(ref_mem[aQ[b]])) / Q1;
      real gv = real'(signed'(ref_mem[aV[b]])) / Q1;
      real eq = gq - xs[b - 1], ev = gv - xs[nb + b - 1];
      if (eq < 0) eq = -eq;
      if (ev < 0) ev = -ev;
      if (eq > max_err) max_err = eq;
      if (ev > max_err) max_err = ev;
      checks++;
      if (eq > 0.002 || ev > 0.002)
        fail($sformatf("%s branch %0d: Q %f/%f V %f/%f", name, b, gq, xs[b - 1], gv, xs[nb + b - 1]));
    end
    $display("%s: V(trachea) at 1 s = %f (real RK4 %f), largest state error %f",
             name, real'(signed'(ref_mem[aV[1]])) / Q1, xs[nb], max_err);
    // rate: one word per clock; run time of 10,000 steps of 0.1 ms
    us_per_step = L / 175.0;
    $display("%s: %0d clocks per step; 1 s of model time at h = 0.1 ms takes %0.1f ms at 175 MHz, %0.1f ms at 198 MHz (published: %0.0f ms)",
             name, L, us_per_step * 10.0, L / 198.0 * 10.0, paper_ms);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_model(2, "W2", 11.0);
    run_model(4, "W4", 66.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
