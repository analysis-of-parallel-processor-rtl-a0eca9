// bs_fpga_top_full_tb: test of the accelerator top at its default size.
//
// The top is built with its default parameters: 3 explicit processors of 80 stencil
// elements (256-point grids, 2 options each) and 11 implicit processors of 67
// interleaved options (256-point grids). One complete operation is run: every
// explicit processor makes one pass (80 time steps), every implicit processor two
// time steps for all 67 of its options.
// All explicit processors and all implicit processors are loaded in parallel
// through their host ports with Black-Scholes coefficients (a different volatility
// per option) and a call payoff, started together with different run lengths, and
// read back. Every value is compared bit for bit with bs_ref_pkg, which repeats the
// arithmetic in real numbers rounded to the hardware's format after each operation. The run time
// of every processor is checked: explicit passes * (OPTS*K + 2*P + 1) + 1 cycles,
// implicit 2*L*K cycles per step plus 4. The testbench also counts how often each
// mechanism of the design occurred (stack warm-up, back-to-back grids, boundary
// points, repeated passes, forward/backward sweep switch, step-to-step switch,
// loop feedback, restart after done) and fails if one never did.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module bs_fpga_top_full_tb;
  import fp_ref_pkg::*;
  import bs_ref_pkg::*;

  localparam bit DBL    = 1'b0;
  localparam int W      = DBL ? 64 : 32;
  localparam int NEXP   = 3;
  localparam int P      = 80;
  localparam int KE     = 256;
  localparam int OPTS_E = 2;
  localparam int NIMP   = 11;
  localparam int L      = 67;
  localparam int KI     = 256;
  localparam int AWE    = $clog2(OPTS_E * KE);
  localparam int AWI    = $clog2(L * KI);
  localparam int RUNS   = 1;

  logic clk = 0, rst_n = 0;
  logic [NEXP-1:0] e_host_we = '0, e_start = '0, e_busy, e_done;
  logic [1:0]      e_host_sel [NEXP];
  logic [AWE-1:0]  e_host_addr [NEXP];
  logic [W-1:0]    e_host_wdata [NEXP], e_host_rdata [NEXP];
  logic [15:0]     e_n_passes [NEXP];
  logic [NIMP-1:0] i_host_we = '0, i_start = '0, i_busy, i_done;
  logic [1:0]      i_host_sel [NIMP];
  logic [AWI-1:0]  i_host_addr [NIMP];
  logic [W-1:0]    i_host_wdata [NIMP], i_host_rdata [NIMP];
  logic [15:0]     i_n_steps [NIMP];

  int checks = 0, failures = 0;

  bs_fpga_top dut (.*);

  always #5 clk = ~clk;

  // reference state: [processor][option] -> grid
  typedef word_t grid_t[];
  grid_t ea[NEXP][OPTS_E], eb[NEXP][OPTS_E], ec[NEXP][OPTS_E], eu[NEXP][OPTS_E];
  grid_t ia[NIMP][L], ib[NIMP][L], ic[NIMP][L], iu[NIMP][L];

  function automatic int e_passes(int e, int run);
    return 1;
  endfunction
  function automatic int i_steps(int i, int run);
    return 2;
  endfunction

  // ------------------------------------------------------------ mechanism counters
  int n_warmup = 0, n_grid_switch = 0, n_boundary = 0, n_pass = 0;
  int n_fwd_to_bwd = 0, n_step_to_step = 0, n_feedback = 0, n_restart = 0;
  logic vP_q = 0, v0_q = 0, isf_q = 0, isb_q = 0;
  int   t_v0 = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    vP_q  <= dut.g_exp[0].u_exp.s_valid[P];
    v0_q  <= dut.g_exp[0].u_exp.s_valid[0];
    isf_q <= dut.g_imp[0].u_imp.issue_f;
    isb_q <= dut.g_imp[0].u_imp.issue_b;
    if (dut.g_exp[0].u_exp.s_valid[0] && !v0_q) begin
      n_pass++;
      t_v0 = cyc;
    end
    if (dut.g_exp[0].u_exp.s_valid[P] && !vP_q) begin
      n_warmup++;
      checks++;
      if (cyc - t_v0 != 2 * P) begin
        failures++;
        $display("FAIL stack warm-up %0d cycles, expected %0d", cyc - t_v0, 2 * P);
      end
    end
    if (dut.g_exp[0].u_exp.g_pe[0].u_pe.tail_pend && dut.g_exp[0].u_exp.g_pe[0].u_pe.in_valid
        && dut.g_exp[0].u_exp.g_pe[0].u_pe.in_e.first) n_grid_switch++;
    if (dut.g_exp[0].u_exp.g_pe[0].u_pe.fire && dut.g_exp[0].u_exp.g_pe[0].u_pe.h_cur.first) n_boundary++;
    if (isf_q && dut.g_imp[0].u_imp.issue_b) n_fwd_to_bwd++;
    if (isb_q && dut.g_imp[0].u_imp.issue_f) n_step_to_step++;
    if (dut.g_imp[0].u_imp.f0_v && !dut.g_imp[0].u_imp.f0_first) n_feedback++;
  end

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end else begin
      $display("mechanism %s: %0d", what, n);
    end
  endtask

  // ------------------------------------------------------------ loading
  task automatic load_all();
    real sig, rr, dte, dti;
    rr  = 0.05;
    dti = 0.01;
    for (int e = 0; e < NEXP; e++)
      for (int o = 0; o < OPTS_E; o++) begin
        sig = 0.2 + 0.05 * (e * OPTS_E + o);
        dte = 0.5 / (0.5 * 0.5 * KE * KE);
        ea[e][o] = new[KE]; eb[e][o] = new[KE]; ec[e][o] = new[KE]; eu[e][o] = new[KE];
        for (int k = 0; k < KE; k++) begin
          ea[e][o][k] = expl_a(sig, rr, dte, k, DBL);
          eb[e][o][k] = expl_b(sig, rr, dte, k, DBL);
          ec[e][o][k] = expl_c(sig, rr, dte, k, DBL);
          eu[e][o][k] = payoff(k, KE / 2, DBL);
        end
      end
    for (int i = 0; i < NIMP; i++)
      for (int o = 0; o < L; o++) begin
        sig = 0.1 + 0.01 * (i * L + o);
        ia[i][o] = new[KI]; ib[i][o] = new[KI]; ic[i][o] = new[KI]; iu[i][o] = new[KI];
        for (int k = 0; k < KI; k++) begin
          ia[i][o][k] = impl_a(sig, rr, dti, k, DBL);
          ib[i][o][k] = impl_b(sig, rr, dti, k, DBL);
          ic[i][o][k] = impl_c(sig, rr, dti, k, DBL);
          iu[i][o][k] = payoff(k, KI / 2, DBL);
        end
      end
    // explicit memories, address o*K + k; implicit, address k*L + o
    for (int sel = 0; sel < 4; sel++)
      for (int n = 0; n < ((OPTS_E * KE > L * KI) ? OPTS_E * KE : L * KI); n++) begin
        for (int e = 0; e < NEXP; e++) begin
          int o, k;
          o = n / KE; k = n % KE;
          e_host_we[e]    <= (n < OPTS_E * KE);
          e_host_sel[e]   <= 2'(sel);
          e_host_addr[e]  <= AWE'(n);
          if (n < OPTS_E * KE)
            e_host_wdata[e] <= W'((sel == 0) ? eu[e][o][k] : (sel == 1) ? ea[e][o][k] :
                                  (sel == 2) ? eb[e][o][k] : ec[e][o][k]);
        end
        for (int i = 0; i < NIMP; i++) begin
          int o, k;
          o = n % L; k = n / L;
          i_host_we[i]    <= (n < L * KI);
          i_host_sel[i]   <= 2'(sel);
          i_host_addr[i]  <= AWI'(n);
          if (n < L * KI)
            i_host_wdata[i] <= W'((sel == 0) ? iu[i][o][k] : (sel == 1) ? ia[i][o][k] :
                                  (sel == 2) ? ib[i][o][k] : ic[i][o][k]);
        end
        @(posedge clk);
      end
    e_host_we <= '0;
    i_host_we <= '0;
    @(posedge clk);
  endtask

  // ------------------------------------------------------------ one run of all processors
  task automatic run_all(int run);
    int e_cyc[NEXP], i_cyc[NIMP];
    bit e_fin[NEXP], i_fin[NIMP];
    bit all_fin;
    for (int e = 0; e < NEXP; e++) e_n_passes[e] <= 16'(e_passes(e, run));
    for (int i = 0; i < NIMP; i++) i_n_steps[i] <= 16'(i_steps(i, run));
    e_start <= '1;
    i_start <= '1;
    @(posedge clk);
    e_start <= '0;
    i_start <= '0;
    for (int e = 0; e < NEXP; e++) begin e_cyc[e] = 0; e_fin[e] = 0; end
    for (int i = 0; i < NIMP; i++) begin i_cyc[i] = 0; i_fin[i] = 0; end
    do begin
      @(posedge clk);
      all_fin = 1;
      for (int e = 0; e < NEXP; e++) begin
        if (!e_fin[e]) begin e_cyc[e]++; if (e_done[e]) e_fin[e] = 1; end
        all_fin &= e_fin[e];
      end
      for (int i = 0; i < NIMP; i++) begin
        if (!i_fin[i]) begin i_cyc[i]++; if (i_done[i]) i_fin[i] = 1; end
        all_fin &= i_fin[i];
      end
    end while (!all_fin);
    for (int e = 0; e < NEXP; e++) begin
      int want;
      want = e_passes(e, run) * (OPTS_E * KE + 2 * P + 1) + 1;
      checks++;
      if (e_cyc[e] != want) begin
        failures++;
        $display("FAIL explicit processor %0d took %0d cycles, expected %0d", e, e_cyc[e], want);
      end
      for (int s = 0; s < e_passes(e, run) * P; s++)
        for (int o = 0; o < OPTS_E; o++) stencil_step(ea[e][o], eb[e][o], ec[e][o], eu[e][o], DBL);
    end
    for (int i = 0; i < NIMP; i++) begin
      int want;
      want = 2 * L * KI * i_steps(i, run) + 4;
      checks++;
      if (i_cyc[i] != want) begin
        failures++;
        $display("FAIL implicit processor %0d took %0d cycles, expected %0d", i, i_cyc[i], want);
      end
      for (int s = 0; s < i_steps(i, run); s++)
        for (int o = 0; o < L; o++) thomas_step(ia[i][o], ib[i][o], ic[i][o], iu[i][o], DBL);
    end
  endtask

  // ------------------------------------------------------------ read back and compare
  task automatic compare_all();
    int n_max;
    n_max = (OPTS_E * KE > L * KI) ? OPTS_E * KE : L * KI;
    for (int e = 0; e < NEXP; e++) e_host_sel[e] <= 2'd0;
    for (int i = 0; i < NIMP; i++) i_host_sel[i] <= 2'd0;
    for (int n = 0; n < n_max; n++) begin
      // address n is presented before the edge; its word is on host_rdata after it
      for (int e = 0; e < NEXP; e++) e_host_addr[e] <= AWE'((n < OPTS_E * KE) ? n : 0);
      for (int i = 0; i < NIMP; i++) i_host_addr[i] <= AWI'((n < L * KI) ? n : 0);
      @(posedge clk);
      #1;
      begin
        int m;
        m = n;
        if (m < OPTS_E * KE)
          for (int e = 0; e < NEXP; e++) begin
            checks++;
            if (e_host_rdata[e] !== W'(eu[e][m / KE][m % KE])) begin
              failures++;
              if (failures < 10) $display("FAIL explicit %0d opt %0d k %0d: %h, expected %h",
                                          e, m / KE, m % KE, e_host_rdata[e], W'(eu[e][m / KE][m % KE]));
            end
          end
        if (m < L * KI)
          for (int i = 0; i < NIMP; i++) begin
            checks++;
            if (i_host_rdata[i] !== W'(iu[i][m % L][m / L])) begin
              failures++;
              if (failures < 10) $display("FAIL implicit %0d opt %0d k %0d: %h, expected %h",
                                          i, m % L, m / L, i_host_rdata[i], W'(iu[i][m % L][m / L]));
            end
          end
      end
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NEXP; e++) begin
      e_host_sel[e] = '0; e_host_addr[e] = '0; e_host_wdata[e] = '0; e_n_passes[e] = '0;
    end
    for (int i = 0; i < NIMP; i++) begin
      i_host_sel[i] = '0; i_host_addr[i] = '0; i_host_wdata[i] = '0; i_n_steps[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    load_all();
    for (int run = 0; run < RUNS; run++) begin
      if (run > 0) n_restart++;
      run_all(run);
      compare_all();
    end
    expect_count("stack warm-up (2*P cycles)", n_warmup);
    expect_count("pass (stream through the stack)", n_pass);
    expect_count("back-to-back grids (tail slot)", n_grid_switch);
    expect_count("boundary point passed through", n_boundary);
    expect_count("forward to backward sweep", n_fwd_to_bwd);
    expect_count("backward sweep to next step", n_step_to_step);
    expect_count("loop feedback from L cycles earlier", n_feedback);
    
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
