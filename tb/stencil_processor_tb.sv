// stencil_processor_tb: self-checking test of the explicit (stencil) processor.
//
// A small instance (P = 4 stacked elements, K = 10 grid points, OPTS = 3 options) is
// loaded through the host port with Black-Scholes explicit coefficients (a
// different volatility per option) and a call-option payoff, then run for 2 passes
// (8 time steps) and afterwards for 1 more pass. The testbench advances the same
// grids in real arithmetic, rounding to binary32 after every operation in the
// order the elements use and keeping the end points fixed, and compares every value
// read back bit for bit. It checks the warm-up delay of the stack (the first point
// leaves the last element 2*P cycles after it entered the first) and the run time,
// passes * (OPTS*K + 2*P + 1) + 1 cycles. Ends with the TB_RESULT line; a watchdog
// stops a hung run.
module stencil_processor_tb;
  import fp_ref_pkg::*;

  localparam int P = 4;
  localparam int K = 10;
  localparam int OPTS = 3;
  localparam int AW = $clog2(OPTS * K);

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  logic [1:0] host_sel = 0;
  logic [AW-1:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic start = 0;
  logic [15:0] n_passes = 0;
  logic busy, done;
  int checks = 0, failures = 0;
  int warmups = 0;

  stencil_processor #(.P(P), .K(K), .OPTS(OPTS)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] ca[OPTS][K], cb[OPTS][K], cc[OPTS][K], cu[OPTS][K];

  task automatic ref_step();
    logic [31:0] nu[K], x, y, z;
    for (int o = 0; o < OPTS; o++) begin
      nu[0] = cu[o][0];
      nu[K-1] = cu[o][K-1];
      for (int k = 1; k < K - 1; k++) begin
        x = r2f(f2r(ca[o][k]) * f2r(cu[o][k-1]));
        y = r2f(f2r(cb[o][k]) * f2r(cu[o][k]));
        z = r2f(f2r(cc[o][k]) * f2r(cu[o][k+1]));
        nu[k] = r2f(f2r(r2f(f2r(x) + f2r(y))) + f2r(z));
      end
      for (int k = 0; k < K; k++) cu[o][k] = nu[k];
    end
  endtask

  task automatic host_write(input logic [1:0] sel, input int addr, input logic [31:0] v);
    // host_we stays high between back-to-back writes; the caller lowers it.
    host_we <= 1; host_sel <= sel; host_addr <= AW'(addr); host_wdata <= v;
    @(posedge clk);
  endtask

  task automatic host_read(input logic [1:0] sel, input int addr, output logic [31:0] v);
    host_sel <= sel; host_addr <= AW'(addr);
    @(posedge clk);
    @(posedge clk);
    #1 v = host_rdata;
  endtask

  // Warm-up of the stack: cycles from the first point entering element 0 to the
  // first point leaving element P-1, measured on every pass.
  int t_in = 0, cyc = 0;
  logic v0_q = 0, vp_q = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    v0_q <= dut.s_valid[0];
    vp_q <= dut.s_valid[P];
    if (dut.s_valid[0] && !v0_q) t_in = cyc;
    if (dut.s_valid[P] && !vp_q) begin
      checks++;
      warmups++;
      if (cyc - t_in != 2 * P) begin
        failures++;
        $display("FAIL warm-up %0d cycles, expected %0d", cyc - t_in, 2 * P);
      end
    end
  end

  task automatic run(input int passes);
    int cycles;
    n_passes <= 16'(passes);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!done);
    checks++;
    if (cycles != passes * (OPTS * K + 2 * P + 1) + 1) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cycles, passes * (OPTS * K + 2 * P + 1) + 1);
    end
    for (int s = 0; s < passes * P; s++) ref_step();
  endtask

  task automatic compare_u();
    logic [31:0] v;
    for (int o = 0; o < OPTS; o++)
      for (int k = 0; k < K; k++) begin
        host_read(2'd0, o * K + k, v);
        checks++;
        if (v !== cu[o][k]) begin
          failures++;
          if (failures < 10) $display("FAIL u[opt %0d][%0d] = %h, expected %h", o, k, v, cu[o][k]);
        end
      end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sig, rr, dt;
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    rr = 0.05; dt = 0.002;
    for (int o = 0; o < OPTS; o++) begin
      sig = 0.2 + 0.1 * o;
      for (int k = 0; k < K; k++) begin
        ca[o][k] = r2f(0.5 * sig * sig * k * k * dt - 0.5 * rr * k * dt);
        cb[o][k] = r2f(1.0 - sig * sig * k * k * dt - rr * dt);
        cc[o][k] = r2f(0.5 * sig * sig * k * k * dt + 0.5 * rr * k * dt);
        cu[o][k] = r2f((k > 4) ? (k - 4.0) : 0.0);
        host_write(2'd1, o * K + k, ca[o][k]);
        host_write(2'd2, o * K + k, cb[o][k]);
        host_write(2'd3, o * K + k, cc[o][k]);
        host_write(2'd0, o * K + k, cu[o][k]);
      end
    end
    host_we <= 0;
    for (int k = 0; k < K; k++) begin
      host_read(2'd3, K + k, v);
      checks++;
      if (v !== cc[1][k]) begin failures++; $display("FAIL c read-back"); end
    end
    run(2);
    compare_u();
    run(1);
    compare_u();
    checks++;
    if (warmups != 3) begin
      failures++;
      $display("FAIL %0d warm-ups seen, expected 3", warmups);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
