// thomas_processor_tb: self-checking test of the implicit (Thomas) processor.
//
// A small instance (L = 7 interleaved options, K = 12 grid points) is loaded through
// the host port with Black-Scholes implicit coefficients (a different volatility per
// option) and a call-option payoff, then run for 3 time steps. The testbench runs
// the same Thomas algorithm in real arithmetic, rounding to binary32 after every
// operation in the order the datapath uses, and compares every value read back
// bit for bit. It also checks the run time, 2*L*K cycles per step plus 4, reads
// back a coefficient array, and runs a second, 1-step job to see that the processor
// restarts. Ends with the TB_RESULT line; a watchdog stops a hung run.
module thomas_processor_tb;
  import fp_ref_pkg::*;

  localparam int L = 7;
  localparam int K = 12;
  localparam int AW = $clog2(L * K);

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  logic [1:0] host_sel = 0;
  logic [AW-1:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic start = 0;
  logic [15:0] n_steps = 0;
  logic busy, done;
  int checks = 0, failures = 0;

  thomas_processor #(.L(L), .K(K)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] ca[L][K], cb[L][K], cc[L][K], cu[L][K];

  task automatic ref_step();
    logic [31:0] cs[K], ds[K];
    logic [31:0] r, den, num, m1, m2, m;
    for (int o = 0; o < L; o++) begin
      for (int i = 0; i < K; i++) begin
        if (i == 0) begin
          den = cb[o][0];
          num = cu[o][0];
        end else begin
          m1  = r2f(f2r(ca[o][i]) * f2r(cs[i-1]));
          m2  = r2f(f2r(ca[o][i]) * f2r(ds[i-1]));
          den = r2f(f2r(cb[o][i]) - f2r(m1));
          num = r2f(f2r(cu[o][i]) - f2r(m2));
        end
        r     = r2f(1.0 / f2r(den));
        cs[i] = r2f(f2r(r) * f2r(cc[o][i]));
        ds[i] = r2f(f2r(r) * f2r(num));
      end
      cu[o][K-1] = ds[K-1];
      for (int i = K - 2; i >= 0; i--) begin
        m = r2f(f2r(cs[i]) * f2r(cu[o][i+1]));
        cu[o][i] = r2f(f2r(ds[i]) - f2r(m));
      end
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

  task automatic run(input int steps);
    int cycles;
    n_steps <= 16'(steps);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!done);
    checks++;
    if (cycles != 2 * L * K * steps + 4) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cycles, 2 * L * K * steps + 4);
    end
    for (int s = 0; s < steps; s++) ref_step();
  endtask

  task automatic compare_u();
    logic [31:0] v;
    for (int o = 0; o < L; o++)
      for (int i = 0; i < K; i++) begin
        host_read(2'd0, i * L + o, v);
        checks++;
        if (v !== cu[o][i]) begin
          failures++;
          if (failures < 10) $display("FAIL u[opt %0d][%0d] = %h, expected %h", o, i, v, cu[o][i]);
        end
      end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
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
    rr = 0.05; dt = 0.01;
    for (int o = 0; o < L; o++) begin
      sig = 0.1 + 0.05 * o;
      for (int k = 0; k < K; k++) begin
        ca[o][k] = r2f(-0.5 * sig * sig * k * k * dt + 0.5 * rr * k * dt);
        cb[o][k] = r2f(1.0 + sig * sig * k * k * dt + rr * dt);
        cc[o][k] = r2f(-0.5 * sig * sig * k * k * dt - 0.5 * rr * k * dt);
        cu[o][k] = r2f((k > 5) ? (k - 5.0) : 0.0);
        host_write(2'd1, k * L + o, ca[o][k]);
        host_write(2'd2, k * L + o, cb[o][k]);
        host_write(2'd3, k * L + o, cc[o][k]);
        host_write(2'd0, k * L + o, cu[o][k]);
      end
    end
    host_we <= 0;
    // coefficient read-back
    for (int o = 0; o < L; o++) begin
      host_read(2'd2, 3 * L + o, v);
      checks++;
      if (v !== cb[o][3]) begin failures++; $display("FAIL b read-back"); end
    end
    run(3);
    compare_u();
    run(1);
    compare_u();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
