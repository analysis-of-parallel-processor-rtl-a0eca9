// stencil_pe_tb: self-checking test of one explicit-stencil processing element.
//
// Streams 40 grids of random length (2..24 points) and random binary32 values,
// first back to back with no gaps, then with random idle cycles between points.
// The expected output for each point is worked out in real arithmetic, rounded to
// binary32 after every operation in the order the element uses; boundary points
// must pass through unchanged. The output order, values, coefficients and markers
// are checked, and in the gap-free phase every point must leave exactly 2 cycles
// after it was presented. Ends with the TB_RESULT line; a watchdog stops a hung run.
module stencil_pe_tb;
  import fp_ref_pkg::*;

  typedef logic [31:0] fp32_t;
  typedef struct packed {
    fp32_t u;
    fp32_t a;
    fp32_t b;
    fp32_t c;
    logic  first;
    logic  last;
  } stencil_elem_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  stencil_elem_t in_elem = '0;
  logic out_valid;
  stencil_elem_t out_elem;
  int checks = 0, failures = 0;
  longint cyc = 0;

  stencil_pe dut (.clk, .rst_n, .in_valid, .in_elem, .out_valid, .out_elem);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  stencil_elem_t exp_q[$];
  longint        t_in_q[$];
  bit            gapless = 1;

  function automatic fp32_t mac3(stencil_elem_t p, stencil_elem_t c, stencil_elem_t n);
    logic [31:0] x, y, z;
    x = r2f(f2r(c.a) * f2r(p.u));
    y = r2f(f2r(c.b) * f2r(c.u));
    z = r2f(f2r(c.c) * f2r(n.u));
    return r2f(f2r(r2f(f2r(x) + f2r(y))) + f2r(z));
  endfunction

  task automatic send_grid(input int k, input bit gaps);
    stencil_elem_t g[];
    g = new[k];
    for (int i = 0; i < k; i++) begin
      g[i].u = rand_f(120, 133);
      g[i].a = rand_f(115, 127);
      g[i].b = rand_f(120, 127);
      g[i].c = rand_f(115, 127);
      g[i].first = (i == 0);
      g[i].last  = (i == k - 1);
    end
    for (int i = 0; i < k; i++) begin
      stencil_elem_t e;
      e = g[i];
      if (i != 0 && i != k - 1) e.u = mac3(g[i-1], g[i], g[i+1]);
      exp_q.push_back(e);
    end
    for (int i = 0; i < k; i++) begin
      if (gaps) begin
        in_valid <= 1'b0;
        repeat ($urandom % 3) @(posedge clk);
      end
      in_valid <= 1'b1;
      in_elem  <= g[i];
      @(posedge clk);
    end
  endtask

  // Input sampling edges are recorded by the same process that checks outputs, so
  // both see the edge counter before it advances. A point presented in the cycle
  // before edge c and registered at the output at edge c+1 (two cycles after it was
  // presented) is seen here at edge c+2.
  always @(posedge clk) begin
    if (rst_n && in_valid) t_in_q.push_back(cyc);
    if (out_valid) begin
      stencil_elem_t e;
      longint t0;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e  = exp_q.pop_front();
        t0 = t_in_q.pop_front();
        if (out_elem !== e) begin
          failures++;
          if (failures < 10) $display("FAIL got %h exp %h", out_elem, e);
        end
        if (gapless) begin
          checks++;
          if (cyc - t0 != 2) begin
            failures++;
            if (failures < 10) $display("FAIL latency %0d", cyc - t0);
          end
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 20; n++) send_grid(2 + $urandom % 23, 1'b0);
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    gapless = 0;
    for (int n = 0; n < 20; n++) send_grid(2 + $urandom % 23, 1'b1);
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d points never left", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
