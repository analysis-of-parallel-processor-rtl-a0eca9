// thomas_processor: implicit time-marching processor for the one-factor
// Black-Scholes PDE. Every time step solves, for each option, the tridiagonal
// system a_k u_{k-1} + b_k u_k + c_k u_{k+1} = d_k with d = u of the previous step,
// using the Thomas algorithm:
//   forward:  r = 1/(b_i - a_i c*_{i-1});  d*_i = r (d_i - a_i d*_{i-1});  c*_i = r c_i
//             (for i = 0 the terms with a_0 are dropped, so c*_0 = c_0/b_0 and
//              d*_0 = d_0/b_0, each formed as r times the numerator)
//   backward: u_{K-1} = d*_{K-1};  u_i = d*_i - c*_i u_{i+1}
//
// Both sweeps are loop-carried recurrences: element i needs the result for i-1 (or
// i+1) of the same option. The processor hides that dependency by interleaving L
// independent options: the loop through the datapath is exactly L cycles deep, and
// a new element of a different option enters every cycle, so when option o comes
// round again its previous result is just leaving the loop. The temporary arrays
// c* and d* of all L options are kept in on-chip memory between the two sweeps.
// The forward loop holds four arithmetic register stages (products, differences,
// reciprocal, final products) and L-4 balancing registers; the backward loop two
// arithmetic stages and L-2 balancing registers. Both share one delay line.
//
// Number format: EW/MW, binary32 by default, binary64 with EW = 11, MW = 52.
//
// Memories (all L*K words, address i*L + o, one read and one write port,
// registered read): a, b, c (coefficients, written by the host once), u (values,
// written by the host, overwritten every step), cs and ds (c* and d*). The host
// port (sel: 0 = u, 1 = a, 2 = b, 3 = c) is served only while idle; host_rdata is
// valid one cycle after the address.
//
// Timing: start (with n_steps >= 1) while idle. A time step takes 2*L*K cycles, one
// cycle per element and sweep; the sweeps and the steps follow each other with no
// gap, and done pulses 4 cycles after the last backward element was issued.
module thomas_processor
  import bs_pkg::*;
#(
  parameter int unsigned L = 67,        // interleaved options = depth of the sweep loop
  parameter int unsigned K = 256,       // grid points per option
  parameter int unsigned EW = FP32_EW,  // exponent bits of the number format
  parameter int unsigned MW = FP32_MW,  // fraction bits of the number format
  localparam int unsigned W     = 1 + EW + MW,
  localparam int unsigned DEPTH = L * K,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access
  input  logic          host_we,
  input  logic [1:0]    host_sel,
  input  logic [AW-1:0] host_addr,
  input  logic [W-1:0]         host_wdata,
  output logic [W-1:0]         host_rdata,
  // control
  input  logic          start,
  input  logic [15:0]   n_steps,
  output logic          busy,
  output logic          done
);

  logic [W-1:0] a_mem  [DEPTH];
  logic [W-1:0] b_mem  [DEPTH];
  logic [W-1:0] c_mem  [DEPTH];
  logic [W-1:0] u_mem  [DEPTH];
  logic [W-1:0] cs_mem [DEPTH];
  logic [W-1:0] ds_mem [DEPTH];

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD, S_FLUSH} state_t;
  state_t state;

  logic [AW-1:0]          addr;        // element being issued
  logic [$clog2(L)-1:0]   cnt_o;       // option of the issued element
  logic [$clog2(K)-1:0]   cnt_i;       // sweep position (0 .. K-1) of the issued element
  logic [15:0]            steps_left;
  logic [2:0]             flush_cnt;

  logic issue_f, issue_b;
  assign issue_f = (state == S_FWD);
  assign issue_b = (state == S_BWD);
  assign busy    = (state != S_IDLE);

  // ---------------------------------------------------------------- memories
  logic [AW-1:0] raddr;
  logic [W-1:0] rd_a, rd_b, rd_c, rd_u, rd_cs, rd_ds;
  logic [1:0] host_sel_q;
  assign raddr = busy ? addr : host_addr;

  // forward pipeline registers (f0 = read data, f4 = results)
  logic          f0_v, f1_v, f2_v, f3_v, f4_v;
  logic          f0_first;
  logic [AW-1:0] f0_ad, f1_ad, f2_ad, f3_ad, f4_ad;
  logic [W-1:0]         f1_m1, f1_m2, f1_b, f1_c, f1_d;
  logic [W-1:0]         f2_den, f2_num, f2_c;
  logic [W-1:0]         f3_r, f3_num, f3_c;
  logic [W-1:0]         f4_cs, f4_ds;
  // backward pipeline registers (g0 = read data, g2 = result)
  logic          g0_v, g1_v, g2_v;
  logic          g0_last;
  logic [AW-1:0] g0_ad, g1_ad, g2_ad;
  logic [W-1:0]         g1_m, g1_ds, g2_u;

  always_ff @(posedge clk) begin
    rd_a  <= a_mem[raddr];
    rd_b  <= b_mem[raddr];
    rd_c  <= c_mem[raddr];
    rd_u  <= u_mem[raddr];
    rd_cs <= cs_mem[raddr];
    rd_ds <= ds_mem[raddr];
    if (f4_v) begin
      cs_mem[f4_ad] <= f4_cs;
      ds_mem[f4_ad] <= f4_ds;
    end
    if (g2_v) begin
      u_mem[g2_ad] <= g2_u;
    end else if (!busy && host_we) begin
      unique case (host_sel)
        2'd0: u_mem[host_addr] <= host_wdata;
        2'd1: a_mem[host_addr] <= host_wdata;
        2'd2: b_mem[host_addr] <= host_wdata;
        default: c_mem[host_addr] <= host_wdata;
      endcase
    end
  end

  always_ff @(posedge clk) host_sel_q <= host_sel;
  always_comb begin
    unique case (host_sel_q)
      2'd0: host_rdata = rd_u;
      2'd1: host_rdata = rd_a;
      2'd2: host_rdata = rd_b;
      default: host_rdata = rd_c;
    endcase
  end

  // ---------------------------------------------------------------- loop delay line
  // Forward results leave stage f4 and are needed again L-4 cycles later; backward
  // results leave g2 and are needed L-2 cycles later. The sweeps never need the
  // line at the same time, so it is shared (c* in the upper, d* or u in the lower half).
  localparam int unsigned DL = L - 2;
  localparam logic [W-1:0] ZERO = '0;
  localparam logic [W-1:0] ONE  = {2'b00, {(EW - 1){1'b1}}, {MW{1'b0}}};
  logic [2*W-1:0] dl [DL];
  logic [W-1:0] fb_cs, fb_ds, fb_u;

  always_ff @(posedge clk) begin
    dl[0] <= g2_v ? {ZERO, g2_u} : {f4_cs, f4_ds};
    for (int j = 1; j < DL; j++) dl[j] <= dl[j-1];
  end
  assign fb_cs = dl[L-5][2*W-1:W];
  assign fb_ds = dl[L-5][W-1:0];
  assign fb_u  = dl[L-3][W-1:0];

  // ---------------------------------------------------------------- forward datapath
  logic [W-1:0] a_eff, cp, dp, m1, m2, den, num, r, cs_n, ds_n;
  assign a_eff = f0_first ? ZERO : rd_a;
  assign cp    = f0_first ? ZERO : fb_cs;
  assign dp    = f0_first ? ZERO : fb_ds;

  fp_mul #(.EW(EW), .MW(MW)) fm1 (.a(a_eff), .b(cp), .y(m1));
  fp_mul #(.EW(EW), .MW(MW)) fm2 (.a(a_eff), .b(dp), .y(m2));
  fp_add #(.EW(EW), .MW(MW)) fs1 (.a(f1_b), .b(f1_m1), .sub(1'b1), .y(den));
  fp_add #(.EW(EW), .MW(MW)) fs2 (.a(f1_d), .b(f1_m2), .sub(1'b1), .y(num));
  fp_div #(.EW(EW), .MW(MW)) fd (.a(ONE), .b(f2_den), .y(r));
  fp_mul #(.EW(EW), .MW(MW)) fm3 (.a(f3_r), .b(f3_c), .y(cs_n));
  fp_mul #(.EW(EW), .MW(MW)) fm4 (.a(f3_r), .b(f3_num), .y(ds_n));

  // ---------------------------------------------------------------- backward datapath
  logic [W-1:0] up, mb, u_n;
  assign up = g0_last ? ZERO : fb_u;
  fp_mul #(.EW(EW), .MW(MW)) bm (.a(rd_cs), .b(up), .y(mb));
  fp_add #(.EW(EW), .MW(MW)) bs (.a(g1_ds), .b(g1_m), .sub(1'b1), .y(u_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {f0_v, f1_v, f2_v, f3_v, f4_v, g0_v, g1_v, g2_v} <= '0;
      f0_first <= 1'b0;
      g0_last  <= 1'b0;
      {f0_ad, f1_ad, f2_ad, f3_ad, f4_ad, g0_ad, g1_ad, g2_ad} <= '0;
      {f1_m1, f1_m2, f1_b, f1_c, f1_d} <= '0;
      {f2_den, f2_num, f2_c, f3_r, f3_num, f3_c, f4_cs, f4_ds} <= '0;
      {g1_m, g1_ds, g2_u} <= '0;
    end else begin
      // forward
      f0_v <= issue_f;  f0_ad <= addr;  f0_first <= (cnt_i == '0);
      f1_v <= f0_v;  f1_ad <= f0_ad;  f1_m1 <= m1;  f1_m2 <= m2;
      f1_b <= rd_b;  f1_c <= rd_c;  f1_d <= rd_u;
      f2_v <= f1_v;  f2_ad <= f1_ad;  f2_den <= den;  f2_num <= num;  f2_c <= f1_c;
      f3_v <= f2_v;  f3_ad <= f2_ad;  f3_r <= r;  f3_num <= f2_num;  f3_c <= f2_c;
      f4_v <= f3_v;  f4_ad <= f3_ad;  f4_cs <= cs_n;  f4_ds <= ds_n;
      // backward
      g0_v <= issue_b;  g0_ad <= addr;  g0_last <= (cnt_i == '0);
      g1_v <= g0_v;  g1_ad <= g0_ad;  g1_m <= mb;  g1_ds <= rd_ds;
      g2_v <= g1_v;  g2_ad <= g1_ad;  g2_u <= u_n;
    end
  end

  // ---------------------------------------------------------------- sequencer
  localparam logic [AW-1:0] LAST_ROW = AW'((K - 1) * L);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      addr       <= '0;
      cnt_o      <= '0;
      cnt_i      <= '0;
      steps_left <= '0;
      flush_cnt  <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (issue_f || issue_b) begin
        if (cnt_o == ($clog2(L))'(L - 1)) begin
          cnt_o <= '0;
          cnt_i <= (cnt_i == ($clog2(K))'(K - 1)) ? '0 : cnt_i + 1'b1;
        end else begin
          cnt_o <= cnt_o + 1'b1;
        end
      end
      unique case (state)
        S_IDLE: begin
          if (start && n_steps != 16'd0) begin
            state      <= S_FWD;
            steps_left <= n_steps;
            addr       <= '0;
            cnt_o      <= '0;
            cnt_i      <= '0;
          end
        end
        S_FWD: begin
          // rows i = 0 .. K-1, options 0 .. L-1: addresses in plain order
          if (addr == AW'(DEPTH - 1)) begin
            state <= S_BWD;
            addr  <= LAST_ROW;
          end else begin
            addr <= addr + 1'b1;
          end
        end
        S_BWD: begin
          // rows i = K-1 .. 0, options 0 .. L-1 within each row
          if (addr == AW'(L - 1)) begin
            addr <= '0;
            if (steps_left == 16'd1) begin
              state     <= S_FLUSH;
              flush_cnt <= '0;
            end else begin
              steps_left <= steps_left - 1'b1;
              state      <= S_FWD;
            end
          end else if (cnt_o == ($clog2(L))'(L - 1)) begin
            addr <= addr - AW'(2 * L - 1);
          end else begin
            addr <= addr + 1'b1;
          end
        end
        S_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 3'd2) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The loop must be deep enough for the arithmetic stages it contains.
  initial assert (L >= 5) else $error("thomas_processor: L must be at least 5");

  // Right after the switch to the backward sweep the last forward results are still
  // being written while the first backward results appear; they go to different
  // memories, and the delay line then prefers the backward value, as no forward
  // element is left to need the other. Memory writes must not hit the arrays the
  // host owns while a run is going on.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) g2_v |-> busy);

endmodule
