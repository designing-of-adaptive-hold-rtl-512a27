// Test environment for the aging-aware variable-latency multiplier, used by
// the unit's own testbench and by the top-level one.
//
// RTL simulation has no gate delays, so this environment gives the bypassing
// multiplier a delay model: after the input registers load a pattern, the
// multiplier output keeps showing the previous product (it is forced) for a
// time D that depends on the number of ones k in the operand that controls
// the bypass, and on an `age` knob. With period T = 10 ns and clk_del lagging
// clk by 3 ns, an operation launched on a clk_del edge has 7 ns to reach the
// Razor main flip-flops, and the shadow latch still sees it up to 10 ns.
//   k below W-N (more than N zeros):   D = 6.5 ns - 0.4 ns per one fewer (min 3)
//   k at or above W-N:                 D = 10 ns + 1 ns per extra one (max 16)
//   aged:                              D + 0.7 ns
// So a fresh circuit never misses the 7 ns budget, while an aged one misses it
// exactly for patterns with N+1 zeros: those that the first judging block
// calls one-cycle and the second does not. The environment predicts for every
// operation whether it is one- or two-cycle, whether Razor must catch it,
// and its latency in clk edges, and checks product, order and latency.
// USE_TOP selects the whole top level (instantiated with its defaults, so
// W, N_ZEROS, ... must then equal the top's defaults) instead of the unit;
// the top's Baugh-Wooley multiplier is then checked exhaustively as well.
module vl_env
  import ahl_pkg::*;
#(
  parameter int unsigned W             = 16,
  parameter int unsigned N_ZEROS       = 8,
  parameter int unsigned OP_WINDOW     = 64,
  parameter int unsigned ERR_THRESHOLD = 4,
  parameter bypass_e     BYPASS        = BYPASS_COLUMN,
  parameter bit          USE_TOP       = 1'b0,
  parameter int unsigned BW_N          = 4,
  parameter int unsigned FRESH_OPS     = 300,
  parameter int unsigned AGED_OPS      = 600
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam realtime T   = 10.0;
  localparam realtime DLY = 3.0;

  typedef struct {
    logic [2*W-1:0] prod;
    realtime        launch;
    int             lat;
    bit             err;
  } op_t;

  logic           clk = 1'b0;
  logic           clk_del = 1'b0;
  logic           rst_n = 1'b0;
  logic           in_valid = 1'b0;
  logic           in_ready;
  logic [W-1:0]   md = '0, mr = '0;
  logic           out_valid;
  logic [2*W-1:0] product;
  logic           razor_error, aged, one_cycle;

  // forced multiplier output
  logic [2*W-1:0] stale_v;
  logic           force_on = 1'b0;

  always #(T / 2) clk = ~clk;
  always @(clk) clk_del <= #(DLY) clk;

  if (USE_TOP) begin : g_top
    logic signed [BW_N-1:0]   bw_a = '0, bw_b = '0;
    logic signed [2*BW_N-1:0] bw_p;
    ahl_top u_dut (
      .clk, .clk_del, .rst_n,
      .vl_in_valid(in_valid), .vl_in_ready(in_ready), .vl_md(md), .vl_mr(mr),
      .vl_out_valid(out_valid), .vl_product(product),
      .vl_razor_error(razor_error), .vl_aged(aged), .vl_one_cycle(one_cycle),
      .bw_a, .bw_b, .bw_p
    );
    always @(force_on) begin
      if (force_on) force u_dut.u_vl.mult_p = stale_v;
      else          release u_dut.u_vl.mult_p;
    end
  end else begin : g_unit
    aging_aware_mult #(
      .W(W), .N_ZEROS(N_ZEROS), .OP_WINDOW(OP_WINDOW),
      .ERR_THRESHOLD(ERR_THRESHOLD), .BYPASS(BYPASS)
    ) u_dut (
      .clk, .clk_del, .rst_n, .in_valid, .in_ready, .md, .mr,
      .out_valid, .product, .razor_error, .aged, .one_cycle
    );
    always @(force_on) begin
      if (force_on) force u_dut.mult_p = stale_v;
      else          release u_dut.mult_p;
    end
  end

  op_t            q[$];
  int             age = 0;
  logic [W-1:0]   reg_md = '0, reg_mr = '0;   // what the input registers hold
  realtime        last_err_launch = -100.0;
  int             n_ops = 0, n_one = 0, n_two = 0, n_err_pred = 0, n_err_seen = 0;
  int             n_idle = 0, n_err_after_aged = 0, n_back_to_back = 0, n_results = 0;
  int             n_bw = 0;
  int             lat_sum = 0;
  bit             aged_in_fresh = 0;
  bit             stim_done = 0;

  function automatic int popcount(logic [W-1:0] x);
    int c = 0;
    for (int i = 0; i < W; i++) c += int'(x[i]);
    return c;
  endfunction

  function automatic logic [W-1:0] with_ones(int k);
    logic [W-1:0] x = '0;
    while (popcount(x) < k) x[$urandom_range(W - 1)] = 1'b1;
    return x;
  endfunction

  function automatic realtime delay_of(int k, int aged_knob);
    int      lim = int'(W - N_ZEROS);
    realtime d;
    if (k < lim) begin
      d = 6.5 - 0.4 * real'(lim - 1 - k);
      if (d < 3.0) d = 3.0;
    end else begin
      d = 10.0 + real'(k - lim);
      if (d > 16.0) d = 16.0;
    end
    return d + (aged_knob != 0 ? 0.7 : 0.0);
  endfunction

  task automatic new_pattern();
    int k = int'(W - N_ZEROS) - 3 + int'($urandom_range(5));
    logic [W-1:0] ctl, oth;
    if (k < 0) k = 0;
    if ($urandom_range(9) == 0) ctl = W'($urandom());
    else ctl = with_ones(k);
    oth = W'({$urandom(), $urandom()});
    if (BYPASS == BYPASS_COLUMN) begin md = ctl; mr = oth; end
    else begin mr = ctl; md = oth; end
    in_valid = ($urandom_range(9) != 0);
  endtask

  // ---------------- stimulus, prediction, delay model ----------------
  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk_del);
    new_pattern();
    while (n_ops < int'(FRESH_OPS + AGED_OPS)) begin
      @(posedge clk_del);
      if (in_ready) begin
        // the input registers load the bus at this edge
        automatic logic [W-1:0]   ctl = (BYPASS == BYPASS_COLUMN) ? md : mr;
        automatic int             k = popcount(ctl);
        automatic int             zeros = int'(W) - k;
        automatic bit             one = aged ? (zeros > int'(N_ZEROS) + 1) : (zeros > int'(N_ZEROS));
        automatic realtime        d = delay_of(k, age);
        automatic logic [2*W-1:0] stale = (2*W)'(reg_md) * (2*W)'(reg_mr);
        automatic logic [2*W-1:0] prod = (2*W)'(md) * (2*W)'(mr);
        stale_v  = stale;
        force_on = 1'b1;
        if (in_valid) begin
          automatic op_t o;
          automatic bit  behind;
          o.prod   = prod;
          o.launch = $realtime;
          // an operation launched right behind a recovered one waits a
          // cycle for the recovery, so it has two cycles and cannot fail
          behind = ($realtime - last_err_launch == T);
          o.err    = one && !behind && (d > T - DLY) && (stale != prod);
          o.lat    = (one ? 1 : 2) + (o.err ? 1 : 0) + (behind ? 1 : 0);
          if (behind) n_back_to_back++;
          if (o.err) last_err_launch = $realtime;
          if (one) n_one++; else n_two++;
          if (o.err) n_err_pred++;
          if (o.err && aged) n_err_after_aged++;
          q.push_back(o);
          n_ops++;
          if (n_ops == int'(FRESH_OPS)) age = 1;
        end else begin
          n_idle++;
        end
        reg_md = md;
        reg_mr = mr;
        fork
          begin
            #(d);
            force_on = 1'b0;
          end
        join_none
        #1;
        new_pattern();
      end
    end
    in_valid = 1'b0;
    stim_done = 1;
  end

  // ---------------- result checking ----------------
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_results++;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("vl_env: result %h with no operation outstanding", product);
      end else begin
        automatic op_t o = q.pop_front();
        automatic int  lat = int'(($realtime - o.launch + DLY) / T) - 1;
        if (product !== o.prod) begin
          failures++;
          $display("vl_env: product %h, expected %h (launch %0t, lat %0d, err %0d)", product, o.prod, o.launch, o.lat, o.err);
        end
        lat_sum += lat;
        checks++;
        if (lat != o.lat) begin
          failures++;
          $display("vl_env: latency %0d clk edges, expected %0d (launch %0t)", lat, o.lat, o.launch);
        end
      end
    end
    if (rst_n && razor_error) n_err_seen++;
    if (rst_n && age == 0 && aged) aged_in_fresh = 1;
  end

  // ---------------- Baugh-Wooley, exhaustive (top only) ----------------
  if (USE_TOP) begin : g_bw_check
    initial begin
      @(posedge rst_n);
      for (int a = -(1 << (BW_N - 1)); a < (1 << (BW_N - 1)); a++) begin
        for (int b = -(1 << (BW_N - 1)); b < (1 << (BW_N - 1)); b++) begin
          g_top.bw_a = BW_N'(a);
          g_top.bw_b = BW_N'(b);
          @(negedge clk);
          checks++;
          n_bw++;
          if (g_top.bw_p != (2*BW_N)'(a * b)) begin
            failures++;
            $display("vl_env: Baugh-Wooley %0d * %0d = %0d", a, b, g_top.bw_p);
          end
        end
      end
    end
  end

  // ---------------- wrap-up ----------------
  initial begin
    wait (stim_done);
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("vl_env: %0d results missing", q.size()); end
    checks++;
    if (n_err_seen != n_err_pred) begin
      failures++;
      $display("vl_env: %0d Razor recoveries, %0d predicted", n_err_seen, n_err_pred);
    end
    // every mechanism must have happened
    checks++; if (n_one == 0)  begin failures++; $display("vl_env: no one-cycle operation"); end
    checks++; if (n_two == 0)  begin failures++; $display("vl_env: no two-cycle operation"); end
    checks++; if (n_err_seen == 0) begin failures++; $display("vl_env: no Razor recovery"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("vl_env: no hold after recovery"); end
    checks++; if (n_idle == 0) begin failures++; $display("vl_env: no idle slot"); end
    checks++; if (!aged) begin failures++; $display("vl_env: aging indicator never switched"); end
    checks++; if (aged_in_fresh) begin failures++; $display("vl_env: aged while fresh"); end
    checks++; if (n_err_after_aged != 0) begin failures++; $display("vl_env: errors after switching"); end
    if (USE_TOP) begin
      checks++; if (n_bw != (1 << (2 * BW_N))) begin failures++; $display("vl_env: Baugh-Wooley sweep incomplete"); end
    end
    $display("vl_env W=%0d %s: mean latency %0.3f clk cycles per operation (fixed two-cycle: 2)",
             W, BYPASS.name(), real'(lat_sum) / real'(n_results > 0 ? n_results : 1));
    $display("vl_env W=%0d %s: ops=%0d one-cycle=%0d two-cycle=%0d razor=%0d hold-after-razor=%0d idle=%0d aged=%0d errors-after-aged=%0d bw=%0d",
             W, BYPASS.name(), n_ops, n_one, n_two, n_err_seen, n_back_to_back, n_idle, aged,
             n_err_after_aged, n_bw);
    done = 1'b1;
  end

endmodule
