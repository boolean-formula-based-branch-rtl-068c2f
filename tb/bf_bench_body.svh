// Shared body of the end-to-end predictor testbenches. It is included inside
// a testbench module that first declares the localparams N, PHT_ENTRIES and
// HIST_LEN and, after the include, instantiates bf_predictor_top with them and
// ends the simulation when the event bench_done fires.
//
// 1. A synthetic program of nine static branches is generated: a loop
//    back-edge, biased branches, branches that follow monotone formulas of the
//    recent history and their complements, one that follows the XOR of the two
//    last outcomes (no monotone formula can express it, but the agree table
//    can learn it), and a rarely executed one.
// 2. Profiling (a software model of the off-line step): a training run is
//    recorded and, for every static branch, formulas are tried on the
//    histories seen before it; the one with the fewest mispredictions is kept.
//    Every formula is tried for N <= 8; above that a steepest-descent search
//    over single-bit changes, restarted from several formulas, stands in for
//    the exhaustive search, which would take too long in simulation.
//    Branches seen fewer than 500 times only get a constant formula.
// 3. The formulas are encoded into Alpha branch instructions and a second run
//    with another seed drives the predictor, one fetch per cycle, with
//    non-branch instructions and idle cycles mixed in. Phase A resolves each
//    branch in its fetch cycle; phase B resolves it RES_DELAY cycles later, so
//    fetch state travels with the branch and the history lags.
// Every prediction, PHT index and target is compared, in the fetch cycle (a
// single-cycle prediction), with a reference model of history, formula and
// agree table kept here. Each mechanism is counted and a failure is counted
// for any that never happened. Misprediction rates are printed, and in phase A
// the formula predictor must beat the best constant (bias bit) per branch.

  localparam int unsigned IDX_W = $clog2(PHT_ENTRIES);
  localparam int unsigned NB = 9;            // static branches
  localparam int unsigned TRAIN_LEN = 30000; // dynamic branches in profiling run
  localparam int unsigned RUN_LEN = 20000;   // dynamic branches per phase
  localparam int unsigned RES_DELAY = 3;
  localparam int unsigned RARE = 8;          // index of the rare branch

  event bench_done;   // result printed; the including module calls $finish
  logic clk = 0, rst_n = 0;
  logic fetch_valid = 0;
  logic [63:0] fetch_pc = '0;
  logic [31:0] fetch_insn = '0;
  logic pred_valid, pred_formula, pred_agree;
  logic [63:0] pred_target;
  logic [IDX_W-1:0] pred_pht_idx;
  logic res_valid = 0, res_taken = 0, res_formula_pred = 0;
  logic [IDX_W-1:0] res_pht_idx = '0;
  logic [HIST_LEN-1:0] hist;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    -> bench_done;
  end

  // ---------------------------------------------------------------- helpers
  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  // Reference evaluation of an N-bit formula word, level by level:
  // level 0 is the history; each connective combines two adjacent values of
  // the level below; the all-AND word is constant 0; the top bit inverts.
  function automatic bit eval_formula(logic [N-1:0] f, logic [N-1:0] h);
    bit vals[$];
    bit next[$];
    int k = 0;
    if (f[N-2:0] == '0) return f[N-1];
    for (int i = 0; i < N; i++) vals.push_back(h[i]);
    while (vals.size() > 1) begin
      next.delete();
      for (int i = 0; i < vals.size(); i += 2) begin
        next.push_back(f[k] ? (vals[i] | vals[i+1]) : (vals[i] & vals[i+1]));
        k++;
      end
      vals = next;
    end
    return vals[0] ^ f[N-1];
  endfunction

  // ------------------------------------------------------ synthetic program
  logic [63:0] pcs [NB];
  int          loop_count;
  bit          prog_hist [$];   // true global outcome history, newest last
  int          order [8] = '{0, 3, 1, 5, 4, 2, 6, 7};
  int          pos;

  function automatic bit x(int i);   // i-th most recent true outcome
    return (prog_hist.size() > i) ? prog_hist[prog_hist.size() - 1 - i] : 1'b0;
  endfunction

  function automatic bit noise(int pct);
    return $urandom_range(0, 99) < pct;
  endfunction

  // Outcome of static branch b given the true history.
  function automatic bit behave(int b);
    case (b)
      0: begin loop_count++; return (loop_count % 4) != 0; end  // loop, trip count 4
      1: return !noise(3);                                      // mostly taken
      2: return noise(3);                                       // mostly not taken
      3: return (x(0) | x(1)) ^ noise(4);
      4: return !(x(0) & x(1)) ^ noise(4);                      // complement of a formula
      5: return ((x(0) & x(1)) | (x(2) & x(3))) ^ noise(4);
      6: return x(0) ^ x(1);                                    // not monotone
      7: return !x(2) ^ noise(5);
      default: return !noise(10);                               // rare, mostly taken
    endcase
  endfunction

  // Next static branch of the program; the rare one is inserted at 1 %.
  function automatic int next_branch();
    int b;
    if ($urandom_range(0, 99) == 0) return RARE;
    b = order[pos];
    pos = (pos + 1) % 8;
    return b;
  endfunction

  // ------------------------------------------------------------- profiling
  // Per static branch: for every history seen, how often the branch was
  // taken and not taken.
  int unsigned cnt_t [NB][longint];
  int unsigned cnt_n [NB][longint];
  int unsigned execs [NB];
  logic [N-1:0] formula_of [NB];
  logic [N-1:0] best_const_of [NB];

  function automatic longint misses(int b, logic [N-1:0] f);
    longint m = 0;
    foreach (cnt_t[b][h]) if (!eval_formula(f, N'(h))) m += longint'(cnt_t[b][h]);
    foreach (cnt_n[b][h]) if (eval_formula(f, N'(h))) m += longint'(cnt_n[b][h]);
    return m;
  endfunction

  task automatic profile();
    prog_hist.delete(); loop_count = 0; pos = 0;
    for (int i = 0; i < TRAIN_LEN; i++) begin
      int b = next_branch();
      logic [N-1:0] h;
      bit t;
      for (int j = 0; j < N; j++) h[j] = x(j);
      t = behave(b);
      execs[b]++;
      if (t) begin
        if (!cnt_t[b].exists(longint'(h))) cnt_t[b][longint'(h)] = 0;
        cnt_t[b][longint'(h)]++;
      end else begin
        if (!cnt_n[b].exists(longint'(h))) cnt_n[b][longint'(h)] = 0;
        cnt_n[b][longint'(h)]++;
      end
      prog_hist.push_back(t);
      if (prog_hist.size() > 64) void'(prog_hist.pop_front());
    end
    for (int b = 0; b < NB; b++) begin
      longint best, m;
      logic [N-1:0] one = {1'b1, {(N-1){1'b0}}};
      best_const_of[b] = (misses(b, one) <= misses(b, '0)) ? one : '0;
      formula_of[b] = best_const_of[b];
      best = misses(b, formula_of[b]);
      if (execs[b] >= 500) begin
        if (N <= 8) begin
          // exhaustive, as the off-line profiler does
          for (longint f = 0; f < (longint'(1) << N); f++) begin
            m = misses(b, N'(f));
            if (m < best) begin best = m; formula_of[b] = N'(f); end
          end
        end else begin
          // too many formulas for a simulation: steepest descent over
          // single-bit changes, from all-OR, its complement and random words
          for (int s = 0; s < 10; s++) begin
            logic [N-1:0] cur = (s == 0) ? {1'b0, {(N-1){1'b1}}} :
                                (s == 1) ? {N{1'b1}} : N'($urandom);
            longint cur_m = misses(b, cur);
            bit improved = 1;
            while (improved) begin
              logic [N-1:0] step = cur;
              longint step_m = cur_m;
              improved = 0;
              for (int k = 0; k < N; k++) begin
                m = misses(b, cur ^ (N'(1) << k));
                if (m < step_m) begin step_m = m; step = cur ^ (N'(1) << k); improved = 1; end
              end
              cur = step; cur_m = step_m;
            end
            if (cur_m < best) begin best = cur_m; formula_of[b] = cur; end
          end
        end
      end
      $display("profile: branch %0d executed %0d times, formula %b", b, execs[b], formula_of[b]);
    end
  endtask

  // -------------------------------------------------------- reference model
  logic [HIST_LEN-1:0] m_hist;
  logic [1:0]          m_pht [PHT_ENTRIES];

  // Mechanism counters
  int n_const0, n_const1, n_formula_plain, n_formula_inv, n_override,
      n_nonbranch, n_idle, n_delayed, n_rare_const, n_pht_sat_hi, n_pht_sat_lo,
      n_hist_shift;
  int miss_formula, miss_agree, miss_bias, dyn_branches;

  typedef struct {
    logic [IDX_W-1:0] idx;
    bit               fpred;
    bit               taken;
  } inflight_t;
  inflight_t inflight [$];

  function automatic logic [31:0] make_insn(int b, logic [N-1:0] f);
    // BNE (0x3D), register b, formula, displacement of -16 instructions
    return {6'h3D, 5'(b), f, (21-N)'(-16)};
  endfunction

  task automatic model_resolve(inflight_t r);
    logic [1:0] c = m_pht[r.idx];
    if (r.taken == r.fpred) begin
      if (c == 3) n_pht_sat_hi++;
      m_pht[r.idx] = (c == 3) ? 2'd3 : c + 2'd1;
    end else begin
      if (c == 0) n_pht_sat_lo++;
      m_pht[r.idx] = (c == 0) ? 2'd0 : c - 2'd1;
    end
    n_hist_shift++;
    m_hist = {m_hist[HIST_LEN-2:0], r.taken};
  endtask

  // One phase of RUN_LEN dynamic branches; delay 0 resolves in the fetch cycle.
  task automatic run_phase(int delay);
    int done = 0;
    prog_hist.delete(); loop_count = 0; pos = 0;
    while (done < RUN_LEN || inflight.size() > 0) begin
      int kind;
      @(negedge clk);
      fetch_valid = 0; res_valid = 0;
      kind = (done < RUN_LEN) ? $urandom_range(0, 19) : 19;
      // resolve the oldest in-flight branch once it is old enough
      if (inflight.size() > delay || (done >= RUN_LEN && inflight.size() > 0)) begin
        inflight_t r = inflight[0];
        res_valid = 1; res_taken = r.taken; res_pht_idx = r.idx; res_formula_pred = r.fpred;
      end
      if (kind == 0) begin
        // non-branch: LDA (0x08); the predictor must not claim a branch
        fetch_valid = 1; fetch_pc = 64'h2_0000; fetch_insn = {6'h08, 26'h3AB_CDEF};
        #1 chk("pred_valid non-branch", 64'(pred_valid), 64'(0));
        n_nonbranch++;
      end else if (kind == 1 || kind == 19) begin
        n_idle++;
        #1 chk("pred_valid idle", 64'(pred_valid), 64'(0));
      end else begin
        int b = next_branch();
        logic [N-1:0] f = formula_of[b];
        logic [IDX_W-1:0] e_idx;
        bit e_f, e_a, t;
        fetch_valid = 1; fetch_pc = pcs[b]; fetch_insn = make_insn(b, f);
        t = behave(b);
        prog_hist.push_back(t);
        if (prog_hist.size() > 64) void'(prog_hist.pop_front());
        e_idx = pcs[b][2 +: IDX_W] ^ IDX_W'(m_hist);
        e_f = eval_formula(f, m_hist[N-1:0]);
        e_a = m_pht[e_idx][1] ? e_f : !e_f;
        #1;
        chk("pred_valid", 64'(pred_valid), 64'(1));
        chk("pred_formula", 64'(pred_formula), 64'(e_f));
        chk("pred_agree", 64'(pred_agree), 64'(e_a));
        chk("pred_pht_idx", 64'(pred_pht_idx), 64'(e_idx));
        chk("pred_target", 64'(pred_target), 64'(pcs[b] + 4 - 64));
        if (f[N-2:0] == 0) begin
          if (f[N-1]) n_const1++; else n_const0++;
          if (b == RARE) n_rare_const++;
        end else if (f[N-1]) n_formula_inv++;
        else n_formula_plain++;
        if (e_a != e_f) n_override++;
        if (delay > 0) n_delayed++;
        dyn_branches++;
        if (e_f != t) miss_formula++;
        if (e_a != t) miss_agree++;
        if (best_const_of[b][N-1] != t) miss_bias++;
        inflight.push_back('{idx: e_idx, fpred: e_f, taken: t});
        done++;
      end
      if (res_valid) model_resolve(inflight.pop_front());
      // same-cycle resolve of the branch just fetched
      if (delay == 0 && inflight.size() > 0 && !res_valid) begin
        // drive the resolve now; the prediction above was already sampled
        inflight_t r = inflight[0];
        res_valid = 1; res_taken = r.taken; res_pht_idx = r.idx; res_formula_pred = r.fpred;
        model_resolve(inflight.pop_front());
      end
      @(posedge clk);
      #1 chk("history", 64'(hist), 64'(m_hist));
    end
    @(negedge clk);
    fetch_valid = 0; res_valid = 0;
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("mechanism %-34s %0d", what, count);
  endtask

  initial begin
    for (int b = 0; b < NB; b++) pcs[b] = 64'h1_2000 + 64'(b) * 64'h1_1C;
    foreach (m_pht[i]) m_pht[i] = 2'd2;
    m_hist = '0;
    profile();

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 chk("history after reset", 64'(hist), 64'(0));

    run_phase(0);
    $display("phase A: %0d branches, formula mispredicted %0d, agree/formula %0d, bias bits %0d",
             dyn_branches, miss_formula, miss_agree, miss_bias);
    checks++;
    if (miss_formula >= miss_bias) begin
      failures++;
      $display("FAIL formula predictor (%0d) not better than bias bits (%0d)", miss_formula, miss_bias);
    end
    run_phase(RES_DELAY);
    $display("total: %0d branches, formula %0.2f%%, agree/formula %0.2f%%, bias bits %0.2f%% mispredicted",
             dyn_branches, 100.0 * miss_formula / dyn_branches,
             100.0 * miss_agree / dyn_branches, 100.0 * miss_bias / dyn_branches);

    need("constant-0 formula", n_const0);
    need("constant-1 formula", n_const1);
    need("non-constant formula", n_formula_plain);
    need("inverted non-constant formula", n_formula_inv);
    need("agree table overrides formula", n_override);
    need("counter saturates at agree", n_pht_sat_hi);
    need("counter saturates at disagree", n_pht_sat_lo);
    need("rare branch given a constant", n_rare_const);
    need("non-branch fetch filtered", n_nonbranch);
    need("idle cycle", n_idle);
    need("delayed resolution", n_delayed);
    need("history register shifts", n_hist_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    -> bench_done;
  end
