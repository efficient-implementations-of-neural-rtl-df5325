// Shared body of the system-level testbenches (tb_dianet_system and
// tb_dianet_system_full). The including module declares the localparams
// OUT_FIFO_SMALL (1 when the output FIFO is small enough that write-back
// stalls must occur) and MEM_GNT_PCT (grant rate of the memory model), then
// instantiates dianet_system as dut after this file, connected by name to
// the signals declared here. HAS_NEURONS is 0 when the device under test is
// the accelerator alone (dianet_accel); the macro DUT_ACC names the
// accelerator instance inside the device under test.
//
// What it does:
//   * maps four DiaNets onto the 20 x 20 array with random weights, biases and
//     activations: two shrinkage triangles with extra input features fed into
//     their hidden layers (2 and 3 labels), an expand-then-shrink DiaNet
//     (3 labels) and a small 3-2-1 regression net, all with skip connections;
//   * writes the scan-chain bitstream and the input words (in random order,
//     plus one word addressed outside the array) into the memory model;
//   * run 1: configure and infer all four tasks; run 2: new inputs for tasks
//     0 and 2 only, without reloading the configuration; run 3: reload a new
//     configuration (new weights) and infer all tasks again;
//   * after each run compares every PE output with the reference model, the
//     words written back to memory, the labels of the comparators and the
//     cycle count;
//   * drives the PIF neuron and the LIF PE through complete runs against
//     their update rules;
//   * counts every mechanism it is meant to exercise and counts a failure for
//     any that never happened.

  import dianet_pkg::*;
  import dianet_ref_pkg::*;

  localparam int R = 20, C = 20, N = R * C;
  localparam int CFG_BASE = 16'h0000, IN_BASE = 16'h1000, OUT_BASE = 16'h2000;
  localparam int PIF_N = 1152, PIF_T = 4, LIF_T = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- DUT signals ----------------
  logic                              start = 0;
  logic [MEM_AW-1:0]                 cfg_base = CFG_BASE, cfg_words = 0;
  logic [MEM_AW-1:0]                 in_base = IN_BASE, in_words = 0, out_base = OUT_BASE;
  logic [NUM_TASKS-1:0]              task_mask = 0;
  logic [NUM_TASKS-1:0][LABEL_W:0]   task_labels = '0;
  logic                              busy, done;
  logic [31:0]                       cycles;
  logic                              rd_req, rd_gnt, rd_rvalid, wr_req, wr_gnt;
  logic [MEM_AW-1:0]                 rd_addr, wr_addr;
  logic [MEM_DW-1:0]                 rd_rdata, wr_data;
  logic [NUM_TASKS-1:0]              result_valid;
  logic [NUM_TASKS-1:0][LABEL_W-1:0] result_label;
  data_t [NUM_TASKS-1:0]             result_value;
  logic [15:0]                       routed, dropped, out_stall_cycles;
  logic [MEM_AW-1:0]                 written;
  logic                              cfg_so;

  logic                              pif_start = 0, pif_step = 0, pif_is_output = 0;
  logic [PIF_N-1:0][1:0]             pif_spikes_in = '0;
  logic [PIF_N-1:0]                  pif_w_pos = '0, pif_w_neg = '0;
  logic signed [23:0]                pif_vth = 0, pif_bias = 0;
  logic                              pif_spike, pif_done;
  logic signed [23:0]                pif_u;
  logic [2:0]                        pif_t;

  logic                              lif_start = 0, lif_step = 0, lif_is_output = 0;
  data_t                             lif_w0 = 0, lif_w1 = 0, lif_wx = 0, lif_bias = 0, lif_vth = 0;
  logic [3:0]                        lif_s0 = 0, lif_s1 = 0, lif_skip_in = 0;
  logic signed [1:0]                 lif_x = 0;
  logic                              lif_spike, lif_done;
  logic [3:0]                        lif_s_out;
  data_t                             lif_u;
  logic [3:0]                        lif_t;

  ext_mem_model #(.AW(MEM_AW), .DW(MEM_DW), .LAT(3), .GNT_PCT(MEM_GNT_PCT)) mem (
    .clk, .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_req, .wr_addr, .wr_data, .wr_gnt);

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int m_cfg_shift = 0, m_in_full = 0, m_out_stall = 0, m_rd_wait = 0, m_wr_wait = 0;
  int m_drop = 0, m_cfg_skip = 0, m_multitask = 0, m_keep = 0;
  int m_expand = 0, m_shrink = 0, m_skip = 0, m_xhidden = 0, m_single_in = 0;
  int m_neg[4] = '{0, 0, 0, 0};
  int m_pif_spike = 0, m_pif_reset = 0, m_lif_spike = 0, m_lif_leak = 0;
  int run_shift_cycles = 0;

  always @(posedge clk) begin
    if (`DUT_ACC.cfg_shift) begin m_cfg_shift++; run_shift_cycles++; end
    if (`DUT_ACC.u_in.active && `DUT_ACC.u_in.to_issue !== 0 && !`DUT_ACC.u_in.rd_req) m_in_full++;
    if (rd_req && !rd_gnt)     m_rd_wait++;
    if (wr_req && !wr_gnt)     m_wr_wait++;
  end

  // ---------------- network construction ----------------
  pe_cfg_t cfg[];
  int      n_out[NUM_TASKS];

  function automatic int idx(int r, int c);
    return r * C + c;
  endfunction

  function automatic data_t rnd_w();
    return data_t'($signed(11'($urandom)) >>> 1);   // about +-0.5
  endfunction

  function automatic act_t rnd_act();
    return act_t'($urandom_range(1, 3));
  endfunction

  // Set one PE: pair inputs (use_a0/use_a1), skip and feature flags.
  function automatic void set_pe(int r, int c, int t, bit expand, bit a0, bit a1,
                                 bit x, bit sk, bit out, int label);
    pe_cfg_t k;
    k = '0;
    k.en = 1; k.expand = expand; k.use_a0 = a0; k.use_a1 = a1; k.use_x = x;
    k.use_skip = sk; k.is_out = out; k.label = LABEL_W'(label); k.task_id = TASK_W'(t);
    k.act = out ? ACT_NONE : rnd_act();
    k.w0 = rnd_w(); k.w1 = rnd_w(); k.wx = rnd_w();
    k.bias = data_t'($signed(9'($urandom)));
    cfg[idx(r, c)] = k;
  endfunction

  // Shrinkage triangle: row 0 has width w0 (all input features), each row one
  // narrower, pairs (c, c+1); rows 1..xrows also take an input feature.
  function automatic void triangle(int t, int r0, int c0, int w0, int depth, int xrows);
    for (int d = 0; d < depth; d++)
      for (int j = 0; j < w0 - d; j++) begin
        bit out;
        out = (d == depth - 1);
        if (d == 0) set_pe(r0, c0 + j, t, 0, 0, 0, 1, 0, 0, 0);
        else        set_pe(r0 + d, c0 + j, t, 0, 1, 1, d <= xrows, d >= 2, out, j);
      end
    n_out[t] = w0 - depth + 1;
  endfunction

  // Expand-then-shrink DiaNet: widths n, n+1, .., n+m-1, .., m (n = m = 3).
  function automatic void diamond(int t, int r0, int c0);
    int w[5] = '{3, 4, 5, 4, 3};
    for (int d = 0; d < 5; d++)
      for (int j = 0; j < w[d]; j++) begin
        bit ex, a0, a1, sk, out;
        ex = (d == 1 || d == 2);
        if (d == 0) begin set_pe(r0, c0 + j, t, 0, 0, 0, 1, 0, 0, 0); continue; end
        a0 = ex ? (j > 0) : 1;                 // left neighbour exists
        a1 = ex ? (j < w[d-1]) : 1;            // right neighbour exists
        sk = (d >= 2) && (j < w[d-2]);
        out = (d == 4);
        set_pe(r0 + d, c0 + j, t, ex, a0, a1, 0, sk, out, j);
      end
    n_out[t] = 3;
  endfunction

  function automatic void build();
    cfg = new[N];
    foreach (cfg[i]) cfg[i] = '0;
    triangle(0, 0, 0, 10, 9, 3);    // 10 -> 2 labels, 34 features
    triangle(1, 0, 10, 10, 8, 4);   // 10 -> 3 labels, 40 features
    diamond(2, 10, 0);              // 3 -> 4 -> 5 -> 4 -> 3
    triangle(3, 16, 10, 3, 3, 0);   // 3 -> 2 -> 1
  endfunction

  // ---------------- inputs ----------------
  longint xv[];
  bit     xp[];
  int     xt[];

  // Write the input words of the tasks in mask, in random order, plus one
  // word addressed outside the array. Returns the number of words.
  function automatic int make_inputs(logic [NUM_TASKS-1:0] mask);
    int list[$];
    int n;
    for (int i = 0; i < N; i++)
      if (cfg[i].en && cfg[i].use_x && mask[cfg[i].task_id]) begin
        xv[i] = longint'($signed(11'($urandom)));
        list.push_back(i);
      end
    list.shuffle();
    n = 0;
    foreach (list[k]) begin
      in_word_t w;
      if (k == list.size() / 2) begin
        w = '0; w.row = 5'd25; w.col = 5'd3; w.data = 16'h1234;
        mem.mem[IN_BASE + n] = w; n++;
      end
      w = '0;
      w.row = 5'(list[k] / C); w.col = 5'(list[k] % C); w.data = data_t'(xv[list[k]]);
      mem.mem[IN_BASE + n] = w; n++;
    end
    return n;
  endfunction

  // ---------------- one accelerator run ----------------
  task automatic run(bit with_cfg, logic [NUM_TASKS-1:0] mask, int nin, output int measured);
    logic [MEM_DW-1:0] w[];
    int t0;
    if (with_cfg) begin
      dianet_ref_pkg::cfg_words(cfg, w);
      foreach (w[j]) mem.mem[CFG_BASE + j] = w[j];
      cfg_words = MEM_AW'(w.size());
    end else cfg_words = 0;
    for (int a = 0; a < 64; a++) mem.mem[OUT_BASE + a] = '1;
    in_words = MEM_AW'(nin);
    task_mask = mask;
    for (int t = 0; t < NUM_TASKS; t++) task_labels[t] = (LABEL_W+1)'(n_out[t]);
    run_shift_cycles = 0;
    @(negedge clk); start = 1; t0 = $time / 10;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    measured = $time / 10 - t0;
    repeat (5) @(negedge clk);
  endtask

  // ---------------- checks after a run ----------------
  longint zr[];
  bit     vr[];
  int     tvr[];
  int     prev_label[NUM_TASKS];
  data_t  prev_value[NUM_TASKS];

  task automatic check_run(logic [NUM_TASKS-1:0] mask, int measured, int nwritten_before);
    int nexp;
    bit used[];
    foreach (xp[i]) begin xp[i] = cfg[i].en && cfg[i].use_x; xt[i] = 0; end
    eval_array(R, C, cfg, xv, xp, xt, zr, vr, tvr);
    // every PE against the reference
    for (int i = 0; i < N; i++) begin
      checks++;
      if (`DUT_ACC.z_valid[i] !== vr[i] || (vr[i] && longint'(`DUT_ACC.z[i]) !== zr[i])) begin
        failures++;
        $display("FAIL PE (%0d,%0d) valid %0b/%0b z %0d/%0d", i / C, i % C,
                 `DUT_ACC.z_valid[i], vr[i], `DUT_ACC.z[i], zr[i]);
      end
    end
    // written words: one per output neuron of the tasks in mask
    nexp = 0;
    for (int i = 0; i < N; i++) if (cfg[i].en && cfg[i].is_out && mask[cfg[i].task_id]) nexp++;
    checks++;
    if (int'(written) !== nexp) begin failures++; $display("FAIL written %0d exp %0d", written, nexp); end
    used = new[N];
    for (int a = 0; a < nexp; a++) begin
      out_word_t o;
      int hit;
      o = out_word_t'(mem.mem[OUT_BASE + a]);
      hit = -1;
      for (int i = 0; i < N; i++)
        if (cfg[i].en && cfg[i].is_out && !used[i] && cfg[i].task_id == o.task_id &&
            cfg[i].label == o.label && mask[o.task_id] && longint'(o.data) == zr[i] && o.pad == 0) hit = i;
      checks++;
      if (hit < 0) begin failures++; $display("FAIL output word %0d = %h", a, mem.mem[OUT_BASE + a]); end
      else used[hit] = 1;
    end
    // comparators
    for (int t = 0; t < NUM_TASKS; t++) begin
      longint best;
      int lbl_pe;
      best = -100000; lbl_pe = -1;
      for (int i = 0; i < N; i++)
        if (cfg[i].en && cfg[i].is_out && cfg[i].task_id == t) begin
          if (zr[i] > best) best = zr[i];
          if (cfg[i].label == result_label[t]) lbl_pe = i;
        end
      checks++;
      if (!result_valid[t] || lbl_pe < 0 || zr[lbl_pe] !== best || longint'(result_value[t]) !== best) begin
        failures++;
        $display("FAIL task %0d label %0d value %0d best %0d", t, result_label[t], result_value[t], best);
      end
      if (!mask[t]) begin
        checks++;
        if (int'(result_label[t]) !== prev_label[t] || result_value[t] !== prev_value[t]) begin
          failures++; $display("FAIL task %0d result changed although not run", t);
        end else m_keep++;
      end
      prev_label[t] = result_label[t];
      prev_value[t] = result_value[t];
    end
    if (result_valid == '1) m_multitask++;
    checks++;
    if (32'(measured) !== cycles && 32'(measured) !== cycles + 1 && 32'(measured) + 1 !== cycles) begin
      failures++; $display("FAIL cycles %0d measured %0d", cycles, measured);
    end
    // mechanisms exercised by the fired PEs
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int i;
        pe_cfg_t k;
        i = idx(r, c); k = cfg[i];
        if (!vr[i] || r == 0) continue;
        if (k.expand && k.use_a0 && k.use_a1) m_expand++;
        if (!k.expand && k.use_a0 && k.use_a1) m_shrink++;
        if (k.use_a0 !== k.use_a1) m_single_in++;
        if (k.use_skip) m_skip++;
        if (k.use_x && (k.use_a0 || k.use_a1)) m_xhidden++;
        begin
          pe_cfg_t lin;
          longint a0, a1, s;
          lin = k; lin.act = ACT_NONE; lin.use_skip = 0;
          a0 = k.expand ? (c > 0 ? zr[i - C - 1] : 0) : zr[i - C];
          a1 = k.expand ? zr[i - C] : (c < C - 1 ? zr[i - C + 1] : 0);
          s = 0;
          if (ref_z(lin, a0, a1, k.use_x ? xv[i] : 0, s) < 0) m_neg[k.act]++;
        end
      end
  endtask

  // ---------------- spiking neurons ----------------
  task automatic run_pif();
    longint mu, lim;
    bit ms;
    pif_is_output = 0;
    pif_vth = 24'sd2048;
    pif_bias = 24'sd40;
    for (int j = 0; j < PIF_N; j++) begin
      int r;
      r = $urandom_range(0, 2);
      pif_w_pos[j] = (r == 0); pif_w_neg[j] = (r == 1);
    end
    @(negedge clk); pif_start = 1; @(negedge clk); pif_start = 0;
    mu = 0; ms = 0; lim = longint'(1) << 23;
    for (int s = 0; s < PIF_T; s++) begin
      longint dot;
      dot = 0;
      for (int j = 0; j < PIF_N; j++) begin
        int v;
        v = ($urandom_range(0, 99) < 20) ? $urandom_range(1, 2) : 0;
        if (j < 40 && pif_w_pos[j]) v = 2;         // bias the sum upward
        pif_spikes_in[j] = 2'(v);
        if (pif_w_pos[j]) dot += v; else if (pif_w_neg[j]) dot -= v;
      end
      mu = mu + dot * 256 + longint'(pif_bias);
      if (ms) begin mu -= longint'(pif_vth); m_pif_reset++; end
      if (mu > lim - 1) mu = lim - 1;
      if (mu < -lim) mu = -lim;
      ms = (mu > longint'(pif_vth));
      if (ms) m_pif_spike++;
      pif_step = 1; @(negedge clk); pif_step = 0;
      checks++;
      if (longint'(pif_u) !== mu || pif_spike !== ms) begin
        failures++; $display("FAIL PIF step %0d u=%0d/%0d", s, pif_u, mu);
      end
    end
    checks++;
    if (!pif_done) begin failures++; $display("FAIL PIF not done"); end
  endtask

  task automatic run_lif();
    longint mu;
    bit ms;
    lif_is_output = 0;
    lif_w0 = 16'sd70; lif_w1 = 16'sd40; lif_wx = 16'sd60; lif_bias = -16'sd10;
    lif_vth = 16'sd154;   // 0.3
    @(negedge clk); lif_start = 1; @(negedge clk); lif_start = 0;
    mu = 0; ms = 0;
    for (int s = 0; s < LIF_T; s++) begin
      lif_s0 = 4'($urandom_range(0, 2)); lif_s1 = 4'($urandom_range(0, 2));
      lif_x = 2'($signed($urandom_range(0, 2) - 1));
      lif_skip_in = 4'($urandom_range(0, 3));
      if (!ms && mu !== 0) m_lif_leak++;
      mu = (ms ? 0 : floordiv(mu * 205, 256)) + longint'(lif_w0) * lif_s0 +
           longint'(lif_w1) * lif_s1 + longint'(lif_wx) * longint'(lif_x) + longint'(lif_bias);
      if (mu > 32767) mu = 32767;
      if (mu < -32768) mu = -32768;
      ms = (mu > longint'(lif_vth));
      if (ms) m_lif_spike++;
      lif_step = 1; @(negedge clk); lif_step = 0;
      checks++;
      if (longint'(lif_u) !== mu || lif_spike !== ms) begin
        failures++; $display("FAIL LIF step %0d u=%0d/%0d", s, lif_u, mu);
      end
      checks++;
      if (int'(lif_s_out) !== int'(ms) + int'(lif_skip_in)) begin
        failures++; $display("FAIL LIF s_out %0d", lif_s_out);
      end
    end
    checks++;
    if (!lif_done) begin failures++; $display("FAIL LIF not done"); end
  endtask

  // ---------------- mechanism report ----------------
  task automatic need(string name, int count);
    $display("COUNT %-28s %0d", name, count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never exercised: %s", name); end
  endtask

  // ---------------- main sequence ----------------
  initial begin
    int nin, meas, d0;
    xv = new[N]; xp = new[N]; xt = new[N];
    foreach (xv[i]) xv[i] = 0;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // run 1: configure and run all four tasks
    nin = make_inputs(4'b1111);
    d0 = dropped;
    run(1, 4'b1111, nin, meas);
    checks++;
    if (int'(dropped) !== d0 + 1) begin failures++; $display("FAIL dropped %0d", dropped); end
    else m_drop++;
    check_run(4'b1111, meas, 0);

    // run 2: tasks 0 and 2 only, configuration kept
    nin = make_inputs(4'b0101);
    run(0, 4'b0101, nin, meas);
    if (run_shift_cycles == 0) m_cfg_skip++;
    check_run(4'b0101, meas, 0);

    // run 3: new weights and activations, reconfigure, all tasks
    build();
    nin = make_inputs(4'b1111);
    run(1, 4'b1111, nin, meas);
    check_run(4'b1111, meas, 0);

    // scan chain read-back: the word leaving the chain is the configuration
    // of the last PE shifted out first, which the loader never reads back, so
    // check instead that every PE holds its configuration.
    for (int i = 0; i < N; i++) begin
      checks++;
      if (`DUT_ACC.pe_cfg[i] !== cfg[i]) begin failures++; $display("FAIL cfg of PE %0d", i); end
    end

    if (HAS_NEURONS) begin
      run_pif();
      run_lif();
    end

    m_out_stall = out_stall_cycles;
    m_rd_wait = mem.rd_waits;
    m_wr_wait = mem.wr_waits;
    need("scan-chain configuration", m_cfg_shift);
    need("run without reconfiguration", m_cfg_skip);
    need("four tasks in parallel", m_multitask);
    need("untouched task kept", m_keep);
    if (OUT_FIFO_SMALL) need("input FIFO credit stall", m_in_full);
    need("router drop", m_drop);
    need("memory read wait", m_rd_wait);
    need("memory write wait", m_wr_wait);
    if (OUT_FIFO_SMALL) need("output FIFO stall", m_out_stall);
    need("expansion pair fired", m_expand);
    need("shrinkage pair fired", m_shrink);
    need("edge PE with one input", m_single_in);
    need("skip connection", m_skip);
    need("feature into hidden PE", m_xhidden);
    need("ReLU negative input", m_neg[ACT_RELU]);
    need("LeakyReLU/8 negative", m_neg[ACT_LR8]);
    need("LeakyReLU/16 negative", m_neg[ACT_LR16]);
    if (HAS_NEURONS) need("PIF spike", m_pif_spike);
    if (HAS_NEURONS) need("PIF soft reset", m_pif_reset);
    if (HAS_NEURONS) need("LIF spike", m_lif_spike);
    if (HAS_NEURONS) need("LIF leak", m_lif_leak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
