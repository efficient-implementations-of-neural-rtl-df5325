// tb_dianet_pe: one PE, configured through its scan-chain segment.
// Checks: the configuration read back at cfg_so after a second load; the
// output value against integer reference arithmetic for random weights,
// inputs, neighbour selection (expansion or shrinkage), input enables, skip
// and activation; that the PE waits until every used input is valid and
// fires exactly one cycle after the last one; that clear drops the output;
// and that a disabled PE never fires.
module tb_dianet_pe;
  import dianet_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_shift = 0, cfg_si = 0, cfg_so;
  pe_cfg_t cfg;
  logic clear = 0;
  data_t nl = 0, nm = 0, nr = 0, sk = 0, xd = 0;
  logic nlv = 0, nmv = 0, nrv = 0, skv = 0, xwe = 0;
  data_t z;
  logic z_valid;
  int checks = 0, failures = 0;

  dianet_pe dut (
    .clk, .rst_n, .cfg_shift, .cfg_si, .cfg_so, .cfg, .clear,
    .nb_left(nl), .nb_left_v(nlv), .nb_mid(nm), .nb_mid_v(nmv),
    .nb_right(nr), .nb_right_v(nrv), .skip_in(sk), .skip_v(skv),
    .x_we(xwe), .x_data(xd), .z, .z_valid
  );

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic load_cfg(pe_cfg_t c, output logic [CFG_W-1:0] readback);
    logic [CFG_W-1:0] bits = c;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      #1 readback[i] = cfg_so;
      cfg_si <= bits[i]; cfg_shift <= 1;
      @(posedge clk);
    end
    cfg_shift <= 0;
    @(posedge clk);
  endtask

  function automatic longint floordiv(longint a, longint b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  function automatic longint ref_z(pe_cfg_t c, longint a0, longint a1, longint x, longint s);
    longint ps, v;
    ps = 0;
    if (c.use_a0) ps += a0 * longint'(c.w0);
    if (c.use_a1) ps += a1 * longint'(c.w1);
    if (c.use_x)  ps += x  * longint'(c.wx);
    v = floordiv(ps, longint'(1) << FRAC_W) + longint'(c.bias);
    case (c.act)
      ACT_RELU: if (v < 0) v = 0;
      ACT_LR8:  if (v < 0) v = floordiv(v, 8);
      ACT_LR16: if (v < 0) v = floordiv(v, 16);
      default: ;
    endcase
    if (c.use_skip) v += s;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  initial begin
    pe_cfg_t c, prev;
    logic [CFG_W-1:0] rb;
    prev = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int trial = 0; trial < 300; trial++) begin
      longint a0, a1, exp;
      int last;
      c = pe_cfg_t'({$urandom, $urandom, $urandom});
      c.en = (trial % 17 !== 5);
      // small weights most of the time so that saturation is rare but seen
      if (trial % 4 !== 0) begin
        c.w0 = data_t'($signed(12'($urandom)));
        c.w1 = data_t'($signed(12'($urandom)));
        c.wx = data_t'($signed(12'($urandom)));
        c.bias = data_t'($signed(12'($urandom)));
      end
      load_cfg(c, rb);
      checks++;
      if (rb !== prev) fail($sformatf("scan chain read-back %h !== %h", rb, prev));
      prev = c;
      // drive the inputs, one per cycle in random order, all as neighbours
      clear <= 1; @(posedge clk); clear <= 0;
      nl <= data_t'($urandom); nm <= data_t'($urandom); nr <= data_t'($urandom);
      sk <= data_t'($urandom);
      nlv <= 0; nmv <= 0; nrv <= 0; skv <= 0;
      @(posedge clk);
      // x first
      xd <= data_t'($urandom); xwe <= 1; @(posedge clk); xwe <= 0;
      nlv <= 1; @(posedge clk);
      nrv <= 1; @(posedge clk);
      skv <= 1; @(posedge clk);
      // before the centre neighbour arrives, a PE that uses it must not fire
      checks++;
      if (c.en && (c.use_a0 || c.use_a1) && z_valid !== 1'b0 &&
          ((c.expand && c.use_a1) || (!c.expand && c.use_a0)))
        fail("fired before its centre neighbour was valid");
      nmv <= 1; @(posedge clk);
      #1;
      a0 = c.expand ? longint'(nl) : longint'(nm);
      a1 = c.expand ? longint'(nm) : longint'(nr);
      exp = ref_z(c, a0, a1, longint'(xd), longint'(sk));
      checks++;
      if (!c.en) begin
        if (z_valid) fail("disabled PE fired");
      end else if (!z_valid) begin
        fail($sformatf("trial %0d: no output one cycle after last input", trial));
      end else if (longint'(z) !== exp) begin
        fail($sformatf("trial %0d: z=%0d exp=%0d cfg=%h dutcfg=%h", trial, z, exp, c, cfg));
      end
      clear <= 1; @(posedge clk); clear <= 0; #1;
      checks++;
      if (z_valid) fail("clear did not drop z_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
