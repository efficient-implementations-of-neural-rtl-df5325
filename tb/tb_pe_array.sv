// tb_pe_array: a 6 x 5 array with random configurations split between two
// tasks. The configuration is shifted through the scan chain, input features
// are written one per cycle, and every PE's output value and the first cycle
// it is valid are compared with the reference model (dataflow: a PE fires
// one cycle after its last operand). Also checks the chain read-back at
// cfg_so, that clearing one task leaves the other task's outputs in place,
// and that the cleared task recomputes the same values.
module tb_pe_array;
  import dianet_pkg::*;
  import dianet_ref_pkg::*;
  localparam int R = 6, C = 5, N = R * C;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_shift = 0, cfg_si = 0, cfg_so;
  logic [NUM_TASKS-1:0] clear = 0;
  logic [N-1:0] x_we = 0;
  data_t x_data = 0;
  data_t [N-1:0] z;
  logic [N-1:0] z_valid;
  pe_cfg_t [N-1:0] cfg;
  int checks = 0, failures = 0, cyc = 0;
  int first_valid[N];
  int deep_fired = 0;

  pe_array #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .cfg_shift, .cfg_si, .cfg_so, .clear,
    .x_we, .x_data, .z, .z_valid, .cfg);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < N; i++) if (z_valid[i] && first_valid[i] < 0) first_valid[i] = cyc;
  end

  task automatic shift_in(pe_cfg_t c[], output logic [MEM_DW-1:0] rb[]);
    logic [MEM_DW-1:0] w[];
    cfg_words(c, w);
    rb = new[w.size()];
    foreach (w[j])
      for (int k = MEM_DW - 1; k >= 0; k--) begin
        @(negedge clk);
        rb[j][k] = cfg_so;
        cfg_si = w[j][k]; cfg_shift = 1;
      end
    @(negedge clk); cfg_shift = 0;
  endtask

  task automatic trial(int seed_mode);
    pe_cfg_t c[];
    longint xv[], ez[];
    bit xp[], ev[];
    int xt[], et[];
    logic [MEM_DW-1:0] rb[], rb2[];
    int t0;
    c = new[N]; xv = new[N]; xp = new[N]; xt = new[N];
    for (int i = 0; i < N; i++) begin
      c[i] = pe_cfg_t'({$urandom, $urandom, $urandom});
      c[i].en = ($urandom_range(0, 9) < 8);
      c[i].task_id = TASK_W'(i % C < 2 ? 0 : 1);
      c[i].w0 = data_t'($signed(11'($urandom)));
      c[i].w1 = data_t'($signed(11'($urandom)));
      c[i].wx = data_t'($signed(11'($urandom)));
      c[i].bias = data_t'($signed(10'($urandom)));
      if (i / C == 0) begin c[i].use_x = 1; c[i].use_a0 = 0; c[i].use_a1 = 0; end
      xp[i] = c[i].use_x;
      xv[i] = longint'($signed(12'($urandom)));
    end
    shift_in(c, rb);
    // clear both tasks, then write features one per cycle
    @(negedge clk); clear = 2'b11; @(negedge clk); clear = 0;
    foreach (first_valid[i]) first_valid[i] = -1;
    t0 = cyc;
    for (int i = 0; i < N; i++) if (xp[i]) begin
      x_we = '0; x_we[i] = 1; x_data = data_t'(xv[i]);
      xt[i] = cyc + 1 - t0;
      @(negedge clk);
    end
    x_we = '0;
    repeat (3 * R + 5) @(negedge clk);
    eval_array(R, C, c, xv, xp, xt, ez, ev, et);
    for (int i = 2 * C; i < N; i++) if (ev[i]) deep_fired++;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (z_valid[i] !== ev[i] || (ev[i] && (longint'(z[i]) !== ez[i] || first_valid[i] - t0 !== et[i]))) begin
        failures++;
        $display("FAIL PE %0d: valid %0b/%0b z %0d/%0d t %0d/%0d", i, z_valid[i], ev[i], z[i], ez[i],
                 first_valid[i] - t0, et[i]);
      end
    end
    // clear task 1 only: task 0 keeps its outputs
    @(negedge clk); clear = 2'b10; @(negedge clk); clear = 0; #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (z_valid[i] !== (ev[i] && c[i].task_id == 0)) begin
        failures++; $display("FAIL clear of task 1 at PE %0d", i);
      end
    end
    // reload the same configuration: read-back must equal it
    shift_in(c, rb2);
    foreach (rb2[j]) begin
      logic [MEM_DW-1:0] w[];
      cfg_words(c, w);
      checks++;
      if (rb2[j] !== w[j] && j > 0) begin failures++; $display("FAIL read-back word %0d", j); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 6; t++) trial(t);
    checks++;
    if (deep_fired < 10) begin failures++; $display("FAIL only %0d PEs below row 1 fired", deep_fired); end
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
