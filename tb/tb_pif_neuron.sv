// tb_pif_neuron: a PIF neuron with its default 1152 inputs over many
// 4-timestep runs with random spikes (0, 1 or 2 per input, as with the
// residual connection), random ternary weights, thresholds and biases.
// Checks membrane and spike after every timestep against a reference that
// counts +1/-1 weights explicitly, that the soft reset subtracts the
// threshold one step after a spike, that output mode never fires, that
// done rises after exactly 4 steps and further steps are ignored.
module tb_pif_neuron;
  localparam int N = 1152, IN_W = 2, U_W = 24, U_FRAC = 8, T = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, step = 0, is_output = 0;
  logic [N-1:0][IN_W-1:0] spikes_in;
  logic [N-1:0] w_pos, w_neg;
  logic signed [U_W-1:0] vth, bias, u;
  logic spike, done;
  logic [$clog2(T+1)-1:0] t;
  int checks = 0, failures = 0, spikes_seen = 0, resets_seen = 0;

  pif_neuron dut (.clk, .rst_n, .start, .step, .is_output, .spikes_in, .w_pos, .w_neg,
    .vth, .bias, .spike, .u, .t, .done);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 60; run++) begin
      longint mu, lim;
      bit ms;
      int density;
      density = $urandom_range(5, 60);
      is_output = (run % 7 == 3);
      vth = U_W'($urandom_range(1, 40) * 64);
      bias = U_W'($signed(10'($urandom)));
      for (int j = 0; j < N; j++) begin
        int r;
        r = $urandom_range(0, 2);
        w_pos[j] = (r == 0); w_neg[j] = (r == 1);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      mu = 0; ms = 0; lim = longint'(1) << (U_W - 1);
      for (int s = 0; s < T + 2; s++) begin
        longint dot;
        dot = 0;
        for (int j = 0; j < N; j++) begin
          int v;
          v = ($urandom_range(0, 99) < density) ? $urandom_range(1, 2) : 0;
          spikes_in[j] = IN_W'(v);
          if (w_pos[j]) dot += v; else if (w_neg[j]) dot -= v;
        end
        if (s < T) begin
          mu = mu + dot * 256 + longint'(bias);
          if (ms && !is_output) begin mu -= longint'(vth); resets_seen++; end
          if (mu > lim - 1) mu = lim - 1;
          if (mu < -lim) mu = -lim;
          ms = !is_output && (mu > longint'(vth));
          if (ms) spikes_seen++;
        end
        step = 1; @(negedge clk); step = 0;
        checks++;
        if (longint'(u) !== mu || spike !== ms) begin
          failures++; $display("FAIL run %0d step %0d: u=%0d/%0d spike=%0b/%0b", run, s, u, mu, spike, ms);
        end
        checks++;
        if (done !== (s >= T - 1)) begin failures++; $display("FAIL done at step %0d", s); end
      end
    end
    checks++;
    if (spikes_seen == 0 || resets_seen == 0) begin failures++; $display("FAIL no spikes/resets"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
