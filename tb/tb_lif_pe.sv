// tb_lif_pe: one DiaNet4.0 LIF PE over random 8-timestep runs with random
// weights, multi-spike input counts, Poisson feature spikes and skip counts.
// Checks the membrane (leak by 0.8 in Q8, hard reset after a spike) and the
// spike after each step against a reference, the forwarded count
// spike + skip (saturating at 15), output mode never firing, and that done
// rises after 8 steps.
module tb_lif_pe;
  localparam int DW = 16, CW = 4, T = 8, TAU = 205;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, step = 0, is_output = 0;
  logic signed [DW-1:0] w0, w1, wx, bias, vth, u;
  logic [CW-1:0] s0, s1, skip_in, s_out;
  logic signed [1:0] x;
  logic spike, done;
  logic [$clog2(T+1)-1:0] t;
  int checks = 0, failures = 0, spikes_seen = 0;

  lif_pe dut (.clk, .rst_n, .start, .step, .is_output, .w0, .w1, .wx, .bias, .vth,
    .s0, .s1, .x, .skip_in, .spike, .s_out, .u, .t, .done);

  function automatic longint floordiv(longint a, longint b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  initial begin
    s0 = 0; s1 = 0; x = 0; skip_in = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 200; run++) begin
      longint mu;
      bit ms;
      is_output = (run % 9 == 4);
      w0 = DW'($signed(10'($urandom))); w1 = DW'($signed(10'($urandom)));
      wx = DW'($signed(10'($urandom))); bias = DW'($signed(8'($urandom)));
      vth = 154;   // 0.3 in Q9
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      mu = 0; ms = 0;
      for (int s = 0; s < T + 1; s++) begin
        longint sc;
        s0 = CW'($urandom_range(0, 3)); s1 = CW'($urandom_range(0, 3));
        x = 2'($signed($urandom_range(0, 2) - 1));
        skip_in = CW'($urandom_range(0, 15));
        #1;
        checks++;
        sc = longint'(ms) + longint'(skip_in);
        if (sc > 15) sc = 15;
        if (longint'(s_out) !== sc) begin failures++; $display("FAIL s_out %0d exp %0d", s_out, sc); end
        if (s < T) begin
          mu = (ms ? 0 : floordiv(mu * TAU, 256)) + longint'(w0) * s0 + longint'(w1) * s1 +
               longint'(wx) * longint'(x) + longint'(bias);
          if (mu > 32767) mu = 32767;
          if (mu < -32768) mu = -32768;
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
    if (spikes_seen == 0) begin failures++; $display("FAIL no spikes"); end
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
