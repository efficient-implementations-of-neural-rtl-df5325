// tb_leaky_relu: checks the activation unit against integer reference
// arithmetic: ReLU, LeakyReLU with slopes 1/8 and 1/16 (floor of the scaled
// value) and identity, on random and corner-case inputs.
module tb_leaky_relu;
  import dianet_pkg::*;
  localparam int W = 24;
  act_t act;
  logic signed [W-1:0] din, dout;
  int checks = 0, failures = 0;

  leaky_relu #(.W(W)) dut (.act, .din, .dout);

  function automatic longint floordiv(longint a, longint b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  function automatic longint ref_act(act_t a, longint v);
    case (a)
      ACT_NONE: return v;
      ACT_RELU: return (v < 0) ? 0 : v;
      ACT_LR8:  return (v < 0) ? floordiv(v, 8) : v;
      default:  return (v < 0) ? floordiv(v, 16) : v;
    endcase
  endfunction

  task automatic check(act_t a, longint v);
    longint exp;
    act = a; din = W'(v);
    #1;
    exp = ref_act(a, v);
    checks++;
    if (longint'(dout) !== exp) begin
      failures++;
      $display("FAIL act=%0d in=%0d out=%0d exp=%0d", a, v, dout, exp);
    end
  endtask

  initial begin
    longint corners[6] = '{0, 1, -1, -8, -17, -(1 <<< (W-1))};
    foreach (corners[i])
      for (int a = 0; a < 4; a++) check(act_t'(a), corners[i]);
    repeat (400) begin
      longint v;
      v = longint'($signed(W'($urandom)));
      check(act_t'($urandom_range(0, 3)), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
