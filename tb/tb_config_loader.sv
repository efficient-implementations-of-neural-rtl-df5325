// tb_config_loader: loads words from the memory model and records the bits
// shifted out. Checks that exactly 32 bits per word come out, MSB first, in
// address order, that done pulses once at the end, and that loading zero
// words finishes at once without shifting.
module tb_config_loader;
  import dianet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [MEM_AW-1:0] base = 0, nwords = 0;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [MEM_AW-1:0] rd_addr;
  logic [MEM_DW-1:0] rd_rdata;
  logic cfg_shift, cfg_bit;
  int checks = 0, failures = 0;
  logic bits[$];
  int dones = 0;

  config_loader dut (.clk, .rst_n, .start, .base, .nwords, .busy, .done,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata, .cfg_shift, .cfg_bit);
  ext_mem_model mem (.clk, .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());

  always @(posedge clk) begin
    if (cfg_shift) bits.push_back(cfg_bit);
    if (done) dones++;
  end

  task automatic run(int b, int n);
    bits.delete(); dones = 0;
    @(negedge clk);
    base = MEM_AW'(b); nwords = MEM_AW'(n); start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (bits.size() !== 32 * n) begin
      failures++; $display("FAIL %0d bits for %0d words", bits.size(), n);
    end
    checks++;
    if (dones !== 1) begin failures++; $display("FAIL done pulsed %0d times", dones); end
    for (int i = 0; i < n && bits.size() == 32 * n; i++)
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (bits[32*i + k] !== mem.mem[b + i][31 - k]) begin
          failures++;
          $display("FAIL word %0d bit %0d", i, k);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) mem.mem[100 + i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(100, 5);
    run(110, 1);
    run(120, 0);
    run(101, 40);
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
